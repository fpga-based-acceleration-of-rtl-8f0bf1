// tb_em_ref_pkg - double-precision reference model of one EM iteration for the testbenches.
// Samples x are stored as x[n*D + d], memberships as phi[m*N + n]. One call performs the
// M-step (N_SUM, means, weights, full covariances), inverts each covariance by Gauss-Jordan
// elimination with partial pivoting, and performs the E-step in the log domain with the
// log-sum-exp normalisation, overwriting phi with the new memberships.
package tb_em_ref_pkg;

  function automatic real rabs_(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic void em_ref_iter(input int N, input int D, input int M,
                                      ref real x[], ref real phi[]);
    real nsum [], mu [], w [], inv [], cst [], num [];
    real a [], diff [];
    real t, p, det, h, mx, s;
    int piv;
    nsum = new[M]; mu = new[M*D]; w = new[M]; inv = new[M*D*D]; cst = new[M];
    num = new[M*N]; a = new[D*2*D]; diff = new[D];
    for (int m = 0; m < M; m++) begin
      nsum[m] = 0.0;
      for (int d = 0; d < D; d++) mu[m*D+d] = 0.0;
      for (int n = 0; n < N; n++) begin
        nsum[m] += phi[m*N+n];
        for (int d = 0; d < D; d++) mu[m*D+d] += phi[m*N+n] * x[n*D+d];
      end
      for (int d = 0; d < D; d++) mu[m*D+d] /= nsum[m];
      w[m] = nsum[m] / N;
      // covariance into the left half of a, identity into the right half
      for (int i = 0; i < D; i++)
        for (int j = 0; j < D; j++) begin
          t = 0.0;
          for (int n = 0; n < N; n++)
            t += phi[m*N+n] * (x[n*D+i] - mu[m*D+i]) * (x[n*D+j] - mu[m*D+j]);
          a[i*2*D+j] = t / nsum[m];
          a[i*2*D+D+j] = (i == j) ? 1.0 : 0.0;
        end
      det = 1.0;
      for (int c = 0; c < D; c++) begin
        piv = c;
        for (int r = c + 1; r < D; r++) if (rabs_(a[r*2*D+c]) > rabs_(a[piv*2*D+c])) piv = r;
        if (piv != c) begin
          det = -det;
          for (int j = 0; j < 2*D; j++) begin
            t = a[c*2*D+j]; a[c*2*D+j] = a[piv*2*D+j]; a[piv*2*D+j] = t;
          end
        end
        p = a[c*2*D+c];
        det *= p;
        for (int j = 0; j < 2*D; j++) a[c*2*D+j] /= p;
        for (int r = 0; r < D; r++)
          if (r != c) begin
            t = a[r*2*D+c];
            for (int j = 0; j < 2*D; j++) a[r*2*D+j] -= t * a[c*2*D+j];
          end
      end
      for (int i = 0; i < D; i++)
        for (int j = 0; j < D; j++) inv[m*D*D+i*D+j] = a[i*2*D+D+j];
      cst[m] = -(D / 2.0) * $ln(2.0 * 3.14159265358979) - 0.5 * $ln(det);
      for (int n = 0; n < N; n++) begin
        for (int d = 0; d < D; d++) diff[d] = x[n*D+d] - mu[m*D+d];
        h = 0.0;
        for (int i = 0; i < D; i++)
          for (int j = 0; j < D; j++) h += diff[i] * diff[j] * inv[m*D*D+i*D+j];
        num[m*N+n] = -0.5 * h + $ln(w[m]) + cst[m];
      end
    end
    for (int n = 0; n < N; n++) begin
      mx = num[n];
      for (int m = 1; m < M; m++) if (num[m*N+n] > mx) mx = num[m*N+n];
      s = 0.0;
      for (int m = 0; m < M; m++) s += $exp(num[m*N+n] - mx);
      for (int m = 0; m < M; m++) phi[m*N+n] = $exp(num[m*N+n] - mx - $ln(s));
    end
  endfunction

endpackage
