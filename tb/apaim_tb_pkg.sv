// apaim_tb_pkg: testbench helpers for the APAIM testbenches.
//
// fp16 <-> real conversion (format 1/5/10, zero exponent = zero), and the
// Ising form of an n-city traveling-salesman problem on N = n*n spins.
// Spin (i,k) = city i at tour position k has index i*n + k. From the QUBO
//   A * sum_i (1 - sum_k x_ik)^2 + A * sum_k (1 - sum_i x_ik)^2
//   + B * sum_{i != j, k} d_ij x_ik x_j(k+1 mod n)
// with x = (1 + sigma)/2, the machine's convention lf_i = h_i/2 + sum_j J_ij s_j
// and dE_i = 2 sigma_i lf_i gives J_ab = -Q_ab/4 and h_a = -(q_a + sum_b Q_ab/2).
package apaim_tb_pkg;

  function automatic real pow2(int e);
    real v;
    v = 1.0;
    for (int i = 0; i < e; i++) v = v * 2.0;
    for (int i = 0; i > e; i--) v = v / 2.0;
    return v;
  endfunction

  function automatic real fp2r(logic [15:0] x);
    real v;
    if (x[14:10] == 5'd0) return 0.0;
    v = (1.0 + real'(x[9:0]) / 1024.0) * pow2(int'(x[14:10]) - 15);
    return x[15] ? -v : v;
  endfunction

  // nearest fp16 (round to nearest), flush below 2^-14, saturate at exponent 31
  function automatic logic [15:0] r2fp(real v);
    logic s;
    int   e;
    real  a, m;
    int   mi;
    s = (v < 0.0);
    a = s ? -v : v;
    if (a < pow2(-14)) return 16'h0000;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mi = int'((a - 1.0) * 1024.0 + 0.5);
    if (mi == 1024) begin mi = 0; e++; end
    if (e + 15 > 31) return {s, 15'h7FFF};
    return {s, 5'(e + 15), 10'(mi)};
  endfunction

  // TSP coefficients as reals: J is N x N (flattened a*N+b), h has N entries.
  function automatic void tsp_ising(int n, real d[], real pa, real pb,
                                    ref real jm[], ref real hv[]);
    int  nn;
    real q[];
    real qq[];
    nn = n * n;
    q  = new[nn];
    qq = new[nn * nn];
    foreach (q[a]) q[a] = -2.0 * pa;
    foreach (qq[a]) qq[a] = 0.0;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++)
        for (int l = 0; l < n; l++) if (l != k) begin
          qq[(i*n+k)*nn + (i*n+l)] += pa;   // same city, two positions
          qq[(k*n+i)*nn + (l*n+i)] += pa;   // same position, two cities
        end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) if (i != j)
        for (int k = 0; k < n; k++) begin
          int a, b;
          a = i*n + k;
          b = j*n + (k + 1) % n;
          qq[a*nn + b] += pb * d[i*n + j] / 2.0;
          qq[b*nn + a] += pb * d[i*n + j] / 2.0;
        end
    // qq holds Q_ab/2 per ordered pair, so the pair energy is sum_{a<b} 2*qq
    jm = new[nn * nn];
    hv = new[nn];
    for (int a = 0; a < nn; a++) begin
      real srow;
      srow = 0.0;
      for (int b = 0; b < nn; b++) begin
        jm[a*nn + b] = -(2.0 * qq[a*nn + b]) / 4.0;
        srow += 2.0 * qq[a*nn + b];
      end
      hv[a] = -(q[a] + srow / 2.0);
    end
  endfunction

  // tour check: every city exactly once and every position exactly once
  function automatic logic tsp_valid(int n, logic [255:0] s);
    for (int i = 0; i < n; i++) begin
      int rc, cc;
      rc = 0; cc = 0;
      for (int k = 0; k < n; k++) begin
        rc += int'(s[i*n + k]);
        cc += int'(s[k*n + i]);
      end
      if (rc != 1 || cc != 1) return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
