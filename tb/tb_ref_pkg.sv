// tb_ref_pkg: reference models used by the testbenches.
//
// All models work on LLRs given as integers in units of 2**-3 (three
// fractional bits) and compute in real arithmetic, independently of the RTL
// structure: the piecewise-linear planes are evaluated directly, and the
// result is floored to the LLR grid and clamped to the signed 8-bit range.
package tb_ref_pkg;

  localparam int  LSB_PER_ONE = 8;
  localparam real LN2         = 0.6931471805599453;

  function automatic int clamp(input int v, input int w = 8);
    int hi = (1 <<< (w - 1)) - 1;
    int lo = -(1 <<< (w - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  function automatic int to_grid(input real v);  // floor onto the LLR grid
    return int'($floor(v * LSB_PER_ONE));
  endfunction

  // Exact log(e^a + e^b) for real a, b.
  function automatic real lse(input real a, input real b);
    real m = (a > b) ? a : b;
    return m + $ln(1.0 + $exp(-((a > b) ? a - b : b - a)));
  endfunction

  // Generalized max*: max over x1, x2 and the r-2 planes
  // y_i = a_{r-i-1} x1 + a_i x2 + b_i (i = 1..r-2), coefficients given in
  // units of 2**-8, evaluated in real arithmetic.
  function automatic int pwl_maxstar(input int x1, input int x2, input int r,
                                     input int aq [], input int bq []);
    real fx1 = real'(x1) / LSB_PER_ONE;
    real fx2 = real'(x2) / LSB_PER_ONE;
    real best = (fx1 > fx2) ? fx1 : fx2;
    for (int i = 1; i <= r - 2; i++) begin
      real y = real'(aq[r-i-2]) / 256.0 * fx1 + real'(aq[i-1]) / 256.0 * fx2
             + real'(bq[i-1]) / 256.0;
      if (y > best) best = y;
    end
    return clamp(to_grid(best));
  endfunction

  // r = 3 unit: max{x*, 0.5 (x1 + x2 + 1)} on the grid, 1/2 LSB floored.
  function automatic int r3_maxstar(input int x1, input int x2, input int w = 8);
    real h = (real'(x1 + x2) / LSB_PER_ONE + 1.0) / 2.0;
    return clamp(imax(imax(x1, x2), to_grid(h)), w);
  endfunction

  // r = 4 unit, A3 form: x* + max{0, 0.5 - 0.25|d|} where the quarter of d
  // is taken on the grid (floor of d/4 in LSBs) before the sign is applied.
  function automatic int r4_maxstar(input int x1, input int x2, input int w = 8);
    int  d = x1 - x2;
    int  q = int'($floor(real'(d) / 4.0));
    int  wc = (d >= 0) ? (4 - q) : (4 + q);
    return clamp(imax(x1, x2) + imax(0, wc), w);
  endfunction

  // Max* selected by algorithm: 0 = r4 (A3), 1 = r3 (A2).
  function automatic int alg_maxstar(input int alg, input int x1, input int x2,
                                     input int w = 8);
    return (alg == 1) ? r3_maxstar(x1, x2, w) : r4_maxstar(x1, x2, w);
  endfunction

  // Programmable unit reference: returns {j, k} and whether either was
  // clipped. The max* values are formed on a 10-bit internal range and only
  // the outputs are clamped to 8 bits.
  function automatic void pu_ref(input int alg, input bit ldpc,
                                 input int u, input int v, input int up, input int vp,
                                 output int j, output int k, output bit sat);
    int m  = alg_maxstar(alg, u, v, 10);
    int jj, kk;
    if (ldpc) begin
      jj = alg_maxstar(alg, 0, u + v, 10);
      kk = jj - m;
    end else begin
      jj = alg_maxstar(alg, up, vp, 10);
      kk = m;
    end
    j   = clamp(jj);
    k   = clamp(kk);
    sat = (j != jj) || (k != kk);
  endfunction

  // Seven-unit tree reference: level one takes (Ui, Vi, Ui', Vi'); a parent
  // takes its children's k as (U, V) and their j as (U', V').
  function automatic void tree_ref(input int alg, input bit ldpc,
                                   input int u [4], input int v [4],
                                   input int up [4], input int vp [4],
                                   output int j, output int k, output bit sat);
    int j1 [4], k1 [4], j2 [2], k2 [2];
    bit s;
    sat = 0;
    for (int i = 0; i < 4; i++) begin
      pu_ref(alg, ldpc, u[i], v[i], up[i], vp[i], j1[i], k1[i], s);
      sat |= s;
    end
    for (int i = 0; i < 2; i++) begin
      pu_ref(alg, ldpc, k1[2*i], k1[2*i+1], j1[2*i], j1[2*i+1], j2[i], k2[i], s);
      sat |= s;
    end
    pu_ref(alg, ldpc, k2[0], k2[1], j2[0], j2[1], j, k, s);
    sat |= s;
  endfunction

  // Extrinsic scaling by 230/256, rounded half up, clamped to 8 bits.
  function automatic int scale_ref(input int x);
    return clamp(int'($floor(real'(x) * 230.0 / 256.0 + 0.5)));
  endfunction

endpackage
