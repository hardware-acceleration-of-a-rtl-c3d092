// tb_model_pkg: bit-exact reference model of the datapath and test-table
// generator, shared by the testbenches.
//
// The model is written from the number formats alone, with plain 128-bit
// integer arithmetic, and does not reuse any RTL code:
//   r2      = trunc26(dx^2 + dy^2 + dz^2), saturated to u27.26
//   bin     = floor(x * recip / 2^66), delta = bits 65..14 of x * recip
//   regime  = max(0, msb(d) - 32)
//   value   = sat(c0 + floor((c1 + floor(c2*delta/2^52)) * delta / 2^52))
//   product = normalise(floor(mant * factor / 2^52))
// The tables describe a Lennard-Jones pair potential (sigma = 2.5, well
// depth 1) in the transformed form used by the accelerator: exp(-V) in
// region I and -V/epsilon in region II, or, for the wavefunction, a
// McMillan-type pair factor exp(-(b^2/r^2)^2.5) rescaled below one. Each bin
// gets the quadratic through the function at delta = 0, 1/2 and 1;
// coefficients are clamped to the s0.51 range.
package tb_model_pkg;
  import qmc_pkg::*;

  localparam real SIG = 2.5;
  localparam real EPS = 1.0;

  // tables, loaded into both the design and the model
  coef_t  t_c0 [COEF_DEPTH];
  coef_t  t_c1 [COEF_DEPTH];
  coef_t  t_c2 [COEF_DEPTH];
  r2_t    t_start [R2_REGIMES];
  recip_t t_recip [R2_REGIMES];
  r2_t    t_sigma2;
  recip_t t_recip1;

  function automatic coef_t to_s051(real v);
    real lim = 1.0 - 1.0 / (2.0 ** 51);
    if (v > lim) v = lim;
    if (v < -1.0) v = -1.0;
    return coef_t'(longint'(v * (2.0 ** 51)));
  endfunction

  function automatic real fn(bit wf, bit reg2, real r2);
    real s6, v;
    if (r2 <= 1.0e-6) r2 = 1.0e-6;
    if (wf) begin
      // pair factor, peak rescaled to just under one
      return 0.999 * $exp(-((4.0 / r2) ** 2.5));
    end
    s6 = (SIG * SIG / r2) ** 3;
    v  = 4.0 * EPS * (s6 * s6 - s6);
    if (!reg2) begin
      if (v > 700.0) return 0.0;
      return $exp(-v);
    end
    return -v / EPS;
  endfunction

  function automatic void fit(int e, bit wf, bit reg2, real lo, real w);
    real f0 = fn(wf, reg2, lo);
    real fm = fn(wf, reg2, lo + 0.5 * w);
    real f1 = fn(wf, reg2, lo + w);
    t_c0[e] = to_s051(f0);
    t_c1[e] = to_s051(-3.0 * f0 + 4.0 * fm - f1);
    t_c2[e] = to_s051(2.0 * f0 - 4.0 * fm + 2.0 * f1);
  endfunction

  // Build all tables for the potential (wf = 0) or the wavefunction (wf = 1).
  function automatic void build_tables(bit wf);
    real s2 = SIG * SIG;
    real w1 = s2 / 256.0;
    t_sigma2 = r2_t'(longint'(s2 * (2.0 ** 26)));
    t_recip1 = recip_t'(longint'((256.0 / s2) * (2.0 ** 40)));
    for (int b = 0; b < 256; b++) fit(b, wf, 1'b0, b * w1, w1);
    for (int k = 0; k < R2_REGIMES; k++) begin
      // regime 0 spans d in [0, 2^7), regime k >= 1 spans [2^(6+k), 2^(7+k))
      real start = (k == 0) ? 0.0 : 2.0 ** (6 + k);
      real width = (k == 0) ? 2.0 : 2.0 ** k;
      t_start[k] = (k == 0) ? '0 : r2_t'(1) << (32 + k);
      t_recip[k] = recip_t'(1) << (40 - k - ((k == 0) ? 1 : 0));
      for (int b = 0; b < 64; b++)
        fit(256 + 64 * k + b, wf, 1'b1, s2 + start + b * width, width);
    end
  endfunction

  // ---------------- bit-exact model ----------------
  function automatic r2_t m_r2(pos3_t a, pos3_t b);
    logic signed [127:0] dx, dy, dz, s;
    dx = 128'(a.x) - 128'(b.x);
    dy = 128'(a.y) - 128'(b.y);
    dz = 128'(a.z) - 128'(b.z);
    s  = (dx * dx + dy * dy + dz * dz) >>> 14;
    if (s >= (128'sd1 <<< 53)) return '1;
    return r2_t'(s);
  endfunction

  function automatic void m_bin(r2_t x, recip_t rc, int bits, output int bin, output delta_t dl);
    logic [127:0] p = 128'(x) * 128'(rc);
    logic [127:0] ip = p >> 66;
    if (ip >= (128'd1 << bits)) begin
      bin = (1 << bits) - 1;
      dl  = '1;
    end else begin
      bin = int'(ip);
      dl  = delta_t'(p >> 14);
    end
  endfunction

  function automatic int m_regime(r2_t d);
    int msb = -1;
    for (int k = 0; k < 53; k++) if (d[k]) msb = k;
    return (msb > 32) ? msb - 32 : 0;
  endfunction

  function automatic coef_t m_interp(coef_t c0, coef_t c1, coef_t c2, delta_t dl);
    logic signed [127:0] m2, h, m1, v;
    logic signed [127:0] sd = $signed({1'b0, 127'(dl)});
    m2 = (128'(c2) * sd) >>> 52;
    h  = 128'(c1) + m2;
    m1 = (h * sd) >>> 52;
    v  = 128'(c0) + m1;
    if (v > ((128'sd1 <<< 51) - 1)) return coef_t'((128'sd1 <<< 51) - 1);
    if (v < -(128'sd1 <<< 51))      return coef_t'(-(128'sd1 <<< 51));
    return coef_t'(v);
  endfunction

  // Full CalcFunc model; also returns the table entry used.
  function automatic coef_t m_eval(r2_t r2, output int entry);
    int bin; delta_t dl;
    if (r2 < t_sigma2) begin
      m_bin(r2, t_recip1, 8, bin, dl);
      entry = bin;
    end else begin
      r2_t d = r2 - t_sigma2;
      int  k = m_regime(d);
      r2_t off = (d > t_start[k]) ? d - t_start[k] : '0;
      m_bin(off, t_recip[k], 6, bin, dl);
      entry = 256 + 64 * k + bin;
    end
    return m_interp(t_c0[entry], t_c1[entry], t_c2[entry], dl);
  endfunction

  // One product step: returns the new mantissa, adds the shift count to e.
  function automatic logic [51:0] m_prod(logic [51:0] m, coef_t v, inout longint e);
    logic [127:0] f = v[51] ? 128'd0 : 128'(v) << 1;
    logic [127:0] p = (128'(m) * f) >> 52;
    if (p == 0) return '0;
    while (p[51] == 1'b0) begin
      p = p << 1;
      e++;
    end
    return p[51:0];
  endfunction
endpackage
