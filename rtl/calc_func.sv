// calc_func: CalcFunc pipeline, the generic function evaluator shared by the
// potential-energy and wavefunction engines.
//
// For each squared distance r^2 (u27.26) with its region flag it looks up a
// set of quadratic-interpolation coefficients and returns
//     value = c0 + c1*delta + c2*delta^2        (s0.51, saturated)
// where delta in [0,1) is the position of r^2 inside its bin. One value per
// cycle; out_* follows in_* by exactly LATENCY cycles (49 by default).
//
// Lookup:
//   region I   single stage: bin = floor(r^2 * recip1), 256 bins from 0 to
//              sigma^2, coefficient entry = bin.
//   region II  two stages: d = r^2 - sigma^2; the leading-zero count detector
//              gives the regime; the regime's start and reciprocal bin width
//              are read from the regime memory; bin = floor((d - start) *
//              recip), 64 bins per regime; entry = 256 + 64*regime + bin.
// Pipeline (register stages):
//   1 d = r^2 - sigma^2
//   2 regime (LZCD), region I bin and delta; regime memory read issued
//   3 region II bin and delta
//   4 entry and delta chosen by region; coefficient memory read issued
//   5 c2*delta          6 h = c1 + c2*delta
//   7 h*delta           8 c0 + h*delta, saturated
//   9..LATENCY  delay line
// Products are truncated to 51 fractional bits (arithmetic shift). The
// memories are outside this module; both have one-cycle registered reads.
//
// The lookup schemes, quadratic interpolation, s0.51 values and the 49-cycle
// latency follow the published design. The arithmetic here needs only eight
// stages; the remaining cycles form a delay line standing in for the deeper
// multipliers of the original implementation. Horner evaluation, the delta
// format and truncation are this design's choices.
module calc_func
  import qmc_pkg::*;
#(
  parameter int unsigned LATENCY = CALCFUNC_LATENCY
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_last,
  input  logic                   in_region2,
  input  r2_t                    r2,
  input  r2_t                    sigma2,
  input  recip_t                 recip1,
  // regime-constant memory read port
  output logic [REGIME_BITS-1:0] reg_raddr,
  input  r2_t                    reg_start,
  input  recip_t                 reg_recip,
  // coefficient memory read port
  output logic [COEF_AW-1:0]     coef_raddr,
  input  coef3_t                 coef_rdata,
  // result
  output logic                   out_valid,
  output logic                   out_last,
  output logic                   out_region2,
  output coef_t                  value
);
  localparam int unsigned STAGES = 8;
  localparam int unsigned PAD    = (LATENCY > STAGES) ? LATENCY - STAGES : 0;
  localparam int unsigned H_W    = C_W + 2;   // s2.51

  initial assert (LATENCY >= STAGES)
    else $error("calc_func: LATENCY must be at least %0d", STAGES);

  // token (valid, last, region2) per stage
  typedef struct packed {
    logic v;
    logic l;
    logic r2;
  } tok_t;
  tok_t tok [1:STAGES];

  // stage 1
  r2_t d_1, r2_1;
  // stage 2
  r2_t d_2;
  logic [REGIME_BITS-1:0] regime_1c, regime_2;
  logic [R1_BIN_BITS-1:0] bin1_c, bin1_2, bin1_3;
  delta_t                 dl1_c, dl1_2, dl1_3;
  // stage 3
  logic [R2_BIN_BITS-1:0] bin2_c, bin2_3;
  delta_t                 dl2_c, dl2_3;
  logic [REGIME_BITS-1:0] regime_3;
  r2_t                    off_2c;
  // stage 4..8
  delta_t                 dl_4, dl_5, dl_6;
  coef_t                  c0_5, c1_5, c0_6, c0_7;
  logic signed [H_W-1:0]  m2_5, h_6, m1_7;
  coef_t                  v_8;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= STAGES; k++) tok[k] <= '0;
    end else begin
      tok[1] <= '{v: in_valid, l: in_valid & in_last, r2: in_region2};
      for (int k = 2; k <= STAGES; k++) tok[k] <= tok[k-1];
    end
  end

  // ---- stage 1: offset from sigma^2
  always_ff @(posedge clk) begin
    r2_1 <= r2;
    d_1  <= in_region2 ? r2 - sigma2 : '0;
  end

  // ---- stage 2: regime and region I bin
  lzcd u_lzcd (.d(d_1), .regime(regime_1c), .msb(), .zero());
  bin_lookup #(.BIN_BITS(R1_BIN_BITS)) u_bin1 (.x(r2_1), .recip(recip1), .bin(bin1_c), .delta(dl1_c));
  assign reg_raddr = regime_1c;

  always_ff @(posedge clk) begin
    d_2      <= d_1;
    regime_2 <= regime_1c;
    bin1_2   <= bin1_c;
    dl1_2    <= dl1_c;
  end

  // ---- stage 3: region II bin inside the regime
  assign off_2c = (d_2 > reg_start) ? d_2 - reg_start : '0;
  bin_lookup #(.BIN_BITS(R2_BIN_BITS)) u_bin2 (.x(off_2c), .recip(reg_recip), .bin(bin2_c), .delta(dl2_c));

  always_ff @(posedge clk) begin
    bin2_3   <= bin2_c;
    dl2_3    <= dl2_c;
    regime_3 <= regime_2;
    bin1_3   <= bin1_2;
    dl1_3    <= dl1_2;
  end

  // ---- stage 4: coefficient address
  always_comb begin
    if (tok[3].r2)
      coef_raddr = COEF_AW'(R1_BINS) + {regime_3, bin2_3};
    else
      coef_raddr = COEF_AW'(bin1_3);
  end

  always_ff @(posedge clk) dl_4 <= tok[3].r2 ? dl2_3 : dl1_3;

  // ---- stages 5..8: c0 + delta*(c1 + delta*c2)
  function automatic logic signed [H_W-1:0] mul_delta(logic signed [H_W-1:0] a, delta_t dl);
    logic signed [H_W+DELTA_W:0] p;
    p = a * $signed({1'b0, dl});
    return H_W'(p >>> DELTA_W);
  endfunction

  localparam logic signed [H_W-1:0] VMAX = (H_W'(1) <<< C_FRAC) - H_W'(1);
  localparam logic signed [H_W-1:0] VMIN = -(H_W'(1) <<< C_FRAC);

  function automatic coef_t sat(logic signed [H_W-1:0] a);
    if (a > VMAX)      return C_W'(VMAX);
    else if (a < VMIN) return C_W'(VMIN);
    else               return C_W'(a);
  endfunction

  always_ff @(posedge clk) begin
    m2_5 <= mul_delta(H_W'(coef_rdata.c2), dl_4);
    c0_5 <= coef_rdata.c0;
    c1_5 <= coef_rdata.c1;
    dl_5 <= dl_4;

    h_6  <= m2_5 + H_W'(c1_5);
    c0_6 <= c0_5;
    dl_6 <= dl_5;

    m1_7 <= mul_delta(h_6, dl_6);
    c0_7 <= c0_6;

    v_8  <= sat(m1_7 + H_W'(c0_7));
  end


  // ---- delay line up to LATENCY
  typedef struct packed {
    tok_t  t;
    coef_t v;
  } pad_t;

  generate
    if (PAD == 0) begin : g_nopad
      assign out_valid   = tok[STAGES].v;
      assign out_last    = tok[STAGES].l;
      assign out_region2 = tok[STAGES].r2;
      assign value       = v_8;
    end else begin : g_pad
      pad_t line [PAD];
      always_ff @(posedge clk) begin
        line[0] <= '{t: rst ? '0 : tok[STAGES], v: v_8};
        for (int k = 1; k < PAD; k++) begin
          line[k] <= line[k-1];
          if (rst) line[k].t <= '0;
        end
      end
      assign out_valid   = line[PAD-1].t.v;
      assign out_last    = line[PAD-1].t.l;
      assign out_region2 = line[PAD-1].t.r2;
      assign value       = line[PAD-1].v;
    end
  endgenerate
endmodule
