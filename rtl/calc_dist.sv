// calc_dist: CalcDist datapath.
//
// Takes the positions of two atoms, each (x, y, z) in s12.20, and produces
// their squared distance r^2 in u27.26 together with its region: region I
// when r^2 < sigma^2, region II otherwise. It accepts one pair per cycle and
// has a fixed latency of three cycles:
//   stage 1  dx, dy, dz (s13.20, exact)
//   stage 2  dx^2, dy^2, dz^2 (exact, 40 fractional bits)
//   stage 3  sum, truncation to 26 fractional bits, comparison with
//            sigma^2
// With s12.20 inputs each |d| is below 2^12, so r^2 < 3*2^24 always fits the
// 27 integer bits of u27.26 and no saturation is needed.
// valid and last travel alongside the data. No square root is taken: the
// function tables are indexed by r^2.
//
// The s12.20 inputs, the u27.26 result and the comparison with sigma^2 follow
// the published design. The stage split and truncation (not rounding) are
// this design's choices.
module calc_dist
  import qmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  in_last,
  input  pos3_t pi,
  input  pos3_t pj,
  input  r2_t   sigma2,
  output logic  out_valid,
  output logic  out_last,
  output logic  out_region2,
  output r2_t   r2
);
  localparam int unsigned D_W  = POS_W + 1;        // s13.20
  localparam int unsigned SQ_W = 2 * D_W;          // 66 bits, 40 fractional
  localparam int unsigned SUM_BITS = SQ_W + 1;     // three squares, each < 2^64
  localparam int unsigned DROP = 2 * POS_FRAC - R2_FRAC;  // 14

  logic signed [D_W-1:0]  dx_q, dy_q, dz_q;
  logic [SQ_W-1:0]        sx_q, sy_q, sz_q;
  logic [2:0]             v_q, l_q;
  logic [SUM_BITS-1:0]    sum;

  always_ff @(posedge clk) begin
    dx_q <= D_W'(pi.x) - D_W'(pj.x);
    dy_q <= D_W'(pi.y) - D_W'(pj.y);
    dz_q <= D_W'(pi.z) - D_W'(pj.z);
    sx_q <= SQ_W'(dx_q * dx_q);
    sy_q <= SQ_W'(dy_q * dy_q);
    sz_q <= SQ_W'(dz_q * dz_q);
  end

  always_comb sum = SUM_BITS'(sx_q) + SUM_BITS'(sy_q) + SUM_BITS'(sz_q);

  always_ff @(posedge clk) begin
    r2 <= sum[DROP+R2_W-1:DROP];
  end

  assign out_region2 = (r2 >= sigma2);

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= '0;
      l_q <= '0;
    end else begin
      v_q <= {v_q[1:0], in_valid};
      l_q <= {l_q[1:0], in_valid & in_last};
    end
  end
  assign out_valid = v_q[2];
  assign out_last  = l_q[2];
endmodule
