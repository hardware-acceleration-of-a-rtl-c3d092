// lzcd: leading zero count detector of the region II lookup (first stage).
//
// Input d = r^2 - sigma^2 (u27.26, 53 bits). The word is cut into three
// slices, bits [52:35], [34:17] and [16:0]; each slice has its own priority
// encoder (Pr1, Pr2, Pr3) and the first slice from the top that holds a one
// supplies the position msb of the leading one. Region II is split into
// REGIMES regimes whose end points are consecutive powers of two, the top
// regime ending at the largest value of the format: regime = msb - (TOP_BIT -
// REGIMES + 1), and every d whose leading one is at or below that bit
// (d = 0 included) belongs to regime 0. Combinational; no base-two logarithm is computed.
//
// The three priority encoders and the 21 power-of-two regimes follow the
// published design; the slice boundaries and the way regime 0 extends down
// to sigma^2 are this design's choices.
module lzcd
  import qmc_pkg::*;
#(
  parameter int unsigned W       = R2_W,
  parameter int unsigned REGIMES = R2_REGIMES,
  parameter int unsigned TOP_BIT = R2_W - 1
) (
  input  logic [W-1:0]           d,
  output logic [REGIME_BITS-1:0] regime,
  output logic [5:0]             msb,
  output logic                   zero
);
  localparam int unsigned S1 = (W + 2) / 3;      // top slice width (18)
  localparam int unsigned S2 = (W + 2) / 3;      // middle slice (18)
  localparam int unsigned S3 = W - S1 - S2;      // bottom slice (17)
  localparam int unsigned LOW_BIT = TOP_BIT - REGIMES + 1;

  logic          any1, any2, any3;
  logic [4:0]    idx1, idx2, idx3;

  priority_enc #(.W(S1), .IW(5)) u_pr1 (.in(d[W-1 -: S1]),  .any(any1), .idx(idx1));
  priority_enc #(.W(S2), .IW(5)) u_pr2 (.in(d[S3 +: S2]),   .any(any2), .idx(idx2));
  priority_enc #(.W(S3), .IW(5)) u_pr3 (.in(d[S3-1:0]),     .any(any3), .idx(idx3));

  always_comb begin
    zero = 1'b0;
    if (any1)      msb = 6'(S2 + S3) + 6'(idx1);
    else if (any2) msb = 6'(S3) + 6'(idx2);
    else if (any3) msb = 6'(idx3);
    else begin
      msb  = '0;
      zero = 1'b1;
    end
    if (32'(msb) <= LOW_BIT) regime = '0;
    else                     regime = REGIME_BITS'(32'(msb) - LOW_BIT);
  end
endmodule
