// bin_lookup: bin locator shared by the region I lookup and the second stage
// of the region II lookup.
//
// The offset x (u27.26) into a uniformly binned range is multiplied by the
// stored reciprocal of the bin width, recip (u24.40); no divider is needed.
// The integer part of the product is the bin number and its fraction is the
// position inside the bin, delta, in [0,1) as u0.52. Region I uses 8 bin
// bits (256 bins from r^2 = 0 to sigma^2; "the lower 8 bits form the
// address"), region II uses 6 (64 bins per regime). A product past the last
// bin saturates to the last bin with delta all ones. Combinational; the
// caller registers around it.
//
// Reciprocal bin widths in place of a division and the bin counts follow
// the published design; the formats and the normalised delta are this
// design's choices.
module bin_lookup
  import qmc_pkg::*;
#(
  parameter int unsigned BIN_BITS = R1_BIN_BITS
) (
  input  r2_t                 x,
  input  recip_t              recip,
  output logic [BIN_BITS-1:0] bin,
  output delta_t              delta
);
  localparam int unsigned P_W  = R2_W + RECIP_W;       // 117
  localparam int unsigned P_FR = R2_FRAC + RECIP_FRAC; // 66

  logic [P_W-1:0] prod;

  always_comb begin
    prod = P_W'(x) * P_W'(recip);
    if (|prod[P_W-1:P_FR+BIN_BITS]) begin
      bin   = '1;
      delta = '1;
    end else begin
      bin   = prod[P_FR +: BIN_BITS];
      delta = prod[P_FR-1 -: DELTA_W];
    end
  end
endmodule
