// regime_mem: per-regime constants for the second stage of the region II
// bin lookup.
//
// For each of the REGIMES logarithmic regimes it holds the regime's start,
// measured from sigma^2 in u27.26, and the reciprocal of the regime's bin
// width in u24.40. The host writes one field at a time; CalcFunc reads both
// fields of one regime per cycle through a registered port (one cycle
// latency).
//
// That region II needs constants fetched by regime, and that reciprocals of
// the bin widths are stored so no divider is needed, follows the published
// design. Which constants are stored, and their formats, are this design's
// choices.
module regime_mem
  import qmc_pkg::*;
#(
  parameter int unsigned REGIMES = R2_REGIMES
) (
  input  logic                   clk,
  input  regime_wr_t             wr,
  input  logic [REGIME_BITS-1:0] raddr,
  output r2_t                    start,
  output recip_t                 recip
);
  r2_t    mem_start [REGIMES];
  recip_t mem_recip [REGIMES];

  always_ff @(posedge clk) begin
    if (wr.en && 32'(wr.regime) < REGIMES) begin
      if (wr.field) mem_recip[wr.regime] <= wr.data;
      else          mem_start[wr.regime] <= wr.data[R2_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (32'(raddr) < REGIMES) begin
      start <= mem_start[raddr];
      recip <= mem_recip[raddr];
    end else begin
      start <= '0;
      recip <= '0;
    end
  end
endmodule
