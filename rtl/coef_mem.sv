// coef_mem: coefficient memory of one calculation engine (PE or WF).
//
// Each entry holds the three quadratic-interpolation coefficients c0, c1, c2
// in s0.51. Entries 0..255 are the region I bins, entry 256 + 64*regime + bin
// holds region II. The host writes one coefficient at a time (entry and
// coefficient select); CalcFunc reads one whole entry per cycle through a
// registered port, so rdata is valid one cycle after raddr.
//
// The table size, [256 + 21*64] entries of three coefficients, and the s0.51
// format follow the published design; the address layout and the registered
// read are this design's choices.
module coef_mem
  import qmc_pkg::*;
#(
  parameter int unsigned DEPTH = COEF_DEPTH
) (
  input  logic               clk,
  input  coef_wr_t           wr,
  input  logic [COEF_AW-1:0] raddr,
  output coef3_t             rdata
);
  coef_t mem0 [DEPTH];
  coef_t mem1 [DEPTH];
  coef_t mem2 [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.en && 32'(wr.entry) < DEPTH) begin
      case (wr.sel)
        2'd0: mem0[wr.entry] <= wr.data;
        2'd1: mem1[wr.entry] <= wr.data;
        2'd2: mem2[wr.entry] <= wr.data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (32'(raddr) < DEPTH) begin
      rdata.c0 <= mem0[raddr];
      rdata.c1 <= mem1[raddr];
      rdata.c2 <= mem2[raddr];
    end else begin
      rdata <= '0;
    end
  end
endmodule
