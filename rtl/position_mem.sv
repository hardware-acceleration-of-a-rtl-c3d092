// position_mem: one bank of the on-chip Position Memory.
//
// Holds the (x, y, z) coordinates of up to DEPTH atoms in s12.20 fixed point.
// Port A is the host side: one 32-bit coordinate per write, selected by atom
// index and coordinate number (0 = x, 1 = y, 2 = z). Port B is the engine
// side: one whole atom per cycle, registered, so rdata is valid the cycle
// after raddr is presented (block-RAM behaviour). Writing and reading in the
// same cycle is allowed; a read of the address being written returns the old
// contents.
//
// The dual-ported position store, written by the host while the engine
// consumes it, follows the published architecture. The split into three
// coordinate lanes and the registered read are this design's choices. The
// engine uses two banks with identical contents to fetch both atoms of a
// pair in every cycle.
module position_mem
  import qmc_pkg::*;
#(
  parameter int unsigned DEPTH = N_MAX_DEF
) (
  input  logic    clk,
  input  pos_wr_t wr,
  input  logic [11:0] raddr,
  output pos3_t   rdata
);
  pos_t mem_x [DEPTH];
  pos_t mem_y [DEPTH];
  pos_t mem_z [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.en && 32'(wr.atom) < DEPTH) begin
      case (wr.coord)
        2'd0: mem_x[wr.atom] <= wr.data;
        2'd1: mem_y[wr.atom] <= wr.data;
        2'd2: mem_z[wr.atom] <= wr.data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (32'(raddr) < DEPTH) begin
      rdata.x <= mem_x[raddr];
      rdata.y <= mem_y[raddr];
      rdata.z <= mem_z[raddr];
    end else begin
      rdata <= '0;
    end
  end
endmodule
