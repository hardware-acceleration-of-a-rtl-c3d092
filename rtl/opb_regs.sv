// opb_regs: 32-bit OPB slave of one accelerator board.
//
// Everything the host side (host program over PCI, or the on-board PowerPC)
// does to the core arrives as single OPB transfers on this port: it loads
// atom positions and interpolation constants, sets the run parameters,
// starts a configuration, polls the status word and reads the results.
//
// Transfer timing: a transfer is taken in the first cycle opb_select is
// high; sl_xfer_ack is high for exactly one cycle, the next one, with read
// data on sl_dbus (zero at all other times). The master keeps select high
// until it sees the acknowledge. Byte enables are ignored; every access is a
// full word.
//
// Address map (offsets from BASE_ADDR, bits [19:0] decoded, [31:20] must
// match BASE_ADDR):
//   0x00000 CTRL      W  bit0 = start
//   0x00004 STATUS    R  bit0 = busy, bit1 = done
//   0x00008 NATOMS    RW number of atoms N
//   0x00010/14 SIGMA2 RW u27.26 region boundary (low, high word)
//   0x00018/1C RECIP1 RW u24.40 reciprocal of the region I bin width
//   0x00020/24 MANT   R  product mantissa u0.52
//   0x00028 EXP       R  product shift count
//   0x00030/34/38 SUM R  region II sum s23.51, sign-extended top word
//   0x1_0000 + 16*atom + 4*coord          position, s12.20 (W)
//   0x2_0000 + 16*regime + 8*field + 4*hi regime start / reciprocal (W)
//   0x4_0000 + 32*entry + 8*coef + 4*hi   coefficient c0/c1/c2 (W)
// A value wider than 32 bits is written low word first: the low word is
// held in a staging register and the write of the high word commits both.
//
// The 32-bit OPB attachment and polling of a status word follow the
// published design; the register map, the staging scheme and the acknowledge
// timing are this design's own.
module opb_regs
  import qmc_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h8000_0000
) (
  input  logic                    clk,
  input  logic                    rst,
  // OPB slave
  input  logic                    opb_select,
  input  logic                    opb_rnw,
  input  logic [31:0]             opb_abus,
  input  logic [31:0]             opb_dbus,
  output logic                    sl_xfer_ack,
  output logic [31:0]             sl_dbus,
  // memory writes
  output pos_wr_t                 pos_wr,
  output coef_wr_t                coef_wr,
  output regime_wr_t              regime_wr,
  // engine control
  output logic                    start,
  output logic [12:0]             n_atoms,
  output r2_t                     sigma2,
  output recip_t                  recip1,
  input  logic                    busy,
  input  logic                    done,
  input  logic [MANT_W-1:0]       prod_mant,
  input  logic [EXP_W-1:0]        prod_exp,
  input  logic signed [SUM_W-1:0] sum
);
  logic [31:0] lo_q;       // staging register for wide values
  logic        take;
  logic        hit;
  logic [19:0] a;
  logic [31:0] rdata;
  logic [95:0] sum_ext;

  assign hit  = (opb_abus[31:20] == BASE_ADDR[31:20]);
  assign take = opb_select && hit && !sl_xfer_ack;
  assign a    = opb_abus[19:0];
  assign sum_ext = 96'(sum);

  // an acknowledge lasts exactly one cycle and answers a selected transfer
  a_ack_single: assert property (@(posedge clk) disable iff (rst) sl_xfer_ack |=> !sl_xfer_ack);
  a_ack_cause:  assert property (@(posedge clk) disable iff (rst) sl_xfer_ack |-> $past(opb_select));

  always_comb begin
    rdata = '0;
    case (a)
      A_STATUS:    rdata = {30'd0, done, busy};
      A_NATOMS:    rdata = 32'(n_atoms);
      A_SIGMA2_LO: rdata = sigma2[31:0];
      A_SIGMA2_HI: rdata = 32'(sigma2[R2_W-1:32]);
      A_RECIP1_LO: rdata = recip1[31:0];
      A_RECIP1_HI: rdata = recip1[63:32];
      A_MANT_LO:   rdata = prod_mant[31:0];
      A_MANT_HI:   rdata = 32'(prod_mant[MANT_W-1:32]);
      A_EXP:       rdata = prod_exp;
      A_SUM_0:     rdata = sum_ext[31:0];
      A_SUM_1:     rdata = sum_ext[63:32];
      A_SUM_2:     rdata = sum_ext[95:64];
      default:     rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sl_xfer_ack <= 1'b0;
      sl_dbus     <= '0;
      lo_q        <= '0;
      start       <= 1'b0;
      n_atoms     <= '0;
      sigma2      <= '0;
      recip1      <= '0;
      pos_wr      <= '0;
      coef_wr     <= '0;
      regime_wr   <= '0;
    end else begin
      sl_xfer_ack <= take;
      sl_dbus     <= (take && opb_rnw) ? rdata : '0;
      start       <= 1'b0;
      pos_wr.en   <= 1'b0;
      coef_wr.en  <= 1'b0;
      regime_wr.en <= 1'b0;
      if (take && !opb_rnw) begin
        case (a[19:16])
          4'h0: begin
            case (a)
              A_CTRL:      start   <= opb_dbus[0];
              A_NATOMS:    n_atoms <= opb_dbus[12:0];
              A_SIGMA2_HI: sigma2  <= R2_W'({opb_dbus, lo_q});
              A_RECIP1_HI: recip1  <= {opb_dbus, lo_q};
              default: ;
            endcase
            if (a == A_SIGMA2_LO || a == A_RECIP1_LO) lo_q <= opb_dbus;
          end
          W_POS: begin
            pos_wr <= '{en: 1'b1, atom: a[15:4], coord: a[3:2], data: opb_dbus};
          end
          W_REGIME: begin
            if (!a[2]) lo_q <= opb_dbus;
            else regime_wr <= '{en: 1'b1, regime: a[8:4], field: a[3], data: {opb_dbus, lo_q}};
          end
          W_COEF: begin
            if (!a[2]) lo_q <= opb_dbus;
            else coef_wr <= '{en: 1'b1, entry: a[15:5], sel: a[4:3], data: C_W'({opb_dbus, lo_q})};
          end
          default: ;
        endcase
      end
    end
  end
endmodule
