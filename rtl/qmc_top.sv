// qmc_top: the two-board accelerator for the Variational Monte Carlo
// kernels.
//
// Board 0 (FPGA0) evaluates the pairwise potential energy of a
// configuration, board 1 (FPGA1) the pairwise (Jastrow-type) wavefunction.
// Both hold the same hardware (qmc_accel); board 0 accumulates region II
// into a sum and region I into a product, board 1 routes everything into the
// product. The boards share nothing but the clock and reset: each has its own
// 32-bit OPB slave port through which the host side loads it, starts it and
// polls it, so the two kernels run concurrently on the same configuration.
//
// One board per kernel follows the published platform; placing both in one
// top with a common clock is this design's own packaging.
module qmc_top
  import qmc_pkg::*;
#(
  parameter int unsigned N_MAX = N_MAX_DEF
) (
  input  logic        clk,
  input  logic        rst,
  // board 0: potential energy
  input  logic        opb0_select,
  input  logic        opb0_rnw,
  input  logic [31:0] opb0_abus,
  input  logic [31:0] opb0_dbus,
  output logic        opb0_xfer_ack,
  output logic [31:0] opb0_sl_dbus,
  output logic        pe_done,
  // board 1: wavefunction
  input  logic        opb1_select,
  input  logic        opb1_rnw,
  input  logic [31:0] opb1_abus,
  input  logic [31:0] opb1_dbus,
  output logic        opb1_xfer_ack,
  output logic [31:0] opb1_sl_dbus,
  output logic        wf_done
);
  qmc_accel #(.IS_WF(1'b0), .N_MAX(N_MAX)) u_fpga0_pe (
    .clk, .rst, .opb_select(opb0_select), .opb_rnw(opb0_rnw), .opb_abus(opb0_abus),
    .opb_dbus(opb0_dbus), .sl_xfer_ack(opb0_xfer_ack), .sl_dbus(opb0_sl_dbus), .done(pe_done)
  );

  qmc_accel #(.IS_WF(1'b1), .N_MAX(N_MAX)) u_fpga1_wf (
    .clk, .rst, .opb_select(opb1_select), .opb_rnw(opb1_rnw), .opb_abus(opb1_abus),
    .opb_dbus(opb1_dbus), .sl_xfer_ack(opb1_xfer_ack), .sl_dbus(opb1_sl_dbus), .done(wf_done)
  );
endmodule
