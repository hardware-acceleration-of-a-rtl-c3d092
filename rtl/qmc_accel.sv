// qmc_accel: the design on one accelerator FPGA.
//
// OPB slave (opb_regs) -> Position Memory (inside the engine), coefficient
// memory (coef_mem), regime-constant memory (regime_mem) and one calculation
// engine (calc_engine). IS_WF selects the engine's accumulation mode: 0 for
// the potential-energy board, 1 for the wavefunction board; the hardware is
// otherwise identical and only the loaded coefficients differ.
//
// Use: the host writes positions, coefficients, regime constants, sigma^2,
// the region I reciprocal bin width and N through the OPB, writes CTRL.start,
// polls STATUS until done, then reads the product (mantissa and shift count)
// and, for the potential energy, the region II sum. Turning these into
// energies (-ln of the product, removal of the scaling) is the host's job.
// For a P-pair configuration the engine is busy for P + 54 cycles.
//
// The set of modules on each FPGA follows the published block diagram; the
// separate regime-constant memory and the OPB register map are this
// design's own.
module qmc_accel
  import qmc_pkg::*;
#(
  parameter bit          IS_WF     = 1'b0,
  parameter int unsigned N_MAX     = N_MAX_DEF,
  parameter logic [31:0] BASE_ADDR = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  output logic        sl_xfer_ack,
  output logic [31:0] sl_dbus,
  output logic        done
);
  pos_wr_t                 pos_wr;
  coef_wr_t                coef_wr;
  regime_wr_t              regime_wr;
  logic                    start, busy;
  logic [12:0]             n_atoms;
  r2_t                     sigma2;
  recip_t                  recip1;
  logic [MANT_W-1:0]       prod_mant;
  logic [EXP_W-1:0]        prod_exp;
  logic signed [SUM_W-1:0] sum;
  logic [REGIME_BITS-1:0]  reg_raddr;
  r2_t                     reg_start;
  recip_t                  reg_recip;
  logic [COEF_AW-1:0]      coef_raddr;
  coef3_t                  coef_rdata;

  opb_regs #(.BASE_ADDR(BASE_ADDR)) u_regs (
    .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_xfer_ack, .sl_dbus,
    .pos_wr, .coef_wr, .regime_wr, .start, .n_atoms, .sigma2, .recip1,
    .busy, .done, .prod_mant, .prod_exp, .sum
  );

  coef_mem   u_coef   (.clk, .wr(coef_wr), .raddr(coef_raddr), .rdata(coef_rdata));
  regime_mem u_regime (.clk, .wr(regime_wr), .raddr(reg_raddr), .start(reg_start), .recip(reg_recip));

  calc_engine #(.IS_WF(IS_WF), .N_MAX(N_MAX)) u_engine (
    .clk, .rst, .start, .n_atoms, .sigma2, .recip1, .pos_wr,
    .reg_raddr, .reg_start, .reg_recip, .coef_raddr, .coef_rdata,
    .busy, .done, .prod_mant, .prod_exp, .sum
  );
endmodule
