// opb_host_if: testbench-side OPB master with single-word write and read
// tasks, plus helpers that load a whole configuration and the interpolation
// tables into one accelerator board through its register map.
// A transfer raises select with address, direction and data, waits for the
// slave's one-cycle acknowledge and drops select in the following cycle.
// The interface also checks that the slave acknowledges within 16 cycles and
// never drives read data outside an acknowledge.
interface opb_host_if (input logic clk);
  import qmc_pkg::*;
  logic        select = 1'b0;
  logic        rnw = 1'b0;
  logic [31:0] abus = '0;
  logic [31:0] dbus = '0;
  logic        xfer_ack;
  logic [31:0] sl_dbus;
  logic [31:0] base = 32'h8000_0000;
  int          n_xfer = 0;

  a_dbus_idle: assert property (@(posedge clk) !xfer_ack |-> sl_dbus == '0);
  a_ack_only_when_selected: assert property (@(posedge clk) xfer_ack |-> $past(select));

  task automatic xfer(input bit read, input logic [19:0] off, input logic [31:0] wdata,
                      output logic [31:0] rdata);
    int waited = 0;
    @(negedge clk);
    select = 1'b1; rnw = read; abus = base | 32'(off); dbus = read ? '0 : wdata;
    do begin
      @(posedge clk); #1;
      waited++;
    end while (!xfer_ack && waited < 16);
    rdata = sl_dbus;
    if (!xfer_ack) $display("OPB: no acknowledge at %h", off);
    @(negedge clk);
    select = 1'b0; rnw = 1'b0; dbus = '0;
    n_xfer++;
  endtask

  task automatic wr(input logic [19:0] off, input logic [31:0] d);
    logic [31:0] unused;
    xfer(1'b0, off, d, unused);
  endtask

  task automatic rd(input logic [19:0] off, output logic [31:0] d);
    xfer(1'b1, off, '0, d);
  endtask

  task automatic wr64(input logic [19:0] off, input logic [63:0] d);
    wr(off, d[31:0]);
    wr(off + 20'd4, d[63:32]);
  endtask

  task automatic load_tables();
    wr64(A_SIGMA2_LO, 64'(tb_model_pkg::t_sigma2));
    wr64(A_RECIP1_LO, tb_model_pkg::t_recip1);
    for (int k = 0; k < R2_REGIMES; k++) begin
      wr64(20'h2_0000 + 20'(16 * k),     64'(tb_model_pkg::t_start[k]));
      wr64(20'h2_0000 + 20'(16 * k + 8), tb_model_pkg::t_recip[k]);
    end
    for (int e = 0; e < COEF_DEPTH; e++) begin
      wr64(20'h4_0000 + 20'(32 * e),      64'(tb_model_pkg::t_c0[e]));
      wr64(20'h4_0000 + 20'(32 * e + 8),  64'(tb_model_pkg::t_c1[e]));
      wr64(20'h4_0000 + 20'(32 * e + 16), 64'(tb_model_pkg::t_c2[e]));
    end
  endtask

  task automatic load_atom(input int a, input pos3_t p);
    wr(20'h1_0000 + 20'(16 * a),     p.x);
    wr(20'h1_0000 + 20'(16 * a + 4), p.y);
    wr(20'h1_0000 + 20'(16 * a + 8), p.z);
  endtask

  // start, poll STATUS until done, return the cycles polled and the results
  task automatic run(input int n, output logic [51:0] mant, output logic [31:0] e,
                     output logic [74:0] sum, output int polls);
    logic [31:0] s, lo, hi, s2;
    wr(A_NATOMS, 32'(n));
    wr(A_CTRL, 32'd1);
    polls = 0;
    do begin
      rd(A_STATUS, s);
      polls++;
    end while (!s[1] && polls < 100_000_000);
    rd(A_MANT_LO, lo); rd(A_MANT_HI, hi);
    mant = {hi[19:0], lo};
    rd(A_EXP, e);
    rd(A_SUM_0, lo); rd(A_SUM_1, hi); rd(A_SUM_2, s2);
    sum = {s2[10:0], hi, lo};
  endtask
endinterface
