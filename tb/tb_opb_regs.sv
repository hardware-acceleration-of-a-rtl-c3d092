// tb_opb_regs: self-checking test of the OPB slave and register map.
// Drives OPB transfers from opb_host_if and checks: the one-cycle
// acknowledge, position/coefficient/regime writes decoded into the right
// memory write port (including low-then-high staging of wide values),
// control-register write and read-back, the start pulse, the status and
// result read paths, and that an address outside the board's range is
// ignored.
module tb_opb_regs;
  import qmc_pkg::*;
  logic clk = 0, rst = 1;
  opb_host_if opb (.clk);
  pos_wr_t pos_wr;
  coef_wr_t coef_wr;
  regime_wr_t regime_wr;
  logic start;
  logic [12:0] n_atoms;
  r2_t sigma2;
  recip_t recip1;
  logic busy = 0, done = 0;
  logic [MANT_W-1:0] prod_mant = '0;
  logic [EXP_W-1:0] prod_exp = '0;
  logic signed [SUM_W-1:0] sum = '0;
  int checks = 0, failures = 0;
  int n_start = 0;
  pos_wr_t    last_pos;
  coef_wr_t   last_coef;
  regime_wr_t last_reg;
  int n_pos = 0, n_coef = 0, n_reg = 0;

  opb_regs dut (.clk, .rst, .opb_select(opb.select), .opb_rnw(opb.rnw), .opb_abus(opb.abus),
                .opb_dbus(opb.dbus), .sl_xfer_ack(opb.xfer_ack), .sl_dbus(opb.sl_dbus),
                .pos_wr, .coef_wr, .regime_wr, .start, .n_atoms, .sigma2, .recip1,
                .busy, .done, .prod_mant, .prod_exp, .sum);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && start) n_start++;
    if (!rst && pos_wr.en) begin last_pos <= pos_wr; n_pos++; end
    if (!rst && coef_wr.en) begin last_coef <= coef_wr; n_coef++; end
    if (!rst && regime_wr.en) begin last_reg <= regime_wr; n_reg++; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // ack timing: select in cycle t -> ack in cycle t+1, for exactly one cycle
    @(negedge clk);
    opb.select = 1; opb.rnw = 1; opb.abus = 32'h8000_0004;
    @(posedge clk); #1;
    chk(opb.xfer_ack, "ack one cycle after select");
    @(posedge clk); #1;
    chk(!opb.xfer_ack, "ack lasts one cycle");
    @(negedge clk); opb.select = 0;
    // control registers
    opb.wr(A_NATOMS, 32'd1234);
    opb.rd(A_NATOMS, d);
    chk(n_atoms == 13'd1234 && d == 32'd1234, "NATOMS");
    opb.wr(A_SIGMA2_LO, 32'hDEAD_BEEF);
    chk(sigma2 == '0, "sigma2 waits for the high word");
    opb.wr(A_SIGMA2_HI, 32'h0012_3456);
    chk(sigma2 == r2_t'({32'h0012_3456, 32'hDEAD_BEEF}), "sigma2 commit");
    opb.wr64(A_RECIP1_LO, 64'h0123_4567_89AB_CDEF);
    opb.rd(A_RECIP1_HI, d);
    chk(recip1 == 64'h0123_4567_89AB_CDEF && d == 32'h0123_4567, "recip1");
    // position write
    opb.wr(20'h1_0000 + 20'(16 * 77 + 8), 32'hCAFE_F00D);
    @(posedge clk); #1;
    chk(n_pos == 1 && last_pos.atom == 12'd77 && last_pos.coord == 2'd2 && last_pos.data == 32'hCAFE_F00D, "position write");
    // coefficient write: entry 1599, c1
    opb.wr64(20'h4_0000 + 20'(32 * 1599 + 8), 64'h000F_EDCB_A987_6543);
    @(posedge clk); #1;
    chk(n_coef == 1 && last_coef.entry == 11'd1599 && last_coef.sel == 2'd1 && last_coef.data == coef_t'(64'h000F_EDCB_A987_6543), "coefficient write");
    // regime write: regime 20, reciprocal
    opb.wr64(20'h2_0000 + 20'(16 * 20 + 8), 64'hFFEE_DDCC_BBAA_9988);
    @(posedge clk); #1;
    chk(n_reg == 1 && last_reg.regime == 5'd20 && last_reg.field && last_reg.data == 64'hFFEE_DDCC_BBAA_9988, "regime write");
    // start
    opb.wr(A_CTRL, 32'd1);
    @(posedge clk); #1;
    chk(n_start == 1, "one start pulse");
    // status and results
    busy = 1; done = 0;
    opb.rd(A_STATUS, d);
    chk(d == 32'd1, "status busy");
    busy = 0; done = 1;
    prod_mant = 52'hA_BCDE_F012_3456; prod_exp = 32'd99; sum = -75'sd5;
    opb.rd(A_STATUS, d);
    chk(d == 32'd2, "status done");
    opb.rd(A_MANT_LO, d); chk(d == 32'hF012_3456, "mant lo");
    opb.rd(A_MANT_HI, d); chk(d == 32'h000A_BCDE, "mant hi");
    opb.rd(A_EXP, d);     chk(d == 32'd99, "exp");
    opb.rd(A_SUM_0, d);   chk(d == 32'hFFFF_FFFB, "sum word 0");
    opb.rd(A_SUM_2, d);   chk(d == 32'hFFFF_FFFF, "sum word 2 sign-extended");
    // foreign address: no acknowledge, no write
    opb.base = 32'h9000_0000;
    opb.wr(A_NATOMS, 32'd5);
    opb.base = 32'h8000_0000;
    @(posedge clk); #1;
    chk(n_atoms == 13'd1234, "other board's address ignored");
    chk(n_pos == 1 && n_coef == 1 && n_reg == 1 && n_start == 1, "no stray writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
