// tb_coef_mem: self-checking test of the coefficient memory at its full
// 1600-entry size. Fills every entry's three coefficients with random
// values, reads every entry back and compares with a shadow copy.
module tb_coef_mem;
  import qmc_pkg::*;
  logic clk = 0;
  coef_wr_t wr;
  logic [COEF_AW-1:0] raddr;
  coef3_t rdata;
  int checks = 0, failures = 0;
  coef_t s0 [COEF_DEPTH], s1 [COEF_DEPTH], s2 [COEF_DEPTH];

  coef_mem dut (.clk, .wr, .raddr, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0; raddr = '0;
    @(posedge clk); #1;
    for (int e = 0; e < COEF_DEPTH; e++) begin
      for (int c = 0; c < 3; c++) begin
        automatic coef_t v = coef_t'({$urandom, $urandom});
        wr = '{en: 1'b1, entry: COEF_AW'(e), sel: 2'(c), data: v};
        if (c == 0) s0[e] = v; else if (c == 1) s1[e] = v; else s2[e] = v;
        @(posedge clk); #1;
      end
    end
    wr = '0;
    for (int e = 0; e < COEF_DEPTH; e++) begin
      raddr = COEF_AW'(e);
      @(posedge clk); #1;
      checks++;
      if (rdata.c0 !== s0[e] || rdata.c1 !== s1[e] || rdata.c2 !== s2[e]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d", e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
