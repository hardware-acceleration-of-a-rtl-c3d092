// tb_regime_mem: self-checking test of the regime-constant memory. Writes a
// start and a reciprocal for each of the 21 regimes and reads them back.
module tb_regime_mem;
  import qmc_pkg::*;
  logic clk = 0;
  regime_wr_t wr;
  logic [REGIME_BITS-1:0] raddr;
  r2_t start;
  recip_t recip;
  int checks = 0, failures = 0;
  r2_t ss [R2_REGIMES];
  recip_t sr [R2_REGIMES];

  regime_mem dut (.clk, .wr, .raddr, .start, .recip);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0; raddr = '0;
    @(posedge clk); #1;
    for (int r = 0; r < R2_REGIMES; r++) begin
      ss[r] = r2_t'({$urandom, $urandom});
      sr[r] = {$urandom, $urandom};
      wr = '{en: 1'b1, regime: 5'(r), field: 1'b0, data: 64'(ss[r])};
      @(posedge clk); #1;
      wr = '{en: 1'b1, regime: 5'(r), field: 1'b1, data: sr[r]};
      @(posedge clk); #1;
    end
    wr = '0;
    for (int k = 0; k < 3 * R2_REGIMES; k++) begin
      automatic int r = k % R2_REGIMES;
      raddr = 5'(r);
      @(posedge clk); #1;
      checks++;
      if (start !== ss[r] || recip !== sr[r]) begin
        failures++;
        $display("FAIL regime %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
