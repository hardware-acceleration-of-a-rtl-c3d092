// tb_lzcd: self-checking test of the leading zero count detector.
// Every single-bit input, every input with a random tail below its leading
// one, zero, all ones and random words are compared with a leading-one search
// and the regime rule written here.
module tb_lzcd;
  import qmc_pkg::*;
  r2_t d;
  logic [REGIME_BITS-1:0] regime;
  logic [5:0] msb;
  logic zero;
  int checks = 0, failures = 0;

  lzcd dut (.d, .regime, .msb, .zero);

  task automatic check(r2_t v);
    int m = -1;
    int er;
    d = v;
    #1;
    for (int k = 0; k < 53; k++) if (v[k]) m = k;
    er = (m > 32) ? m - 32 : 0;
    checks++;
    if (zero !== (m < 0) || (m >= 0 && msb !== 6'(m)) || regime !== 5'(er)) begin
      failures++;
      $display("FAIL d=%h msb %0d exp %0d regime %0d exp %0d zero %b", v, msb, m, regime, er, zero);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int b = 0; b < 53; b++) begin
      automatic r2_t one = r2_t'(1) << b;
      check(one);
      check(one | (r2_t'({$urandom, $urandom}) & (one - 1)));
    end
    for (int k = 0; k < 2000; k++) check(r2_t'({$urandom, $urandom}) >> $urandom_range(52));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
