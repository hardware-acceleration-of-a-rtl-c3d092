// tb_bin_lookup: self-checking test of the bin locator in both widths.
// Random offsets and reciprocals, exact bin edges and out-of-range inputs
// are compared with the reference model (bin = floor(x*recip), delta = the
// fraction), including saturation to the last bin.
module tb_bin_lookup;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  r2_t x;
  recip_t recip;
  logic [7:0] bin8;
  logic [5:0] bin6;
  delta_t dl8, dl6;
  int checks = 0, failures = 0, n_sat = 0;

  bin_lookup #(.BIN_BITS(8)) dut8 (.x, .recip, .bin(bin8), .delta(dl8));
  bin_lookup #(.BIN_BITS(6)) dut6 (.x, .recip, .bin(bin6), .delta(dl6));

  task automatic check(r2_t xv, recip_t rv);
    int b8, b6;
    delta_t e8, e6;
    x = xv; recip = rv;
    #1;
    m_bin(xv, rv, 8, b8, e8);
    m_bin(xv, rv, 6, b6, e6);
    if (b6 == 63 && e6 == '1) n_sat++;
    checks++;
    if (bin8 !== 8'(b8) || dl8 !== e8 || bin6 !== 6'(b6) || dl6 !== e6) begin
      failures++;
      $display("FAIL x=%h r=%h bin8 %0d/%0d bin6 %0d/%0d", xv, rv, bin8, b8, bin6, b6);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // region I style: sigma^2 = 6.25, recip = 256/6.25
    recip_t r1 = recip_t'(longint'(40.96 * (2.0 ** 40)));
    for (int b = 0; b < 256; b++) check(r2_t'(longint'(b * 6.25 / 256.0 * (2.0 ** 26))), r1);
    for (int k = 0; k < 2000; k++) check(r2_t'($urandom_range(32'h1FFF_FFFF)), r1);
    // exact power-of-two widths
    for (int k = 0; k < 21; k++)
      for (int b = 0; b < 70; b++)
        check(r2_t'(b) << (26 + k), recip_t'(1) << (40 - k));
    for (int k = 0; k < 3000; k++)
      check(r2_t'({$urandom, $urandom}) >> $urandom_range(52), recip_t'({$urandom, $urandom}) >> $urandom_range(63));
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
