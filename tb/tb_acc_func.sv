// tb_acc_func: self-checking test of AccFunc in both modes.
// Two instances, potential-energy (IS_WF = 0) and wavefunction (IS_WF = 1),
// receive the same random streams of values and region flags: values near
// one, tiny values that force multi-bit renormalisation, zeros and negative
// values. The product mantissa, shift count and sum are compared with the
// reference model; the wavefunction instance must leave its sum at zero and
// multiply every value. Also checks clear, done timing and an empty
// configuration (in_last without data).
module tb_acc_func;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst = 1, clear = 0, in_valid = 0, in_last = 0, in_region2 = 0;
  coef_t value;
  logic [MANT_W-1:0] pm0, pm1;
  logic [EXP_W-1:0] pe0, pe1;
  logic signed [SUM_W-1:0] s0, s1;
  logic d0, d1;
  int checks = 0, failures = 0, n_multi = 0;

  acc_func #(.IS_WF(1'b0)) dut_pe (.clk, .rst, .clear, .in_valid, .in_last, .in_region2, .value,
                                   .prod_mant(pm0), .prod_exp(pe0), .sum(s0), .done(d0));
  acc_func #(.IS_WF(1'b1)) dut_wf (.clk, .rst, .clear, .in_valid, .in_last, .in_region2, .value,
                                   .prod_mant(pm1), .prod_exp(pe1), .sum(s1), .done(d1));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic run(int n);
    logic [51:0] em0 = '1, em1 = '1;
    longint ee0 = 0, ee1 = 0;
    logic signed [127:0] es = 0;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(!d0 && !d1, "done cleared");
    chk(pm0 == '1 && pe0 == 0 && s0 == 0, "initial state");
    for (int k = 0; k < n; k++) begin
      int kind = int'($urandom_range(9));
      coef_t v;
      longint e_prev;
      case (kind)
        0: v = '0;
        1: v = coef_t'(-$signed(64'($urandom_range(1000))));
        2, 3: v = coef_t'(64'($urandom) >> $urandom_range(31, 0));        // tiny
        default: v = coef_t'((64'(1) << 51) - 64'($urandom));              // close to 1
      endcase
      in_valid   = ($urandom_range(3) != 0);
      in_region2 = $urandom_range(1);
      in_last    = (k == n - 1);
      value      = v;
      if (in_valid) begin
        if (in_region2) es = es + 128'(v);
        else em0 = m_prod(em0, v, ee0);
        e_prev = ee1;
        em1 = m_prod(em1, v, ee1);
        if (ee1 - e_prev > 1) n_multi++;
      end
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    chk(d0 && d1, "done one cycle after last");
    chk(pm0 == em0 && pe0 == EXP_W'(ee0), $sformatf("PE product %h/%0d exp %h/%0d", pm0, pe0, em0, ee0));
    chk(s0 == SUM_W'(es), $sformatf("PE sum %h exp %h", s0, SUM_W'(es)));
    chk(pm1 == em1 && pe1 == EXP_W'(ee1), $sformatf("WF product %h/%0d exp %h/%0d", pm1, pe1, em1, ee1));
    chk(s1 == 0, "WF sum bypassed");
  endtask

  initial begin
    value = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(1);
    run(40);
    run(500);
    run(3000);
    // empty configuration
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; in_last = 1;
    @(negedge clk); in_last = 0;
    chk(d0 && pm0 == '1 && s0 == 0, "empty configuration ends with the initial values");
    chk(n_multi > 0, "multi-bit renormalisation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
