// tb_calc_func: self-checking test of the CalcFunc pipeline at its default
// 49-cycle latency.
// The coefficient and regime-constant memories are modelled here as arrays
// with a one-cycle registered read, loaded with the Lennard-Jones test
// tables. Random squared distances in region I and in every region II regime
// are streamed one per cycle with random gaps; each output is compared with
// the reference model and must appear exactly 49 cycles after its input.
module tb_calc_func;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0, in_region2 = 0;
  r2_t r2;
  logic [REGIME_BITS-1:0] reg_raddr;
  r2_t reg_start;
  recip_t reg_recip;
  logic [COEF_AW-1:0] coef_raddr;
  coef3_t coef_rdata;
  logic out_valid, out_last, out_region2;
  coef_t value;
  int checks = 0, failures = 0, cyc = 0;
  int regime_seen [R2_REGIMES];
  int n_r1 = 0;

  typedef struct { coef_t v; bit reg2; bit last; int t; } exp_t;
  exp_t q [$];

  calc_func dut (.clk, .rst, .in_valid, .in_last, .in_region2, .r2, .sigma2(t_sigma2),
                 .recip1(t_recip1), .reg_raddr, .reg_start, .reg_recip, .coef_raddr,
                 .coef_rdata, .out_valid, .out_last, .out_region2, .value);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    reg_start  <= t_start[reg_raddr];
    reg_recip  <= t_recip[reg_raddr];
    coef_rdata <= '{c0: t_c0[coef_raddr], c1: t_c1[coef_raddr], c2: t_c2[coef_raddr]};
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (value !== e.v || out_region2 !== e.reg2 || out_last !== e.last || cyc - e.t != 49) begin
          failures++;
          if (failures < 10)
            $display("FAIL value %h exp %h reg %b last %b latency %0d", value, e.v, out_region2, out_last, cyc - e.t);
        end
      end
    end
  end

  initial begin
    build_tables(1'b0);
    r2 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 6000; k++) begin
      r2_t v;
      int entry;
      if (k % 3 == 0) v = r2_t'($urandom_range(32'h7FFF_FFFF)) % t_sigma2;
      else v = t_sigma2 + (r2_t'({$urandom, $urandom}) >> $urandom_range(40, 0));
      @(negedge clk);
      in_valid   = (k == 5999) || ($urandom_range(5) != 0);
      in_last    = (k == 5999);
      r2         = v;
      in_region2 = (v >= t_sigma2);
      if (in_valid) begin
        automatic coef_t m = m_eval(v, entry);
        q.push_back('{v: m, reg2: in_region2, last: in_last, t: cyc});
        if (entry >= 256) regime_seen[(entry - 256) / 64]++; else n_r1++;
      end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    checks++;
    if (n_r1 == 0) begin failures++; $display("FAIL no region I input"); end
    for (int k = 0; k < R2_REGIMES; k++) begin
      checks++;
      if (regime_seen[k] == 0) begin failures++; $display("FAIL regime %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
