// tb_calc_dist: self-checking test of the CalcDist datapath.
// Streams random atom pairs (close pairs, spread pairs and extreme pairs at
// opposite corners of the coordinate range, the largest possible r^2) one per cycle, with gaps, and compares each
// r^2 and region flag with the reference model. Checks the three-cycle
// latency of every result and the last flag.
module tb_calc_dist;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0;
  pos3_t pi, pj;
  r2_t sigma2;
  logic out_valid, out_last, out_region2;
  r2_t r2;
  int checks = 0, failures = 0, cyc = 0, n_far = 0, n_r1 = 0, n_r2 = 0;

  typedef struct { r2_t r2; bit reg2; bit last; int t; } exp_t;
  exp_t q [$];

  calc_dist dut (.clk, .rst, .in_valid, .in_last, .pi, .pj, .sigma2,
                 .out_valid, .out_last, .out_region2, .r2);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pos_t rnd_pos(int kind);
    case (kind)
      0: return pos_t'($urandom_range(32'h0040_0000) - 32'h0020_0000);  // |x| < 2
      1: return pos_t'($urandom);                                        // anywhere
      default: return ($urandom_range(1) == 1) ? pos_t'(32'h7FFF_FFFF) : pos_t'(32'h8000_0000);
    endcase
  endfunction

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (r2 !== e.r2 || out_region2 !== e.reg2 || out_last !== e.last || cyc - e.t != 3) begin
          failures++;
          $display("FAIL r2 %h exp %h reg %b exp %b last %b exp %b lat %0d",
                   r2, e.r2, out_region2, e.reg2, out_last, e.last, cyc - e.t);
        end
        if (e.r2 >= (r2_t'(3) << 49)) n_far++;
        if (e.reg2) n_r2++; else n_r1++;
      end
    end
  end

  initial begin
    sigma2 = r2_t'(53'd6 << 26);  // 6.0
    pi = '0; pj = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      automatic int kind = (k % 50 == 0) ? 2 : int'($urandom_range(1));
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      in_last  = (k == 2999);
      if (k == 2999) in_valid = 1;
      pi = '{x: rnd_pos(kind), y: rnd_pos(kind), z: rnd_pos(kind)};
      pj = '{x: rnd_pos(kind), y: rnd_pos(kind), z: rnd_pos(kind)};
      if (kind == 2) pj = '{x: ~pi.x, y: ~pi.y, z: ~pi.z};
      if (in_valid) begin
        automatic r2_t m = m_r2(pi, pj);
        q.push_back('{r2: m, reg2: m >= sigma2, last: in_last, t: cyc});
      end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_far == 0 || n_r1 == 0 || n_r2 == 0) begin
      failures++;
      $display("FAIL left %0d, far pairs %0d, region I %0d, region II %0d", q.size(), n_far, n_r1, n_r2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
