// tb_pair_addr_gen: self-checking test of the pair address generator.
// For several atom counts it starts a sweep, records every issued pair and
// compares the sequence with the i<j enumeration computed here, checks that
// one pair is issued in every cycle (N(N-1)/2 consecutive cycles), that last
// marks only the final pair, that a start while busy is ignored and that
// N < 2 ends at once with the empty pulse.
module tb_pair_addr_gen;
  logic clk = 0, rst = 1, start = 0;
  logic [12:0] n_atoms;
  logic [11:0] addr_i, addr_j;
  logic valid, last, empty, busy;
  int checks = 0, failures = 0;

  pair_addr_gen #(.N_MAX(64)) dut (.clk, .rst, .start, .n_atoms, .addr_i, .addr_j,
                                   .valid, .last, .empty, .busy);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic sweep(input int n);
    int ei = 0, ej = 1, cnt = 0, cycles = 0;
    int expected = n * (n - 1) / 2;
    n_atoms = 13'(n);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    if (n < 2) begin
      chk(empty && !busy, $sformatf("n=%0d should end at once", n));
      @(posedge clk); #1;
      chk(!empty, "empty is a single pulse");
      return;
    end
    while (busy) begin
      cycles++;
      chk(valid, "valid while busy");
      chk(addr_i == 12'(ei) && addr_j == 12'(ej),
          $sformatf("n=%0d pair %0d: got (%0d,%0d) exp (%0d,%0d)", n, cnt, addr_i, addr_j, ei, ej));
      cnt++;
      chk(last == (cnt == expected), $sformatf("last at pair %0d of %0d", cnt, expected));
      if (cnt == 3) begin
        start = 1;  // ignored while busy
      end
      @(posedge clk); #1;
      start = 0;
      ej++;
      if (ej == n) begin ei++; ej = ei + 1; end
    end
    chk(cnt == expected, $sformatf("n=%0d: %0d pairs, expected %0d", n, cnt, expected));
    chk(cycles == expected, $sformatf("n=%0d: %0d cycles, expected %0d", n, cycles, expected));
    chk(!valid, "valid drops after the sweep");
  endtask

  initial begin
    n_atoms = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    sweep(5);
    sweep(2);
    sweep(0);
    sweep(1);
    sweep(3);
    sweep(17);
    sweep(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
