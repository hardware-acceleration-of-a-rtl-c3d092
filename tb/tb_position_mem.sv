// tb_position_mem: self-checking test of one Position Memory bank.
// Writes random coordinates to every atom of a small memory one coordinate
// at a time, reads them back through the engine port and compares with a
// shadow copy kept by the testbench; also checks the one-cycle read latency
// and that a write to one coordinate leaves the other two untouched.
module tb_position_mem;
  import qmc_pkg::*;
  localparam int unsigned DEPTH = 64;
  logic clk = 0;
  pos_wr_t wr;
  logic [11:0] raddr;
  pos3_t rdata;
  int checks = 0, failures = 0;
  pos_t sx [DEPTH], sy [DEPTH], sz [DEPTH];

  position_mem #(.DEPTH(DEPTH)) dut (.clk, .wr, .raddr, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a);
    raddr = 12'(a);
    @(posedge clk); #1;
    checks++;
    if (rdata.x !== sx[a] || rdata.y !== sy[a] || rdata.z !== sz[a]) begin
      failures++;
      $display("FAIL atom %0d got %h %h %h exp %h %h %h", a, rdata.x, rdata.y, rdata.z, sx[a], sy[a], sz[a]);
    end
  endtask

  initial begin
    wr = '0; raddr = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      for (int c = 0; c < 3; c++) begin
        automatic pos_t v = pos_t'($urandom);
        wr = '{en: 1'b1, atom: 12'(a), coord: 2'(c), data: v};
        if (c == 0) sx[a] = v; else if (c == 1) sy[a] = v; else sz[a] = v;
        @(posedge clk); #1;
      end
    end
    wr = '0;
    for (int a = 0; a < DEPTH; a++) check(a);
    // overwrite only y of atom 5
    wr = '{en: 1'b1, atom: 12'd5, coord: 2'd1, data: 32'h1234_5678};
    sy[5] = 32'h1234_5678;
    @(posedge clk); #1;
    wr = '0;
    check(5);
    for (int k = 0; k < 200; k++) check(int'($urandom_range(DEPTH-1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
