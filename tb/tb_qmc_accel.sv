// tb_qmc_accel: self-checking test of one accelerator board in wavefunction
// mode (IS_WF = 1), driven only through its OPB port.
// Loads the wavefunction tables and 16 atoms, runs two configurations (the
// second after moving an atom), polls the status and compares the product
// mantissa and shift count with the reference model; the sum must remain
// zero because the wavefunction bypasses the sum accumulator. Also checks
// that a start written while the board is busy does not restart it.
module tb_qmc_accel;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  localparam int NATOMS = 16;
  logic clk = 0, rst = 1;
  opb_host_if h (.clk);
  logic done;
  int checks = 0, failures = 0;
  pos3_t atoms [NATOMS];

  qmc_accel #(.IS_WF(1'b1), .N_MAX(32)) dut (
    .clk, .rst, .opb_select(h.select), .opb_rnw(h.rnw), .opb_abus(h.abus), .opb_dbus(h.dbus),
    .sl_xfer_ack(h.xfer_ack), .sl_dbus(h.sl_dbus), .done);

  always #5 clk = ~clk;
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic check_run(string what);
    logic [51:0] em = '1, gm;
    longint ee = 0;
    logic [31:0] ge;
    logic [74:0] gs;
    int polls;
    for (int i = 0; i < NATOMS; i++)
      for (int j = i + 1; j < NATOMS; j++) begin
        int entry;
        em = m_prod(em, m_eval(m_r2(atoms[i], atoms[j]), entry), ee);
      end
    h.run(NATOMS, gm, ge, gs, polls);
    chk(gm == em && ge == 32'(ee), $sformatf("%s: product %h/%0d expected %h/%0d", what, gm, ge, em, ee));
    chk(gs == '0, $sformatf("%s: sum bypassed", what));
    chk(polls > 1, $sformatf("%s: board was busy while polled", what));
  endtask

  initial begin
    logic [31:0] s;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    build_tables(1'b1);
    h.load_tables();
    for (int a = 0; a < NATOMS; a++) begin
      atoms[a] = '{x: pos_t'(int'(((a % 4) * 3.1 + $urandom_range(600) / 1000.0) * 1048576.0)),
                   y: pos_t'(int'(((a / 4) * 3.1 + $urandom_range(600) / 1000.0) * 1048576.0)),
                   z: pos_t'(int'(($urandom_range(600) / 1000.0) * 1048576.0))};
      h.load_atom(a, atoms[a]);
    end
    check_run("first configuration");
    atoms[7].y = atoms[7].y + pos_t'(32'sd200000);
    h.load_atom(7, atoms[7]);
    // a second start while busy must be ignored
    h.wr(A_CTRL, 32'd1);
    h.wr(A_CTRL, 32'd1);
    h.rd(A_STATUS, s);
    chk(s[0] == 1'b1, "busy after start");
    while (!done) @(posedge clk);
    check_run("after the move");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
