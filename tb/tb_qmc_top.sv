// tb_qmc_top: end-to-end test of the two-board accelerator.
// Acts as the host side of a Variational Monte Carlo run: over each board's
// OPB port it loads the potential-energy tables into board 0 and the
// wavefunction tables into board 1, writes a configuration of NATOMS atoms
// (a jittered lattice plus a few distant atoms) into both, starts both
// boards, polls their status words and reads the results. It then moves one
// atom, as a Monte Carlo trial move does, and evaluates the new
// configuration, and finally runs a one-atom (empty) configuration. Every
// result is compared with the bit-exact reference model. It counts how often
// each mechanism occurred (region I product, region II sum, renormalisation
// in each board, the wavefunction's bypass of the sum, polling while busy,
// empty configuration) and fails any that never did. The number of cycles
// from start to done must be P + 54 for P pairs.
module tb_qmc_top;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  localparam int NATOMS = 24;
  logic clk = 0, rst = 1;
  opb_host_if h0 (.clk);
  opb_host_if h1 (.clk);
  logic pe_done, wf_done;
  int checks = 0, failures = 0;
  pos3_t atoms [NATOMS];
  // mechanism counters
  int n_r1 = 0, n_r2 = 0, n_renorm_pe = 0, n_renorm_wf = 0, n_bypass = 0, n_busy_poll = 0, n_empty = 0, n_move = 0;

  qmc_top dut (
    .clk, .rst,
    .opb0_select(h0.select), .opb0_rnw(h0.rnw), .opb0_abus(h0.abus), .opb0_dbus(h0.dbus),
    .opb0_xfer_ack(h0.xfer_ack), .opb0_sl_dbus(h0.sl_dbus), .pe_done,
    .opb1_select(h1.select), .opb1_rnw(h1.rnw), .opb1_abus(h1.abus), .opb1_dbus(h1.dbus),
    .opb1_xfer_ack(h1.xfer_ack), .opb1_sl_dbus(h1.sl_dbus), .wf_done);

  always #5 clk = ~clk;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic pos_t coord(real v);
    return pos_t'(int'(v * 1048576.0));
  endfunction

  function automatic pos3_t lattice(int a);
    real far = (a % 7 == 6) ? 300.0 + 11.0 * a : 0.0;
    return '{x: coord(far + (a % 3) * 2.9 + ($urandom_range(2000) / 1000.0 - 1.0) * 0.35),
             y: coord(-far + ((a / 3) % 3) * 2.9 + ($urandom_range(2000) / 1000.0 - 1.0) * 0.35),
             z: coord((a / 9) * 2.9 + ($urandom_range(2000) / 1000.0 - 1.0) * 0.35)};
  endfunction

  // expected results of one board for the current tables
  task automatic expect_board(bit wf, int n, output logic [51:0] m, output longint e,
                              output logic signed [127:0] s);
    m = '1; e = 0; s = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        int entry;
        r2_t r2 = m_r2(atoms[i], atoms[j]);
        coef_t v = m_eval(r2, entry);
        longint ep = e;
        if (!wf && r2 >= t_sigma2) s += 128'(v);
        else m = m_prod(m, v, e);
        if (e != ep) begin if (wf) n_renorm_wf++; else n_renorm_pe++; end
        if (!wf) begin if (r2 >= t_sigma2) n_r2++; else n_r1++; end
      end
  endtask

  task automatic evaluate(int n, string what);
    logic [51:0] em0, em1, gm0, gm1;
    longint ee0, ee1;
    logic signed [127:0] es0, es1;
    logic [31:0] ge0, ge1;
    logic [74:0] gs0, gs1;
    int polls0, polls1;
    int t0, t1;
    build_tables(1'b0);
    expect_board(1'b0, n, em0, ee0, es0);
    build_tables(1'b1);
    expect_board(1'b1, n, em1, ee1, es1);
    fork
      h0.run(n, gm0, ge0, gs0, polls0);
      h1.run(n, gm1, ge1, gs1, polls1);
    join
    if (polls0 > 1) n_busy_poll++;
    chk(gm0 == em0 && ge0 == 32'(ee0), $sformatf("%s: PE product %h/%0d expected %h/%0d", what, gm0, ge0, em0, ee0));
    chk(gs0 == 75'(es0), $sformatf("%s: PE sum %h expected %h", what, gs0, 75'(es0)));
    chk(gm1 == em1 && ge1 == 32'(ee1), $sformatf("%s: WF product %h/%0d expected %h/%0d", what, gm1, ge1, em1, ee1));
    chk(gs1 == '0, $sformatf("%s: WF sum must stay zero", what));
    if (gs1 == '0 && n_r2 > 0) n_bypass++;
    $display("%s: N=%0d  PE product %h * 2^-%0d, sum %h | WF product %h * 2^-%0d",
             what, n, gm0, ge0, gs0, gm1, ge1);
  endtask

  // cycle count of one PE run observed on the done output
  task automatic timed_run(int n);
    int cycles = 0;
    logic [31:0] d;
    h0.wr(A_NATOMS, 32'(n));
    h0.wr(A_CTRL, 32'd1);
    // start is registered in the slave one cycle after the CTRL write
    @(posedge clk); #1;
    while (pe_done) begin @(posedge clk); #1; end
    cycles = 1;
    while (!pe_done) begin @(posedge clk); #1; cycles++; end
    chk(cycles == n * (n - 1) / 2 + 54, $sformatf("run took %0d cycles, expected %0d", cycles, n * (n - 1) / 2 + 54));
    h0.rd(A_STATUS, d);
    chk(d[1:0] == 2'b10, $sformatf("status reads done and not busy: %h", d));
  endtask

  initial begin
    h1.base = 32'h8000_0000;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < NATOMS; a++) atoms[a] = lattice(a);
    build_tables(1'b0);
    h0.load_tables();
    build_tables(1'b1);
    h1.load_tables();
    for (int a = 0; a < NATOMS; a++) fork
      h0.load_atom(a, atoms[a]);
      h1.load_atom(a, atoms[a]);
    join
    evaluate(NATOMS, "configuration R");
    // trial move of atom 4
    atoms[4].x = atoms[4].x + pos_t'(32'sd300000);
    atoms[4].z = atoms[4].z - pos_t'(32'sd150000);
    fork
      h0.load_atom(4, atoms[4]);
      h1.load_atom(4, atoms[4]);
    join
    n_move++;
    evaluate(NATOMS, "configuration R'");
    timed_run(NATOMS);
    evaluate(1, "single atom");
    n_empty++;
    $display("mechanisms: regionI=%0d regionII=%0d renormPE=%0d renormWF=%0d bypass=%0d busy_polls=%0d empty=%0d moves=%0d",
             n_r1, n_r2, n_renorm_pe, n_renorm_wf, n_bypass, n_busy_poll, n_empty, n_move);
    chk(n_r1 > 0, "region I product used");
    chk(n_r2 > 0, "region II sum used");
    chk(n_renorm_pe > 0, "PE renormalisation");
    chk(n_renorm_wf > 0, "WF renormalisation");
    chk(n_bypass > 0, "WF bypass of the sum");
    chk(n_busy_poll > 0, "status polled while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
