// tb_qmc_full: full-size run of the two-board accelerator with every
// parameter at its default: one complete evaluation of a 4000-atom
// configuration (7,998,000 pairs) on both boards, the largest system the
// design holds. Atoms sit on a jittered 16 x 16 x 16 lattice with spacing
// 2.9 (sigma = 2.5). Results are compared with the bit-exact reference model
// and the board must finish 7,998,000 + 54 cycles after its start.
module tb_qmc_full;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  localparam int NATOMS = 4000;
  logic clk = 0, rst = 1;
  opb_host_if h0 (.clk);
  opb_host_if h1 (.clk);
  logic pe_done, wf_done;
  int checks = 0, failures = 0;
  pos3_t atoms [NATOMS];
  longint t_start_cyc, cyc = 0;
  longint pe_cycles = -1;

  qmc_top dut (
    .clk, .rst,
    .opb0_select(h0.select), .opb0_rnw(h0.rnw), .opb0_abus(h0.abus), .opb0_dbus(h0.dbus),
    .opb0_xfer_ack(h0.xfer_ack), .opb0_sl_dbus(h0.sl_dbus), .pe_done,
    .opb1_select(h1.select), .opb1_rnw(h1.rnw), .opb1_abus(h1.abus), .opb1_dbus(h1.dbus),
    .opb1_xfer_ack(h1.xfer_ack), .opb1_sl_dbus(h1.sl_dbus), .wf_done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  // start-to-done time of board 0, seen on its internal start pulse
  always @(posedge clk) begin
    if (dut.u_fpga0_pe.start) t_start_cyc <= cyc;
    if (pe_done && pe_cycles < 0 && dut.u_fpga0_pe.start == 1'b0 && t_start_cyc > 0)
      pe_cycles <= cyc - t_start_cyc;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic expect_board(bit wf, output logic [51:0] m, output longint e,
                              output logic signed [127:0] s);
    m = '1; e = 0; s = 0;
    for (int i = 0; i < NATOMS; i++)
      for (int j = i + 1; j < NATOMS; j++) begin
        int entry;
        r2_t r2 = m_r2(atoms[i], atoms[j]);
        coef_t v = m_eval(r2, entry);
        if (!wf && r2 >= t_sigma2) s += 128'(v);
        else m = m_prod(m, v, e);
      end
  endtask

  initial begin
    logic [51:0] em0, em1, gm0, gm1;
    longint ee0, ee1;
    logic signed [127:0] es0, es1;
    logic [31:0] ge0, ge1;
    logic [74:0] gs0, gs1;
    int polls0, polls1;
    t_start_cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < NATOMS; a++)
      atoms[a] = '{x: pos_t'(int'(((a % 16) * 2.9 + ($urandom_range(600) / 1000.0 - 0.3)) * 1048576.0)),
                   y: pos_t'(int'((((a / 16) % 16) * 2.9 + ($urandom_range(600) / 1000.0 - 0.3)) * 1048576.0)),
                   z: pos_t'(int'(((a / 256) * 2.9 + ($urandom_range(600) / 1000.0 - 0.3)) * 1048576.0))};
    build_tables(1'b0);
    h0.load_tables();
    expect_board(1'b0, em0, ee0, es0);
    build_tables(1'b1);
    h1.load_tables();
    expect_board(1'b1, em1, ee1, es1);
    for (int a = 0; a < NATOMS; a++) fork
      h0.load_atom(a, atoms[a]);
      h1.load_atom(a, atoms[a]);
    join
    fork
      h0.run(NATOMS, gm0, ge0, gs0, polls0);
      h1.run(NATOMS, gm1, ge1, gs1, polls1);
    join
    $display("N=%0d  PE product %h * 2^-%0d, sum %h | WF product %h * 2^-%0d | PE busy %0d cycles",
             NATOMS, gm0, ge0, gs0, gm1, ge1, pe_cycles);
    chk(gm0 == em0 && ge0 == 32'(ee0), $sformatf("PE product %h/%0d expected %h/%0d", gm0, ge0, em0, ee0));
    chk(gs0 == 75'(es0), $sformatf("PE sum %h expected %h", gs0, 75'(es0)));
    chk(gm1 == em1 && ge1 == 32'(ee1), $sformatf("WF product %h/%0d expected %h/%0d", gm1, ge1, em1, ee1));
    chk(gs1 == '0, "WF sum bypassed");
    chk(pe_cycles == longint'(NATOMS) * (NATOMS - 1) / 2 + 54,
        $sformatf("PE run took %0d cycles, expected %0d", pe_cycles, longint'(NATOMS) * (NATOMS - 1) / 2 + 54));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
