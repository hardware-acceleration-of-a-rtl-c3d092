// tb_vmc_run: a Variational Monte Carlo run on the two-board accelerator,
// reduced in size: NATOMS atoms, ITER trial moves.
// The testbench plays the host program. It loads both boards once, then for
// every iteration it displaces one randomly chosen atom by a small random
// step, rewrites that atom on both boards, evaluates potential energy and
// wavefunction in hardware, and accepts or rejects the move from the ratio
// p = |psi(R')| / |psi(R)|: accepted when p >= 1, otherwise rejected and the
// old position written back. Every hardware result is compared with the
// bit-exact reference model; the host's reconstruction of the energy,
// V = -ln(m 2^-52) + e ln 2 - sum 2^-51, is printed per iteration. Both an
// accepted and a rejected move must occur.
module tb_vmc_run;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  localparam int NATOMS = 48;
  localparam int ITER   = 100;
  logic clk = 0, rst = 1;
  opb_host_if h0 (.clk);
  opb_host_if h1 (.clk);
  logic pe_done, wf_done;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;
  pos3_t atoms [NATOMS];
  // model tables for both boards, kept side by side
  coef_t pc0 [COEF_DEPTH], pc1 [COEF_DEPTH], pc2 [COEF_DEPTH];
  coef_t wc0 [COEF_DEPTH], wc1 [COEF_DEPTH], wc2 [COEF_DEPTH];

  qmc_top dut (
    .clk, .rst,
    .opb0_select(h0.select), .opb0_rnw(h0.rnw), .opb0_abus(h0.abus), .opb0_dbus(h0.dbus),
    .opb0_xfer_ack(h0.xfer_ack), .opb0_sl_dbus(h0.sl_dbus), .pe_done,
    .opb1_select(h1.select), .opb1_rnw(h1.rnw), .opb1_abus(h1.abus), .opb1_dbus(h1.dbus),
    .opb1_xfer_ack(h1.xfer_ack), .opb1_sl_dbus(h1.sl_dbus), .wf_done);

  always #5 clk = ~clk;
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic void use_tables(bit wf);
    for (int e = 0; e < COEF_DEPTH; e++) begin
      t_c0[e] = wf ? wc0[e] : pc0[e];
      t_c1[e] = wf ? wc1[e] : pc1[e];
      t_c2[e] = wf ? wc2[e] : pc2[e];
    end
  endfunction

  task automatic expect_board(bit wf, output logic [51:0] m, output longint e,
                              output logic signed [127:0] s);
    use_tables(wf);
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

  // evaluate the current configuration; returns ln|psi| and V
  task automatic evaluate(int it, output real ln_psi, output real v);
    logic [51:0] em0, em1, gm0, gm1;
    longint ee0, ee1;
    logic signed [127:0] es0, es1;
    logic [31:0] ge0, ge1;
    logic [74:0] gs0, gs1;
    int p0, p1;
    expect_board(1'b0, em0, ee0, es0);
    expect_board(1'b1, em1, ee1, es1);
    fork
      h0.run(NATOMS, gm0, ge0, gs0, p0);
      h1.run(NATOMS, gm1, ge1, gs1, p1);
    join
    chk(gm0 == em0 && ge0 == 32'(ee0) && gs0 == 75'(es0), $sformatf("iteration %0d: potential-energy board", it));
    chk(gm1 == em1 && ge1 == 32'(ee1) && gs1 == '0, $sformatf("iteration %0d: wavefunction board", it));
    ln_psi = $ln(real'(gm1) / (2.0 ** 52)) - real'(ge1) * $ln(2.0);
    v = -$ln(real'(gm0) / (2.0 ** 52)) + real'(ge0) * $ln(2.0)
        - EPS * real'($signed(gs0)) / (2.0 ** 51);
  endtask

  task automatic write_atom(int a);
    fork
      h0.load_atom(a, atoms[a]);
      h1.load_atom(a, atoms[a]);
    join
  endtask

  initial begin
    real ln_psi, v, ln_psi_new, v_new, v_sum;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    build_tables(1'b1);
    h1.load_tables();
    wc0 = t_c0; wc1 = t_c1; wc2 = t_c2;
    build_tables(1'b0);
    h0.load_tables();
    pc0 = t_c0; pc1 = t_c1; pc2 = t_c2;
    // reference configuration: jittered 4 x 4 x 3 lattice, spacing 2.9
    for (int a = 0; a < NATOMS; a++) begin
      atoms[a] = '{x: pos_t'(int'(((a % 4) * 2.9 + ($urandom_range(400) / 1000.0 - 0.2)) * 1048576.0)),
                   y: pos_t'(int'((((a / 4) % 4) * 2.9 + ($urandom_range(400) / 1000.0 - 0.2)) * 1048576.0)),
                   z: pos_t'(int'(((a / 16) * 2.9 + ($urandom_range(400) / 1000.0 - 0.2)) * 1048576.0))};
      write_atom(a);
    end
    evaluate(0, ln_psi, v);
    v_sum = 0.0;
    for (int it = 1; it <= ITER; it++) begin
      automatic int a = int'($urandom_range(NATOMS - 1));
      automatic pos3_t old = atoms[a];
      // displacement of up to +-0.25 in each coordinate
      atoms[a].x = old.x + pos_t'(int'($urandom_range(524288)) - 262144);
      atoms[a].y = old.y + pos_t'(int'($urandom_range(524288)) - 262144);
      atoms[a].z = old.z + pos_t'(int'($urandom_range(524288)) - 262144);
      write_atom(a);
      evaluate(it, ln_psi_new, v_new);
      if (ln_psi_new >= ln_psi) begin
        n_acc++;
        ln_psi = ln_psi_new;
        v = v_new;
      end else begin
        n_rej++;
        atoms[a] = old;
        write_atom(a);
      end
      v_sum += v;
      if (it % 20 == 0)
        $display("iteration %0d: V = %f, ln|psi| = %f, accepted %0d, rejected %0d", it, v, ln_psi, n_acc, n_rej);
    end
    $display("mean potential energy over %0d iterations: %f", ITER, v_sum / ITER);
    chk(n_acc > 0, "some moves accepted");
    chk(n_rej > 0, "some moves rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
