// tb_calc_engine: self-checking test of the PE and WF calculation engines.
// Two engines (potential energy and wavefunction mode) are loaded with the
// same atoms and the Lennard-Jones test tables (memories modelled here with
// a one-cycle read). For several system sizes the testbench starts both,
// counts the cycles to done and compares product mantissa, shift count and
// sum with the reference model summed over all pairs. Checks that a sweep of
// P pairs takes P + 54 cycles, and that region I, region II and
// renormalisation all occur.
module tb_calc_engine;
  import qmc_pkg::*;
  import tb_model_pkg::*;
  localparam int unsigned NM = 64;
  logic clk = 0, rst = 1, start = 0;
  logic [12:0] n_atoms;
  pos_wr_t pos_wr;
  logic [REGIME_BITS-1:0] ra0, ra1;
  r2_t rs0, rs1;
  recip_t rr0, rr1;
  logic [COEF_AW-1:0] ca0, ca1;
  coef3_t cd0, cd1;
  logic busy0, busy1, done0, done1;
  logic [MANT_W-1:0] pm0, pm1;
  logic [EXP_W-1:0] pe0, pe1;
  logic signed [SUM_W-1:0] s0, s1;
  int checks = 0, failures = 0;
  int n_r1 = 0, n_r2 = 0, n_renorm = 0;
  pos3_t atoms [NM];

  calc_engine #(.IS_WF(1'b0), .N_MAX(NM)) dut_pe (
    .clk, .rst, .start, .n_atoms, .sigma2(t_sigma2), .recip1(t_recip1), .pos_wr,
    .reg_raddr(ra0), .reg_start(rs0), .reg_recip(rr0), .coef_raddr(ca0), .coef_rdata(cd0),
    .busy(busy0), .done(done0), .prod_mant(pm0), .prod_exp(pe0), .sum(s0));
  calc_engine #(.IS_WF(1'b1), .N_MAX(NM)) dut_wf (
    .clk, .rst, .start, .n_atoms, .sigma2(t_sigma2), .recip1(t_recip1), .pos_wr,
    .reg_raddr(ra1), .reg_start(rs1), .reg_recip(rr1), .coef_raddr(ca1), .coef_rdata(cd1),
    .busy(busy1), .done(done1), .prod_mant(pm1), .prod_exp(pe1), .sum(s1));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    rs0 <= t_start[ra0]; rr0 <= t_recip[ra0];
    rs1 <= t_start[ra1]; rr1 <= t_recip[ra1];
    cd0 <= '{c0: t_c0[ca0], c1: t_c1[ca0], c2: t_c2[ca0]};
    cd1 <= '{c0: t_c0[ca1], c1: t_c1[ca1], c2: t_c2[ca1]};
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // jittered cubic lattice (4 x 4 x n), a few atoms far away
  task automatic place(real spacing, real jitter);
    for (int a = 0; a < NM; a++) begin
      real far = (a % 9 == 8) ? 700.0 + 3.0 * a : 0.0;
      atoms[a] = '{x: coord(far + (a % 4) * spacing + ($urandom_range(2000) / 1000.0 - 1.0) * jitter),
                   y: coord(-far + ((a / 4) % 4) * spacing + ($urandom_range(2000) / 1000.0 - 1.0) * jitter),
                   z: coord((a / 16) * spacing + ($urandom_range(2000) / 1000.0 - 1.0) * jitter)};
    for (int c = 0; c < 3; c++) begin
        @(negedge clk);
        pos_wr = '{en: 1'b1, atom: 12'(a), coord: 2'(c),
                   data: (c == 0) ? atoms[a].x : (c == 1) ? atoms[a].y : atoms[a].z};
      end
    end
    @(negedge clk);
    pos_wr = '0;
  endtask

  task automatic sweep(int n);
    logic [51:0] m0 = '1, m1 = '1;
    longint e0 = 0, e1 = 0;
    logic signed [127:0] es = 0;
    int cycles = 0;
    int p = n * (n - 1) / 2;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        int entry;
        r2_t r2 = m_r2(atoms[i], atoms[j]);
        coef_t v = m_eval(r2, entry);
        longint eprev = e1;
        if (r2 >= t_sigma2) begin es += 128'(v); n_r2++; end
        else begin m0 = m_prod(m0, v, e0); n_r1++; end
        m1 = m_prod(m1, v, e1);
        if (e1 != eprev) n_renorm++;
      end
    @(negedge clk);
    n_atoms = 13'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!(done0 && done1)) begin
      @(negedge clk);
      cycles++;
    end
    if (n >= 2) chk(cycles == p + 54, $sformatf("n=%0d: %0d cycles, expected %0d", n, cycles, p + 54));
    else chk(cycles <= 3, $sformatf("n=%0d: empty run took %0d cycles", n, cycles));
    @(negedge clk);
    chk(!busy0 && !busy1, "busy drops after done");
    chk(pm0 == m0 && pe0 == EXP_W'(e0), $sformatf("n=%0d PE product %h/%0d exp %h/%0d", n, pm0, pe0, m0, e0));
    chk(s0 == SUM_W'(es), $sformatf("n=%0d PE sum %h exp %h", n, s0, SUM_W'(es)));
    chk(pm1 == m1 && pe1 == EXP_W'(e1), $sformatf("n=%0d WF product %h/%0d exp %h/%0d", n, pm1, pe1, m1, e1));
    chk(s1 == 0, "WF sum stays zero");
    $display("n=%0d PE mant %h exp %0d sum %h, WF mant %h exp %0d", n, pm0, pe0, s0, pm1, pe1);
  endtask

  initial begin
    build_tables(1'b0);
    pos_wr = '0; n_atoms = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    place(2.7, 0.3);
    sweep(2);
    sweep(10);
    sweep(1);
    sweep(NM);
    place(3.5, 0.6);
    sweep(40);
    chk(n_r1 > 0 && n_r2 > 0 && n_renorm > 0,
        $sformatf("coverage: region I %0d, region II %0d, renormalisations %0d", n_r1, n_r2, n_renorm));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
