// calc_engine: one potential-energy (PE) or wavefunction (WF) calculation
// engine.
//
// A pipeline that consumes one atom pair per clock cycle:
//   pair_addr_gen -> two position_mem banks -> calc_dist -> calc_func
//   -> acc_func
// The address generator walks all N(N-1)/2 pairs; the two Position Memory
// banks, written together by the host, deliver atom i and atom j in the same
// cycle; CalcDist forms r^2 and its region; CalcFunc interpolates the
// (transformed) function; AccFunc builds the running product and sum.
// The coefficient and regime-constant memories sit outside the engine and
// are reached through their read ports.
//
// Control: a start pulse while idle clears the accumulators and begins a
// sweep over the first n_atoms atoms; busy stays high until AccFunc has taken
// the last pair and done rises. sigma2, recip1, the memories and n_atoms must
// not change while busy. Timing: the first value reaches AccFunc
// 1 + 3 + 49 = 53 cycles after the first pair is issued, and a sweep of P
// pairs takes P + 54 cycles from start to done.
//
// The chain of modules and one-pair-per-cycle operation follow the
// published design; the start/busy/done handshake is this design's own.
module calc_engine
  import qmc_pkg::*;
#(
  parameter bit          IS_WF    = 1'b0,
  parameter int unsigned N_MAX    = N_MAX_DEF,
  parameter int unsigned FUNC_LAT = CALCFUNC_LATENCY
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [12:0]             n_atoms,
  input  r2_t                     sigma2,
  input  recip_t                  recip1,
  input  pos_wr_t                 pos_wr,
  output logic [REGIME_BITS-1:0]  reg_raddr,
  input  r2_t                     reg_start,
  input  recip_t                  reg_recip,
  output logic [COEF_AW-1:0]      coef_raddr,
  input  coef3_t                  coef_rdata,
  output logic                    busy,
  output logic                    done,
  output logic [MANT_W-1:0]       prod_mant,
  output logic [EXP_W-1:0]        prod_exp,
  output logic signed [SUM_W-1:0] sum
);
  logic        go;
  logic [11:0] addr_i, addr_j;
  logic        g_valid, g_last, g_empty, g_busy;
  logic        m_valid, m_last;
  pos3_t       pos_i, pos_j;
  logic        d_valid, d_last, d_region2;
  r2_t         r2;
  logic        f_valid, f_last, f_region2;
  coef_t       f_value;

  assign go = start && !busy;

  // busy drops in the same cycle done rises, so status never shows both
  logic run_q;
  always_ff @(posedge clk) begin
    if (rst)       run_q <= 1'b0;
    else if (go)   run_q <= 1'b1;
    else if (done) run_q <= 1'b0;
  end
  assign busy = run_q && !done;

  // the pair generator only runs inside an accepted start/done window, and
  // the memory-read stage never holds a pair while the engine is idle
  a_gen_in_run: assert property (@(posedge clk) disable iff (rst) g_busy |-> run_q);
  a_no_stray:   assert property (@(posedge clk) disable iff (rst) m_valid |-> run_q);

  pair_addr_gen #(.N_MAX(N_MAX)) u_gen (
    .clk, .rst, .start(go), .n_atoms,
    .addr_i, .addr_j, .valid(g_valid), .last(g_last), .empty(g_empty), .busy(g_busy)
  );

  position_mem #(.DEPTH(N_MAX)) u_pos_i (.clk, .wr(pos_wr), .raddr(addr_i), .rdata(pos_i));
  position_mem #(.DEPTH(N_MAX)) u_pos_j (.clk, .wr(pos_wr), .raddr(addr_j), .rdata(pos_j));

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
    end else begin
      m_valid <= g_valid;
      m_last  <= g_last;
    end
  end

  calc_dist u_dist (
    .clk, .rst, .in_valid(m_valid), .in_last(m_last), .pi(pos_i), .pj(pos_j), .sigma2,
    .out_valid(d_valid), .out_last(d_last), .out_region2(d_region2), .r2
  );

  calc_func #(.LATENCY(FUNC_LAT)) u_func (
    .clk, .rst, .in_valid(d_valid), .in_last(d_last), .in_region2(d_region2), .r2,
    .sigma2, .recip1, .reg_raddr, .reg_start, .reg_recip, .coef_raddr, .coef_rdata,
    .out_valid(f_valid), .out_last(f_last), .out_region2(f_region2), .value(f_value)
  );

  acc_func #(.IS_WF(IS_WF)) u_acc (
    .clk, .rst, .clear(go), .in_valid(f_valid), .in_last(f_last || g_empty),
    .in_region2(f_region2), .value(f_value), .prod_mant, .prod_exp, .sum, .done
  );
endmodule
