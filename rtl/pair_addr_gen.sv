// pair_addr_gen: address generator of the CalcDist stage.
//
// After start, it walks every unordered pair of the first n_atoms atoms, i
// in the outer loop and j = i+1 .. n_atoms-1 in the inner loop, and issues
// one pair per clock cycle: addr_i and addr_j go to the two Position Memory
// banks while valid is high, and last marks the final pair. A sweep thus
// takes exactly n_atoms*(n_atoms-1)/2 cycles of valid. With fewer than two
// atoms there is no pair: the generator stays idle and pulses empty for one
// cycle so the engine can still finish. start while busy is ignored.
//
// One pair per cycle over all N(N-1)/2 pairs, repeated for every
// configuration, follows the published design; the loop order is this
// design's choice. The outputs come straight from the state registers.
module pair_addr_gen
  import qmc_pkg::*;
#(
  parameter int unsigned N_MAX = N_MAX_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [12:0] n_atoms,
  output logic [11:0] addr_i,
  output logic [11:0] addr_j,
  output logic        valid,
  output logic        last,
  output logic        empty,
  output logic        busy
);
  typedef enum logic {IDLE, RUN} state_t;
  state_t      state;
  logic [11:0] i_q, j_q;
  logic [12:0] n_q;

  assign busy   = (state == RUN);
  assign valid  = busy;
  assign addr_i = i_q;
  assign addr_j = j_q;
  assign last   = busy && (13'(j_q) == n_q - 13'd1) && (13'(i_q) == n_q - 13'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      i_q   <= '0;
      j_q   <= '0;
      n_q   <= '0;
      empty <= 1'b0;
    end else begin
      empty <= 1'b0;
      case (state)
        IDLE: if (start) begin
          n_q <= n_atoms;
          i_q <= 12'd0;
          j_q <= 12'd1;
          if (n_atoms >= 13'd2 && 32'(n_atoms) <= N_MAX) state <= RUN;
          else empty <= 1'b1;
        end
        RUN: begin
          if (last) begin
            state <= IDLE;
          end else if (13'(j_q) == n_q - 13'd1) begin
            i_q <= i_q + 12'd1;
            j_q <= i_q + 12'd2;
          end else begin
            j_q <= j_q + 12'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
