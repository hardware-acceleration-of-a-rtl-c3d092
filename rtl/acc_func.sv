// acc_func: AccFunc, the accumulator at the end of a calculation engine.
//
// Potential-energy mode (IS_WF = 0):
//   region I values (the transformed potential exp(-V), in [0,1]) are
//   multiplied into a running product; region II values (the potential
//   rescaled by -1/epsilon, in [0,1]) are added into a running sum.
// Wavefunction mode (IS_WF = 1): the sum is bypassed and every value goes
//   into the running product.
// The product is kept as a mantissa prod_mant (u0.52) and a shift count
// prod_exp: value = prod_mant * 2^-52 * 2^-prod_exp. After each
// multiplication the product is shifted left until it is at least 1/2 and
// every shift increments prod_exp, so leading zeros never eat the precision.
// A product of exactly zero stays zero. The product starts at the largest
// mantissa (1 - 2^-52) with prod_exp = 0, the sum at zero. The sum is s23.51,
// wide enough for every pair of a 4000-atom system at the maximum value 1.0.
// Negative values (spline overshoot) enter the product as zero.
//
// Interface: clear restarts both accumulators and drops done. A value is
// taken when in_valid is high. in_last marks the end of a configuration:
// done rises the cycle after it (in_last without in_valid ends an empty
// configuration). One value per cycle; the product feedback loop is a
// single-cycle multiply.
//
// The product/sum split, the left shift with an exponent count, the sum
// width rule and the wavefunction bypass follow the published design. Full
// normalisation (rather than at most one shift per product), the initial
// mantissa and the treatment of negative values are this design's choices.
module acc_func
  import qmc_pkg::*;
#(
  parameter bit IS_WF = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic                     in_region2,
  input  coef_t                    value,
  output logic [MANT_W-1:0]        prod_mant,
  output logic [EXP_W-1:0]         prod_exp,
  output logic signed [SUM_W-1:0]  sum,
  output logic                     done
);
  logic [MANT_W-1:0]   factor;
  logic [2*MANT_W-1:0] full;
  logic [MANT_W-1:0]   p;
  logic [5:0]          lz;
  logic [MANT_W-1:0]   p_norm;
  logic                to_sum;

  assign to_sum = !IS_WF && in_region2;
  // s0.51 -> u0.52, negatives as zero
  assign factor = value[C_W-1] ? '0 : {value[C_W-2:0], 1'b0};

  always_comb begin
    full = (2*MANT_W)'(prod_mant) * (2*MANT_W)'(factor);
    p    = full[2*MANT_W-1 -: MANT_W];
    lz   = '0;
    for (int k = 0; k < MANT_W; k++) begin
      if (p[k]) lz = 6'(MANT_W - 1 - k);
    end
    p_norm = p << lz;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      prod_mant <= '1;
      prod_exp  <= '0;
      sum       <= '0;
      done      <= 1'b0;
    end else begin
      if (in_valid) begin
        if (to_sum) begin
          sum <= sum + SUM_W'(value);
        end else begin
          prod_mant <= p_norm;
          prod_exp  <= prod_exp + EXP_W'(lz);
        end
      end
      if (in_last) done <= 1'b1;
    end
  end
endmodule
