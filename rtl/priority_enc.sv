// priority_enc: finds the most significant set bit of a W-bit slice.
//
// Purely combinational. any is high when at least one bit is set; idx is the
// position of the highest set bit (0 when none is set). Three of these, one
// per slice of the word, form the leading-zero count detector (lzcd).
module priority_enc #(
  parameter int unsigned W  = 18,
  parameter int unsigned IW = $clog2(W)
) (
  input  logic [W-1:0]  in,
  output logic          any,
  output logic [IW-1:0] idx
);
  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int unsigned k = 0; k < W; k++) begin
      if (in[k]) begin
        any = 1'b1;
        idx = IW'(k);
      end
    end
  end
endmodule
