// pot_const_mult - multiplierless multiplication by a constant coefficient.
//
// The product x*COEF is formed as a sum of shifted copies of x, one per
// nonzero bit of the two's-complement coefficient word: bit i (i < COEF_W-1)
// adds x*2^i and the sign bit subtracts x*2^(COEF_W-1). Because COEF is a
// parameter, bits that are 0 produce no logic, so the adder count equals the
// number of 1 bits - the coefficient "cost" that the coefficient optimization
// minimizes. The output is combinational and exact (full width).
//
// Interface: x (signed DATA_W) in, p (signed DATA_W+COEF_W) out; no clock.
// The default COEF is the centre tap of the optimized 21-tap set.
// Tying hardware cost to the number of 1 bits follows the filter's cost
// model; building it as a plain binary shift-add (no CSD recoding) is this
// design's choice, since that is the cost the optimization counts.
module pot_const_mult #(
  parameter int unsigned               DATA_W = 16,
  parameter int unsigned               COEF_W = 16,
  parameter logic [COEF_W-1:0]         COEF   = polydec_pkg::H1_OPT[10]
) (
  input  logic signed [DATA_W-1:0]        x,
  output logic signed [DATA_W+COEF_W-1:0] p
);

  localparam int unsigned PW = DATA_W + COEF_W;

  logic signed [PW-1:0] xe;
  assign xe = PW'(x);   // sign-extended operand

  always_comb begin
    p = '0;
    for (int unsigned i = 0; i < COEF_W; i++) begin
      if (COEF[i]) begin
        if (i == COEF_W - 1) p = p - (xe <<< i);
        else                 p = p + (xe <<< i);
      end
    end
  end

endmodule
