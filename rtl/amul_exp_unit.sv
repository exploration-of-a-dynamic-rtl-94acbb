// amul_exp_unit: exponent path of the approximate multiplier.
//
// The exponent of a product is exact: the biased BF16 exponent and the
// biased FP8 exponent are added, the FP8 bias (7) is removed so the result
// carries the BF16 bias, and the power-of-two scaling exponent is
// subtracted (down-scaling of weights that were up-scaled on conversion).
// A second adder then adds the carry from the mantissa unit, which is set
// when the mantissa sum reached 2 and the product moved up one binade.
//   exp_out = exp_a + exp_b - 7 - scale + carry
// The two adders and the scaling subtraction follow the thesis. The
// result is kept signed and 10 bits wide (the thesis shows 9 bits) so that
// underflow below zero and overflow above 255 reach the exception stage
// intact. Purely combinational.
module amul_exp_unit
  import amul_pkg::*;
(
  input  logic [BF16_EXP_W-1:0]     exp_a,
  input  logic [FP8_EXP_W-1:0]      exp_b,
  input  logic signed [SCALE_W-1:0] scale,
  input  logic                      carry,
  output logic signed [PEXP_W-1:0]  exp_out
);

  logic signed [PEXP_W-1:0] exp_base;

  always_comb begin
    exp_base = $signed({2'b00, exp_a}) + $signed({6'b0, exp_b})
             - $signed(PEXP_W'(FP8_BIAS)) - PEXP_W'(scale);
    exp_out  = exp_base + $signed({9'b0, carry});
  end

endmodule
