// amul_exception: exception processing at the output of the approximate
// multiplier.
//
// Packs sign, exponent and mantissa into a BF16 product and handles the
// cases the plain datapath cannot represent:
//   * zero_in (an operand has exponent field 0, i.e. is zero or a flushed
//     subnormal) gives +0;
//   * a result exponent of 0 or below (underflow) gives +0, as subnormals
//     are not used;
//   * a result exponent of 255 or above (overflow) saturates to the largest
//     finite BF16 value with the product's sign.
// The stage and its place in the datapath follow the thesis; the
// thesis names it without giving its rules, so the three rules above are
// this design's choice (zeroing follows the thesis's treatment of
// subnormals). Purely combinational.
module amul_exception
  import amul_pkg::*;
(
  input  logic                     sign,
  input  logic signed [PEXP_W-1:0] exp_in,
  input  logic [BF16_MAN_W-1:0]    man_in,
  input  logic                     zero_in,
  output bf16_t                    result
);

  always_comb begin
    if (zero_in || exp_in <= 0)
      result = BF16_ZERO;
    else if (exp_in >= 255)
      result = bf16_max(sign);
    else begin
      result.sign = sign;
      result.exp  = exp_in[BF16_EXP_W-1:0];
      result.man  = man_in;
    end
  end

endmodule
