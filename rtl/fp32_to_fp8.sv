// fp32_to_fp8: converts an FP32 weight to the 8-bit FP8 weight format
// (1 sign, 4 exponent, 3 mantissa bits, bias 7), with power-of-two
// up-scaling.
//
// The value is first multiplied by 2^scale by adding the signed scale to
// the FP32 exponent, so that small weights use the range of the narrow
// format. Then bits are mapped without rounding:
//   * the mantissa keeps its three most significant bits (truncation, which
//     always rounds towards zero);
//   * an FP32 exponent (after scaling) of 120 or below, or an FP32 input
//     that is zero or subnormal, gives +0 (FP8 exponent code 0 is not used
//     for subnormals);
//   * an exponent above 135 is clamped to 135 (code 15) while the truncated
//     mantissa is kept;
//   * otherwise the FP8 exponent code is the FP32 exponent minus 120.
// The mapping and both limits follow the thesis; applying the scale in
// the same step and the width of scale are this design's choices.
// Purely combinational.
module fp32_to_fp8
  import amul_pkg::*;
(
  input  fp32_t                     in,
  input  logic signed [SCALE_W-1:0] scale,
  output fp8_t                      out
);

  logic signed [9:0] exp_s;   // scaled FP32 exponent

  always_comb begin
    exp_s = $signed({2'b00, in.exp}) + 10'(scale);
    out   = '0;
    if (in.exp != '0 && exp_s > $signed(10'(FP8_EXP_OFS))) begin
      out.sign = in.sign;
      out.man  = in.man[22 -: FP8_MAN_W];
      if (exp_s > $signed(10'(FP8_EXP_OFS + 15)))
        out.exp = 4'd15;
      else
        out.exp = 4'(exp_s - $signed(10'(FP8_EXP_OFS)));
    end
  end

endmodule
