// fp32_to_bf16: truncates an FP32 bias to the 16-bit BF16 format used by
// the accumulator.
//
// BF16 shares the FP32 sign and 8-bit exponent, so the conversion keeps the
// top 16 bits and drops the low 16 mantissa bits (no rounding, as in the
// thesis). A zero or subnormal input (exponent field 0) becomes +0,
// because subnormals are not used in this datapath. Purely combinational.
module fp32_to_bf16
  import amul_pkg::*;
(
  input  fp32_t in,
  output bf16_t out
);

  always_comb begin
    if (in.exp == '0)
      out = BF16_ZERO;
    else begin
      out.sign = in.sign;
      out.exp  = in.exp;
      out.man  = in.man[22 -: BF16_MAN_W];
    end
  end

endmodule
