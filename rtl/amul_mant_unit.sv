// amul_mant_unit: mantissa path of the approximate multiplier.
//
// Works on mantissas in units of 2^-7 (the BF16 mantissa LSB):
//   1. sum = mA + mB, the FP8 mantissa being placed in the top three bits
//      (mB << 4). This is Mitchell's approximation of the mantissa product.
//   2. s = sum + (corr << 1) + corr_cin adds the correction term (zero in
//      NC mode). s may reach 338, so nine bits are kept.
//   3. Mantissa processing: if s < 128 the product lies in [1,2) and s is
//      the result mantissa. Otherwise the product moved up one binade and
//      carry is raised:
//        NC : mantissa = s - 128            (2^(1+x) ~ 2*(1+(x-1)))
//        LPC: mantissa = (s - 128) >> 1     ((1+s)/2 = 1 + (s-1)/2)
// The arithmetic is the thesis's. The sum after the correction adder is
// shown as 8 bits in the thesis; it is kept at 9 bits here because the
// largest LPC sum does not fit in 8. Purely combinational.
module amul_mant_unit
  import amul_pkg::*;
(
  input  logic [BF16_MAN_W-1:0] man_a,
  input  logic [FP8_MAN_W-1:0]  man_b,
  input  logic [5:0]            corr,
  input  logic                  corr_cin,
  input  amul_mode_e            mode,
  output logic [BF16_MAN_W-1:0] man_out,
  output logic                  carry
);

  logic [7:0] man_sum;   // M_A + M_B
  logic [8:0] corr_sum;  // + correction
  logic [7:0] excess;    // corr_sum - 1.0 (at most 210)

  always_comb begin
    man_sum  = {1'b0, man_a} + {1'b0, man_b, 4'b0};
    corr_sum = {1'b0, man_sum} + {2'b0, corr, 1'b0} + {8'b0, corr_cin};
    carry    = (corr_sum >= 9'd128);
    excess   = 8'(corr_sum - 9'd128);
    if (!carry)
      man_out = corr_sum[6:0];
    else if (mode == MODE_NC)
      man_out = excess[6:0];
    else
      man_out = excess[7:1];
  end

endmodule
