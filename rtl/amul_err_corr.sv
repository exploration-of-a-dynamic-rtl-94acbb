// amul_err_corr: error-correction multiplier of the approximate multiplier.
//
// Logarithmic multiplication replaces (1+mA)(1+mB) by 1+mA+mB and so always
// misses the term mA*mB. In LPC mode this block approximates that term with
// a 3x3-bit product of the three most significant mantissa bits of each
// operand (for the FP8 weight these are all its mantissa bits). The 6-bit
// product has an LSB of 2^-6; in the 7-bit mantissa frame of the product it
// is shifted up one place and one mantissa LSB (2^-7, half an LSB of the
// 6-bit product) is added as rounding; this block delivers that bit as
// corr_cin, the carry-in of the correction adder. In NC mode both outputs
// are zero, so the adder behind it sees no correction. Purely
// combinational. The 3x3 product, its shift and the +1 follow the thesis;
// presenting the +1 as a separate carry bit is this design's choice.
module amul_err_corr
  import amul_pkg::*;
(
  input  logic [2:0]  man_a_hi,
  input  logic [2:0]  man_b,
  input  amul_mode_e  mode,
  output logic [5:0]  corr,
  output logic        corr_cin
);

  always_comb begin
    if (mode == MODE_LPC) begin
      corr     = 6'(man_a_hi) * 6'(man_b);
      corr_cin = 1'b1;
    end else begin
      corr     = '0;
      corr_cin = 1'b0;
    end
  end

endmodule
