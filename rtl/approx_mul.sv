// approx_mul: dynamic approximate floating-point multiplier, BF16 x FP8.
//
// Multiplies a 16-bit BF16 feature by an 8-bit FP8 (E4M3, bias 7) weight
// with logarithmic (Mitchell) approximation: signs are XORed, exponents are
// added exactly, and the mantissa product (1+mA)(1+mB) is replaced by the
// sum 1+mA+mB. The missing mA*mB term can be restored in part at run time:
//   mode = NC : no correction, mantissas are only added;
//   mode = LPC: the 3x3-bit product of the top three mantissa bits of both
//               operands is added (all three FP8 mantissa bits are used).
// The mode can change on every operand, so precision can differ per layer
// or even per weight. The signed input scale subtracts a power of two from
// the product exponent (product x 2^-scale), undoing the up-scaling applied
// to weights when they were converted to FP8.
//
// Structure (left to right): input register, sign XOR, exponent unit,
// mantissa adder with error-correction multiplier, mantissa processing,
// exponent carry adder, exception processing. Interface: in_valid with the
// operands; out_valid/product one clock later (one register stage, the rest
// is combinational from the input register). A new operand pair can be
// accepted every cycle.
// The structure, the two modes and the scaling follow the thesis; the
// valid flag, the reset and the exception rules are this design's choices.
module approx_mul
  import amul_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  bf16_t                     feature,
  input  fp8_t                      weight,
  input  amul_mode_e                mode,
  input  logic signed [SCALE_W-1:0] scale,
  output logic                      out_valid,
  output bf16_t                     product
);

  bf16_t                     q_feature;
  fp8_t                      q_weight;
  amul_mode_e                q_mode;
  logic signed [SCALE_W-1:0] q_scale;

  logic                      sign;
  logic                      zero_in;
  logic [5:0]                corr;
  logic                      corr_cin;
  logic [BF16_MAN_W-1:0]     man;
  logic                      carry;
  logic signed [PEXP_W-1:0]  exp;

  amul_input_reg u_in_reg (
    .clk, .rst_n, .in_valid, .feature, .weight, .mode, .scale,
    .q_valid (out_valid),
    .q_feature, .q_weight, .q_mode, .q_scale
  );

  always_comb begin
    sign    = q_feature.sign ^ q_weight.sign;
    zero_in = (q_feature.exp == '0) || (q_weight.exp == '0);
  end

  amul_err_corr u_err_corr (
    .man_a_hi (q_feature.man[BF16_MAN_W-1 -: 3]),
    .man_b    (q_weight.man),
    .mode     (q_mode),
    .corr, .corr_cin
  );

  amul_mant_unit u_mant (
    .man_a   (q_feature.man),
    .man_b   (q_weight.man),
    .corr, .corr_cin,
    .mode    (q_mode),
    .man_out (man),
    .carry
  );

  amul_exp_unit u_exp (
    .exp_a   (q_feature.exp),
    .exp_b   (q_weight.exp),
    .scale   (q_scale),
    .carry,
    .exp_out (exp)
  );

  amul_exception u_exc (
    .sign, .exp_in (exp), .man_in (man), .zero_in, .result (product)
  );

endmodule
