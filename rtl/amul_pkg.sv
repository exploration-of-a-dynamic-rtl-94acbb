// amul_pkg: number formats and constants shared by the approximate
// multiply-accumulate datapath.
//
// Three floating-point formats appear in the datapath:
//   * fp32_t  - IEEE single precision, the format weights and biases are
//               trained in (1 sign, 8 exponent, 23 mantissa bits).
//   * bf16_t  - the 16-bit feature / product / accumulator output format:
//               the top half of FP32 (1 sign, 8 exponent, 7 mantissa bits,
//               bias 127).
//   * fp8_t   - the 8-bit weight format: 1 sign, 4 exponent, 3 mantissa
//               bits, bias 7, obtained from FP32 by keeping FP32 exponents
//               121..135 as codes 1..15.
// An exponent field of zero always means the value zero; subnormals are not
// used anywhere. The precision mode selects the error correction of the
// multiplier: NC (no correction) or LPC (low-precision correction).
// The width of the signed power-of-two scaling exponent is this design's own
// choice.
package amul_pkg;

  localparam int unsigned BF16_EXP_W  = 8;
  localparam int unsigned BF16_MAN_W  = 7;
  localparam int unsigned BF16_BIAS   = 127;
  localparam int unsigned FP8_EXP_W   = 4;
  localparam int unsigned FP8_MAN_W   = 3;
  localparam int unsigned FP8_BIAS    = 7;
  // FP32 exponent that maps to FP8 exponent code 0 (127 - 7).
  localparam int unsigned FP8_EXP_OFS = 120;
  // Width of the signed scaling exponent (weights x 2^k, products x 2^-k).
  localparam int unsigned SCALE_W     = 6;
  // Width of the signed biased product exponent inside the multiplier.
  localparam int unsigned PEXP_W      = 10;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] man;
  } fp32_t;

  typedef struct packed {
    logic                  sign;
    logic [BF16_EXP_W-1:0] exp;
    logic [BF16_MAN_W-1:0] man;
  } bf16_t;

  typedef struct packed {
    logic                 sign;
    logic [FP8_EXP_W-1:0] exp;
    logic [FP8_MAN_W-1:0] man;
  } fp8_t;

  typedef enum logic {
    MODE_NC  = 1'b0,  // no correction: mantissas are only added
    MODE_LPC = 1'b1   // low-precision correction: + 3x3-bit product
  } amul_mode_e;

  localparam bf16_t BF16_ZERO    = '0;

  // Largest finite BF16 magnitude with the given sign.
  function automatic bf16_t bf16_max(input logic sign);
    bf16_t r;
    r.sign = sign;
    r.exp  = 8'hFE;
    r.man  = '1;
    return r;
  endfunction

endpackage
