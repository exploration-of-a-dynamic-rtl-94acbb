// bf16_relu: ReLU activation on a BF16 value.
//
// When en is high, negative values become +0 and everything else passes
// unchanged; when en is low the value passes unchanged (for a layer, such
// as a final classifier, that has no activation). A value with a zero
// exponent field is output as +0 either way, so -0 never leaves the block.
// The activation stage comes from the thesis's scheme-2 datapath and its
// networks use ReLU; the bypass input is this design's choice.
// Purely combinational.
module bf16_relu
  import amul_pkg::*;
(
  input  logic  en,
  input  bf16_t in,
  output bf16_t out
);

  always_comb begin
    if (in.exp == '0 || (en && in.sign))
      out = BF16_ZERO;
    else
      out = in;
  end

endmodule
