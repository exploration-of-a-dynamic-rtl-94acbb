// scheme2_top: one layer datapath for mixed-precision inference with the
// dynamic approximate multiplier (floating-point quantisation scheme).
//
// Weights and biases arrive in FP32. Each weight is up-scaled by 2^scale
// and truncated to the 8-bit FP8 format; each bias is truncated to BF16.
// Features (the previous layer's outputs) are BF16. The approximate MAC
// multiplies feature by weight in the selected precision mode, scales the
// product back by 2^-scale in its exponent adder, and accumulates in
// floating point starting from the bias. The finished sum passes the ReLU
// activation (bypassed when relu_en is low) and leaves as BF16, ready to be
// the next layer's feature; there is no re-quantisation between layers.
//
// Interface: stream the terms of one dot product with in_valid, flag the
// first with in_first (the bias is sampled then) and the last with in_last.
// mode may change on any term, so a layer (or single weight) can run in NC
// or LPC. out_valid/result follow two cycles after the last term. One term
// per cycle, back-to-back dot products allowed.
// The chain of blocks follows the thesis's scheme-2 datapath; using one
// scale for both up- and down-scaling, and the relu_en bypass, are this
// design's choices.
module scheme2_top
  import amul_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  bf16_t                     feature,
  input  fp32_t                     weight,
  input  fp32_t                     bias,
  input  amul_mode_e                mode,
  input  logic signed [SCALE_W-1:0] scale,
  input  logic                      relu_en,
  output logic                      out_valid,
  output bf16_t                     result
);

  fp8_t  weight_fp8;
  bf16_t bias_bf16;
  bf16_t mac_result;
  logic  relu_en_q, relu_en_qq;

  fp32_to_fp8 u_wconv (.in(weight), .scale, .out(weight_fp8));

  fp32_to_bf16 u_bconv (.in(bias), .out(bias_bf16));

  approx_mac u_mac (
    .clk, .rst_n, .in_valid, .in_first, .in_last,
    .feature,
    .weight (weight_fp8),
    .bias   (bias_bf16),
    .mode, .scale,
    .out_valid,
    .result (mac_result)
  );

  // relu_en is taken with the last term and delayed to meet the result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      relu_en_q  <= 1'b0;
      relu_en_qq <= 1'b0;
    end else begin
      if (in_valid && in_last) relu_en_q <= relu_en;
      relu_en_qq <= relu_en_q;
    end
  end

  bf16_relu u_act (.en(relu_en_qq), .in(mac_result), .out(result));

endmodule
