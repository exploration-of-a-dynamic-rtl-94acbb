// approx_mac: multiply-accumulate unit built from the dynamic approximate
// multiplier and the floating-point accumulator.
//
// Each cycle with in_valid it takes a BF16 feature and an FP8 weight and
// adds their approximate product (mode NC or LPC, down-scaled by 2^-scale)
// to a running sum. in_first marks the first term of a dot product: the
// sum then starts from the BF16 bias instead of the previous result.
// in_last marks the final term.
// Timing: the multiplier has one register stage and the accumulator one,
// so out_valid/result appear two cycles after the in_valid cycle that
// carried in_last. Full throughput: one term per cycle, and a new dot
// product may start in the cycle right after the last term of the previous
// one. in_first, in_last and bias travel alongside the operands through a
// one-cycle register so they meet their product at the accumulator.
// The multiplier-plus-accumulator composition follows the thesis; the
// control signals and the pipelining are this design's choices.
module approx_mac
  import amul_pkg::*;
#(
  parameter int unsigned GUARD_W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  bf16_t                     feature,
  input  fp8_t                      weight,
  input  bf16_t                     bias,
  input  amul_mode_e                mode,
  input  logic signed [SCALE_W-1:0] scale,
  output logic                      out_valid,
  output bf16_t                     result
);

  logic  prod_valid;
  bf16_t product;
  logic  first_q, last_q;
  bf16_t bias_q;

  approx_mul u_mul (
    .clk, .rst_n, .in_valid, .feature, .weight, .mode, .scale,
    .out_valid (prod_valid),
    .product
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= 1'b0;
      last_q  <= 1'b0;
      bias_q  <= '0;
    end else if (in_valid) begin
      first_q <= in_first;
      last_q  <= in_last;
      if (in_first) bias_q <= bias;
    end
  end

  fp_accumulator #(.GUARD_W(GUARD_W)) u_acc (
    .clk, .rst_n,
    .in_valid  (prod_valid),
    .in_first  (first_q),
    .in_last   (last_q),
    .bias      (bias_q),
    .addend    (product),
    .out_valid,
    .sum       (result)
  );

endmodule
