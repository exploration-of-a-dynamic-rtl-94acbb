// amul_input_reg: operand register at the input of the approximate
// multiplier.
//
// Captures the 16-bit BF16 feature, the 8-bit FP8 weight, the precision mode
// and the scaling exponent on every rising clock edge; q_valid follows
// in_valid one cycle later. The data registers load only when in_valid is
// high, so a held operand does not toggle the datapath behind it.
// Timing: one cycle from input to q_*. The thesis shows this register as
// the first stage of the multiplier; the valid flag, the load enable and the
// active-low asynchronous reset are this design's own choices.
module amul_input_reg
  import amul_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  bf16_t                     feature,
  input  fp8_t                      weight,
  input  amul_mode_e                mode,
  input  logic signed [SCALE_W-1:0] scale,
  output logic                      q_valid,
  output bf16_t                     q_feature,
  output fp8_t                      q_weight,
  output amul_mode_e                q_mode,
  output logic signed [SCALE_W-1:0] q_scale
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid   <= 1'b0;
      q_feature <= '0;
      q_weight  <= '0;
      q_mode    <= MODE_NC;
      q_scale   <= '0;
    end else begin
      q_valid <= in_valid;
      if (in_valid) begin
        q_feature <= feature;
        q_weight  <= weight;
        q_mode    <= mode;
        q_scale   <= scale;
      end
    end
  end

endmodule
