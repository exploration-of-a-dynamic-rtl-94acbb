// tb_amul_input_reg: checks the multiplier's input register.
// After reset all outputs are zero. Each cycle random operands are driven
// with a random in_valid; q_valid must follow in_valid one cycle later and
// the data outputs must hold the last operands taken with in_valid.
module tb_amul_input_reg;
  import amul_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  bf16_t feature; fp8_t weight; amul_mode_e mode; logic signed [SCALE_W-1:0] scale;
  logic q_valid; bf16_t q_feature; fp8_t q_weight; amul_mode_e q_mode;
  logic signed [SCALE_W-1:0] q_scale;
  int checks = 0, failures = 0;
  logic [30:0] held;
  logic v_prev;

  amul_input_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    feature = '0; weight = '0; mode = MODE_NC; scale = '0;
    #12;
    checks++;
    if ({q_valid, q_feature, q_weight, q_mode, q_scale} != '0) failures++;
    rst_n = 1;
    held = '0; v_prev = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      feature = bf16_t'($urandom); weight = fp8_t'($urandom);
      mode = amul_mode_e'($urandom % 2); scale = SCALE_W'($urandom);
      if (in_valid) held = {feature, weight, mode, scale};
      v_prev = in_valid;
      @(posedge clk); #1;
      checks++;
      if (q_valid != v_prev || {q_feature, q_weight, q_mode, q_scale} != held) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
