// tb_amul_exception: checks the output packing of the multiplier.
// Random in-range exponents must pass sign, exponent and mantissa through;
// zero operands and exponents of 0 or below must give +0; exponents of 255
// or above must give the largest finite value with the product's sign.
module tb_amul_exception;
  import amul_pkg::*;
  logic sign;
  logic signed [PEXP_W-1:0] exp_in;
  logic [6:0] man_in;
  logic zero_in;
  bf16_t result;
  int checks = 0, failures = 0;

  amul_exception dut (.*);

  task automatic check(input logic [15:0] want);
    #1;
    checks++;
    if (result !== want) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%0d e=%0d m=%0d z=%0d got %h want %h", sign, exp_in, man_in, zero_in, result, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = -300; e <= 300; e++) begin
      sign = 1'($urandom); man_in = 7'($urandom); zero_in = 1'b0;
      exp_in = PEXP_W'(e);
      if (e <= 0)        check(16'h0000);
      else if (e >= 255) check({sign, 8'hFE, 7'h7F});
      else               check({sign, 8'(e), man_in});
      zero_in = 1'b1;
      check(16'h0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
