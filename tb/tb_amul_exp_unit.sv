// tb_amul_exp_unit: exhaustive check of the multiplier's exponent path.
// For every BF16 exponent, FP8 exponent and carry, and a spread of scaling
// exponents, the output must equal exp_a + exp_b - 7 - scale + carry.
module tb_amul_exp_unit;
  import amul_pkg::*;
  logic [7:0] exp_a;
  logic [3:0] exp_b;
  logic signed [SCALE_W-1:0] scale;
  logic carry;
  logic signed [PEXP_W-1:0] exp_out;
  int checks = 0, failures = 0;

  amul_exp_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sc = -32; sc <= 31; sc += 7) begin
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 16; b++)
          for (int c = 0; c < 2; c++) begin
            exp_a = 8'(a); exp_b = 4'(b); carry = 1'(c); scale = SCALE_W'(sc);
            #1;
            checks++;
            if (int'(exp_out) != a + b - 7 - sc + c) begin
              failures++;
              if (failures < 10)
                $display("FAIL a=%0d b=%0d sc=%0d c=%0d got %0d", a, b, sc, c, exp_out);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
