// tb_amul_err_corr: exhaustive check of the error-correction multiplier.
// LPC must give the 3x3-bit product of the operands with the rounding bit
// set; NC must give no correction at all.
module tb_amul_err_corr;
  import amul_pkg::*;
  logic [2:0] man_a_hi, man_b;
  amul_mode_e mode;
  logic [5:0] corr;
  logic corr_cin;
  int checks = 0, failures = 0;

  amul_err_corr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          man_a_hi = 3'(a); man_b = 3'(b); mode = amul_mode_e'(m);
          #1;
          checks++;
          if (m == 1 ? (corr != 6'(a * b) || corr_cin != 1'b1)
                     : (corr != 0 || corr_cin != 1'b0)) begin
            failures++;
            $display("FAIL mode=%0d a=%0d b=%0d corr=%0d cin=%0d", m, a, b, corr, corr_cin);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
