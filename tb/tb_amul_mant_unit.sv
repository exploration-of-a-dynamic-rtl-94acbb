// tb_amul_mant_unit: exhaustive check of the mantissa path.
// For every 7-bit feature mantissa, 3-bit weight mantissa and mode the
// correction term is formed here (3x3 product of the top bits, LSB 2^-6,
// plus 2^-7 in LPC; nothing in NC) and the approximated significand
// 1 + x + y + c is compared with the block: below 2 it must be passed as
// is with no carry; at 2 or more carry must be set and the mantissa be
// x + y - 1 (NC) or (x + y + c - 1) / 2 (LPC), truncated to 7 bits.
// Values are formed as reals and compared in units of 2^-7.
module tb_amul_mant_unit;
  import amul_pkg::*;
  logic [6:0] man_a;
  logic [2:0] man_b;
  logic [5:0] corr;
  logic corr_cin;
  amul_mode_e mode;
  logic [6:0] man_out;
  logic carry;
  int checks = 0, failures = 0;
  int overflows = 0;

  amul_mant_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x, y, c, sig, mexp;
  bit  ovf;
  initial begin
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 128; a++)
        for (int b = 0; b < 8; b++) begin
          man_a = 7'(a); man_b = 3'(b); mode = amul_mode_e'(m);
          corr     = (m == 1) ? 6'((a >> 4) * b) : 6'd0;
          corr_cin = (m == 1);
          x = a / 128.0; y = b / 8.0;
          c = (m == 1) ? ((a >> 4) * b) / 64.0 + 1.0 / 128.0 : 0.0;
          sig = 1.0 + x + y + c;
          ovf = (sig >= 2.0);
          if (!ovf)       mexp = sig - 1.0;
          else if (m == 0) mexp = sig - 2.0;
          else             mexp = sig / 2.0 - 1.0;
          #1;
          checks++;
          if (ovf) overflows++;
          if (carry != ovf || int'(man_out) != int'($floor(mexp * 128.0 + 1e-9))) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%0d a=%0d b=%0d got %0d/%0d exp %f/%0d", m, a, b, man_out, carry, mexp*128.0, ovf);
          end
        end
    checks++;
    if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
