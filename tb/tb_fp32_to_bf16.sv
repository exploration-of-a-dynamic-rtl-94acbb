// tb_fp32_to_bf16: checks the FP32 -> BF16 bias truncation.
// The BF16 result must have the input's sign, lie at or below the input in
// magnitude by less than one BF16 step (2^-7 relative), and be +0 for zero
// and subnormal inputs.
module tb_fp32_to_bf16;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  fp32_t in; bf16_t out;
  int checks = 0, failures = 0;

  fp32_to_bf16 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      real a, b;
      in = {1'($urandom), 8'($urandom_range(254)), 23'($urandom)};
      #1;
      checks++;
      if (in.exp == 0) begin
        if (out !== 16'h0000) failures++;
      end else begin
        a = fp32_real(in); b = bf16_real(out);
        if (a < 0) begin a = -a; b = -b; end
        if (out.sign != in.sign || b > a || (a - b) >= a / 128.0) begin
          failures++;
          if (failures < 10) $display("FAIL in=%h out=%h", in, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
