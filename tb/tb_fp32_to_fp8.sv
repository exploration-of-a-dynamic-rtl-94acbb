// tb_fp32_to_fp8: checks the FP32 -> FP8 weight conversion.
// Random FP32 values around the FP8 range, with random up-scaling, are
// converted and compared with ref_fp32_to_fp8, which works on the real
// value (scale, find the binade, truncate to three fraction bits, clamp).
// Counts the underflow-to-zero and the exponent-clamp cases.
module tb_fp32_to_fp8;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  fp32_t in; logic signed [SCALE_W-1:0] scale; fp8_t out;
  int checks = 0, failures = 0, n_uf = 0, n_clamp = 0, n_norm = 0;

  fp32_to_fp8 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] want;
      int sc;
      sc = ($urandom % 2) ? int'($urandom_range(20)) - 10 : 0;
      in = {1'($urandom), 8'(100 + $urandom_range(50)), 23'($urandom)};
      if (i % 100 == 0) in.exp = 8'd0;
      scale = SCALE_W'(sc);
      #1;
      want = ref_fp32_to_fp8(in, sc);
      if (want == 0) n_uf++; else if (int'(in.exp) + sc > 135) n_clamp++; else n_norm++;
      checks++;
      if (out !== want) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h sc=%0d got %h want %h", in, sc, out, want);
      end
    end
    checks++;
    if (n_uf == 0 || n_clamp == 0 || n_norm == 0) failures++;
    $display("underflow=%0d clamp=%0d normal=%0d", n_uf, n_clamp, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
