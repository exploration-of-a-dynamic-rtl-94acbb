// tb_bf16_relu: checks the ReLU activation: with en high negative values
// and zeros become +0 and positive values pass; with en low every nonzero
// value passes unchanged.
module tb_bf16_relu;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  logic en; bf16_t in; bf16_t out;
  int checks = 0, failures = 0, n_clip = 0;

  bf16_relu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      real a, want;
      en = 1'($urandom);
      in = rand_bf16(0, 254);
      #1;
      a = bf16_real(in);
      want = (en && a < 0.0) ? 0.0 : a;
      if (en && a < 0.0) n_clip++;
      checks++;
      if (bf16_real(out) != want || (want == 0.0 && out !== 16'h0000)) begin
        failures++;
        if (failures < 10) $display("FAIL en=%0d in=%h out=%h", en, in, out);
      end
    end
    checks++; if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
