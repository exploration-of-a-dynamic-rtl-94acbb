// tb_approx_mul: self-checking test of the BF16 x FP8 approximate
// multiplier.
//  * Exhaustive over all FP8 weights and all 128 feature mantissas at a
//    fixed feature exponent, in both modes, with a random mode per operand
//    so the mode switches between consecutive operands.
//  * Random operands with random scale, including zero operands and
//    exponents that underflow or overflow.
// Every product is compared bit for bit with ref_mul, and must appear one
// clock after its operands (the thesis's one input-register stage). The
// error against the exact product of the same operands is also measured:
// NC must stay within Mitchell's 1/9 bound, and LPC must be more accurate
// than NC on average.
module tb_approx_mul;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  bf16_t feature; fp8_t weight; amul_mode_e mode;
  logic signed [SCALE_W-1:0] scale;
  logic out_valid; bf16_t product;
  int checks = 0, failures = 0;
  int n_nc = 0, n_lpc = 0, n_switch = 0, n_zero = 0, n_uflow = 0, n_oflow = 0;
  real sum_err_nc = 0.0, sum_err_lpc = 0.0, max_err_nc = 0.0;
  int cnt_nc = 0, cnt_lpc = 0;

  approx_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_q;
  logic        pend;
  amul_mode_e  prev_mode;

  // drive one operand pair; the check of the previous pair happens on the
  // same clock edge
  task automatic apply(input logic [15:0] f, input logic [7:0] w, input bit lpc, input int sc);
    real ex, ap, er;
    @(negedge clk);
    feature = f; weight = w; mode = amul_mode_e'(lpc); scale = SCALE_W'(sc); in_valid = 1;
    if (lpc) n_lpc++; else n_nc++;
    if (mode != prev_mode) n_switch++;
    prev_mode = mode;
    if (f[14:7] == 0 || w[6:3] == 0) n_zero++;
    else if (int'(f[14:7]) + int'(w[6:3]) - 7 - sc <= 0) n_uflow++;
    else if (int'(f[14:7]) + int'(w[6:3]) - 7 - sc >= 255) n_oflow++;
    exp_q = ref_mul(f, w, lpc, sc);
    if (sc == 0 && f[14:7] > 60 && f[14:7] < 190 && w[6:3] != 0) begin
      ex = bf16_real(f) * fp8_real(w);
      ap = bf16_real(exp_q);
      er = (ex - ap) / ex; if (er < 0) er = -er;
      if (lpc) begin sum_err_lpc += er; cnt_lpc++; end
      else begin sum_err_nc += er; cnt_nc++; if (er > max_err_nc) max_err_nc = er; end
    end
    @(posedge clk); #1;
    checks++;
    if (!out_valid || product !== exp_q) begin
      failures++;
      if (failures < 10)
        $display("FAIL f=%h w=%h lpc=%0d sc=%0d got %h(%0d) want %h", f, w, lpc, sc, product, out_valid, exp_q);
    end
  endtask

  initial begin
    feature = '0; weight = '0; mode = MODE_NC; scale = '0; prev_mode = MODE_NC;
    #22 rst_n = 1;
    // latency: nothing valid before the first operand
    checks++; if (out_valid) failures++;
    for (int w = 0; w < 256; w++)
      for (int m = 0; m < 128; m++)
        apply({1'($urandom), 8'd127, 7'(m)}, 8'(w), 1'($urandom), 0);
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] f; logic [7:0] w; int sc;
      f = rand_bf16(0, 255); w = 8'($urandom);
      sc = ($urandom % 4 == 0) ? int'($urandom_range(63)) - 32 : 0;
      apply(f, w, 1'($urandom), sc);
    end
    // in_valid low: out_valid must drop one cycle later
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;
    checks++;
    if (max_err_nc > 1.0 / 9.0 + 1e-6) begin
      failures++; $display("FAIL NC max error %f", max_err_nc);
    end
    checks++;
    if (sum_err_lpc / cnt_lpc >= sum_err_nc / cnt_nc) begin
      failures++; $display("FAIL LPC mean error not below NC");
    end
    $display("mean rel error NC %f LPC %f, max NC %f", sum_err_nc / cnt_nc, sum_err_lpc / cnt_lpc, max_err_nc);
    $display("events: nc=%0d lpc=%0d switch=%0d zero=%0d underflow=%0d overflow=%0d",
             n_nc, n_lpc, n_switch, n_zero, n_uflow, n_oflow);
    checks++;
    if (n_nc == 0 || n_lpc == 0 || n_switch == 0 || n_zero == 0 || n_uflow == 0 || n_oflow == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
