// tb_fp_accumulator: self-checking test of the floating-point accumulator.
// Random dot-product-like sequences (bias plus 1..24 addends of mixed sign
// and magnitude, back to back) are fed one addend per cycle. The exact sum
// is formed here in double precision. The BF16 result must appear exactly
// one cycle after the addend flagged last and lie within the truncation
// error of a 15-bit-mantissa accumulator: per addition at most 2^-14 of
// the largest magnitude seen, plus one BF16 step for the final output.
// Directed cases: exact cancellation to +0, saturation on overflow,
// flush to zero on underflow, and zero addends.
module tb_fp_accumulator;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0;
  bf16_t bias, addend;
  logic out_valid; bf16_t sum;
  int checks = 0, failures = 0;
  int n_cancel = 0, n_sat = 0, n_uflow = 0, n_seq = 0;

  fp_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one sequence; checks the result against `want` within `tol`.
  task automatic run_seq(input logic [15:0] b, input logic [15:0] adds[$], input bit exact,
                         input logic [15:0] want_bits);
    real s, mx, tol, got, v;
    int n;
    n = adds.size();
    s = bf16_real(b); mx = (s < 0) ? -s : s;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
      bias = (i == 0) ? bf16_t'(b) : bf16_t'($urandom);  // bias only sampled on first
      addend = adds[i];
      s = s + bf16_real(adds[i]);
      v = (s < 0) ? -s : s; if (v > mx) mx = v;
      v = bf16_real(adds[i]); if (v < 0) v = -v; if (v > mx) mx = v;
      @(posedge clk); #1;
      if (i < n - 1) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL early out_valid"); end
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
    got = bf16_real(sum);
    tol = (n + 2) * mx / 16384.0 + ((s < 0) ? -s : s) / 128.0;
    checks++;
    if (exact ? (sum !== want_bits) : ((got - s > tol) || (s - got > tol))) begin
      failures++;
      if (failures < 10) $display("FAIL seq %0d n=%0d got %h (%g) want %g tol %g", n_seq, n, sum, got, s, tol);
    end
    n_seq++;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    logic [15:0] q[$];
    logic [15:0] b;
    bias = '0; addend = '0;
    #22 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int n = 1 + int'($urandom_range(23));
      q.delete();
      for (int i = 0; i < n; i++) q.push_back((i % 5 == 4) ? 16'h0000 : rand_bf16(115, 135));
      b = ($urandom % 8 == 0) ? 16'h0000 : rand_bf16(115, 135);
      run_seq(b, q, 0, 0);
    end
    // exact cancellation: x - x = +0
    q.delete(); q.push_back(16'hC0A5); run_seq(16'h40A5, q, 1, 16'h0000); n_cancel++;
    // x + y - x - y with a bias of zero
    q.delete(); q.push_back(16'h4123); q.push_back(16'h3F10); q.push_back(16'hC123); q.push_back(16'hBF10);
    run_seq(16'h0000, q, 1, 16'h0000); n_cancel++;
    // overflow saturates to the largest finite value
    q.delete(); q.push_back(16'h7F7F); q.push_back(16'h7F7F); run_seq(16'h7F7F, q, 1, 16'h7F7F); n_sat++;
    q.delete(); q.push_back(16'hFF70); run_seq(16'hFF70, q, 1, 16'hFF7F); n_sat++;
    // underflow: (1+1/128)*2^-126 - 2^-126 = 2^-133 is below the normal range
    q.delete(); q.push_back(16'h8080); run_seq(16'h0081, q, 1, 16'h0000); n_uflow++;
    // a single zero addend returns the bias
    q.delete(); q.push_back(16'h0000); run_seq(16'h3FC0, q, 1, 16'h3FC0);
    $display("sequences=%0d cancel=%0d saturate=%0d underflow=%0d", n_seq, n_cancel, n_sat, n_uflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
