// tb_approx_mac: self-checking test of the approximate multiply-accumulate
// unit. Random dot products (1..32 terms, random NC/LPC per term, random
// scale per dot product, random idle cycles between terms, and dot products
// that start right after the previous one ends) are streamed in. For each,
// the expected value is the BF16 bias plus the sum of the reference
// approximate products, summed exactly in double precision; the result
// must lie within the accumulator's truncation error of it (see
// tb_fp_accumulator) and out_valid must rise exactly two cycles after the
// last term was taken.
module tb_approx_mac;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0;
  bf16_t feature, bias; fp8_t weight; amul_mode_e mode;
  logic signed [SCALE_W-1:0] scale;
  logic out_valid; bf16_t result;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_dots = 0, n_b2b = 0, n_gap = 0, n_nc = 0, n_lpc = 0;

  typedef struct { int due; real val; real tol; } exp_t;
  exp_t expq[$];

  approx_mac dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected out_valid");
        end else begin
          exp_t e;
          real g;
          e = expq.pop_front();
          g = bf16_real(result);
          if (e.due != cycle || g - e.val > e.tol || e.val - g > e.tol) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d (due %0d) got %g want %g tol %g", cycle, e.due, g, e.val, e.tol);
          end
        end
      end else if (expq.size() != 0 && expq[0].due < cycle) begin
        checks++; failures++;
        void'(expq.pop_front());
        $display("FAIL result missing");
      end
    end
  end

  initial begin
    feature = '0; bias = '0; weight = '0; mode = MODE_NC; scale = '0;
    #22 rst_n = 1;
    for (int d = 0; d < 300; d++) begin
      int n, sc;
      real s, mx, v;
      logic [15:0] b;
      n = 1 + int'($urandom_range(31));
      sc = ($urandom % 3 == 0) ? int'($urandom_range(6)) - 2 : 0;
      b = ($urandom % 6 == 0) ? 16'h0000 : rand_bf16(118, 130);
      s = bf16_real(b); mx = (s < 0) ? -s : s;
      if (d > 0 && $urandom % 2 == 0) n_b2b++;
      else begin
        @(negedge clk); in_valid = 0; @(negedge clk);
      end
      for (int i = 0; i < n; i++) begin
        logic [15:0] f; logic [7:0] w; bit lpc;
        if (i > 0 && $urandom % 8 == 0) begin
          @(negedge clk); in_valid = 0; n_gap++;
        end
        @(negedge clk);
        f = rand_bf16(120, 132); w = 8'($urandom); lpc = 1'($urandom);
        if (lpc) n_lpc++; else n_nc++;
        in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
        feature = f; weight = w; mode = amul_mode_e'(lpc); scale = SCALE_W'(sc);
        bias = (i == 0) ? bf16_t'(b) : bf16_t'($urandom);
        v = bf16_real(ref_mul(f, w, lpc, sc));
        s = s + v;
        if (v < 0) v = -v; if (v > mx) mx = v;
        v = (s < 0) ? -s : s; if (v > mx) mx = v;
        if (i == n - 1)
          expq.push_back('{due: cycle + 2, val: s, tol: (n + 2) * mx / 16384.0 + v / 128.0});
      end
      n_dots++;
    end
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_nc == 0 || n_lpc == 0) failures++;
    $display("dots=%0d back_to_back=%0d gaps=%0d nc=%0d lpc=%0d", n_dots, n_b2b, n_gap, n_nc, n_lpc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
