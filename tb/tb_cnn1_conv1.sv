// tb_cnn1_conv1: runs the first convolution layer of the small CIFAR-10
// CNN (3 -> 16 channels, 3x3 kernel, padding 1, 32x32 image, ReLU) through
// the layer datapath three times: all in LPC, all in NC, and with the mode
// chosen per weight by magnitude (LPC for |w| > 0.45, about the largest
// tenth of the weights, NC for the rest).
// Random image values in [0, 1) are encoded as BF16 features; random FP32
// weights in (-0.5, 0.5) and biases in (-0.1, 0.1) are used as trained
// parameters (batch normalisation taken as folded into them). Weights are
// up-scaled by 2^2 on conversion and scaled back in the multiplier.
// Every output (16 x 1024 dot products of 27 terms each, streamed back to
// back) is checked against the reference conversion/multiplication models
// summed exactly, within the accumulator's truncation error, and must
// arrive two cycles after its last term. The layer output is also
// compared with the exact FP32 convolution: the mean error relative to the
// mean output magnitude is printed for each run, and LPC must be more
// accurate than NC. The magnitude-selected run is checked bit-exactly like
// the others and its share of LPC products must be near one tenth; its
// output error is only printed, because with these untrained, uniformly
// spread weights the few large ones carry no special weight.
module tb_cnn1_conv1;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  localparam int H = 32, W = 32, CIN = 3, COUT = 16, SC = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0, relu_en = 1;
  bf16_t feature; fp32_t weight, bias; amul_mode_e mode;
  logic signed [SCALE_W-1:0] scale;
  logic out_valid; bf16_t result;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [15:0] img [CIN][H][W];
  logic [31:0] wt  [COUT][CIN][3][3];
  logic [31:0] bs  [COUT];

  typedef struct { int due; real val; real tol; real exact; } exp_t;
  exp_t expq[$];
  real err_sum, mag_sum;

  scheme2_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected out_valid");
        end else begin
          exp_t e;
          real g, want, d;
          e = expq.pop_front();
          g = bf16_real(result);
          want = (e.val < 0.0) ? 0.0 : e.val;
          if (e.due != cycle || g - want > e.tol || want - g > e.tol) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d (due %0d) got %g want %g", cycle, e.due, g, want);
          end
          d = g - e.exact; if (d < 0) d = -d;
          err_sum += d; mag_sum += e.exact;
        end
      end else if (expq.size() != 0 && expq[0].due < cycle) begin
        checks++; failures++;
        void'(expq.pop_front());
        $display("FAIL result missing");
      end
    end
  end

  localparam real MAG_THR = 0.45;
  int n_lpc_terms = 0, n_terms = 0;

  // policy: 0 = all NC, 1 = all LPC, 2 = LPC for large weights only
  task automatic run_layer(input int policy);
    for (int co = 0; co < COUT; co++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          real s, ex, mx, v;
          int n;
          s  = bf16_real(bs[co][31:16]);
          ex = fp32_real(bs[co]);
          mx = (s < 0) ? -s : s;
          n  = 0;
          for (int ci = 0; ci < CIN; ci++)
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++) begin
                logic [15:0] f;
                int iy, ix;
                bit lpc;
                real wr;
                wr  = fp32_real(wt[co][ci][ky][kx]);
                lpc = (policy == 1) || (policy == 2 && (wr > MAG_THR || wr < -MAG_THR));
                n_terms++; if (lpc) n_lpc_terms++;
                iy = y + ky - 1; ix = x + kx - 1;
                f = (iy < 0 || iy >= H || ix < 0 || ix >= W) ? 16'h0000 : img[ci][iy][ix];
                @(negedge clk);
                in_valid = 1; in_first = (n == 0); in_last = (n == CIN * 9 - 1);
                feature = f; weight = wt[co][ci][ky][kx]; bias = bs[co];
                mode = amul_mode_e'(lpc); scale = SCALE_W'(SC);
                v  = bf16_real(ref_mul(f, ref_fp32_to_fp8(wt[co][ci][ky][kx], SC), lpc, SC));
                s  = s + v;
                ex = ex + bf16_real(f) * fp32_real(wt[co][ci][ky][kx]);
                if (v < 0) v = -v; if (v > mx) mx = v;
                v = (s < 0) ? -s : s; if (v > mx) mx = v;
                n++;
              end
          if (ex < 0.0) ex = 0.0;
          expq.push_back('{due: cycle + 2, val: s, tol: (n + 2) * mx / 16384.0 + v / 128.0, exact: ex});
        end
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    repeat (4) @(negedge clk);
  endtask

  real rel_lpc, rel_nc, rel_mag, lpc_share;
  initial begin
    feature = '0; weight = '0; bias = '0; mode = MODE_NC; scale = '0;
    for (int c = 0; c < CIN; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[c][y][x] = 16'(real_to_fp32(real'($urandom_range(65535)) / 65536.0) >> 16);
    for (int o = 0; o < COUT; o++) begin
      bs[o] = real_to_fp32((real'($urandom_range(65535)) / 65536.0 - 0.5) * 0.2);
      for (int c = 0; c < CIN; c++)
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            wt[o][c][ky][kx] = real_to_fp32(real'($urandom_range(65535)) / 65536.0 - 0.5);
    end
    #22 rst_n = 1;
    err_sum = 0; mag_sum = 0;
    run_layer(1);
    rel_lpc = err_sum / mag_sum;
    err_sum = 0; mag_sum = 0;
    run_layer(0);
    rel_nc = err_sum / mag_sum;
    err_sum = 0; mag_sum = 0; n_terms = 0; n_lpc_terms = 0;
    run_layer(2);
    rel_mag = err_sum / mag_sum;
    lpc_share = real'(n_lpc_terms) / real'(n_terms);
    $display("conv1 mean output error vs FP32: LPC %f  NC %f  by magnitude %f (%0.1f%% of products in LPC)",
             rel_lpc, rel_nc, rel_mag, 100.0 * lpc_share);
    checks++;
    if (lpc_share < 0.05 || lpc_share > 0.2) begin
      failures++; $display("FAIL unexpected share of LPC products");
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL results missing"); end
    checks++;
    if (!(rel_lpc < rel_nc)) begin failures++; $display("FAIL LPC not more accurate than NC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
