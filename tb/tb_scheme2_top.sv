// tb_scheme2_top: end-to-end test of the scheme-2 layer datapath at its
// default parameters.
// Runs small fully connected layers: each output neuron is one dot product
// of BF16 features with FP32 weights plus an FP32 bias, followed by ReLU
// (or no activation for a "classifier" layer). Per layer the precision mode
// is chosen NC, LPC, or mixed per weight (LPC only for weights of large
// magnitude), and the weight scaling exponent is chosen so that small
// weights keep their precision. The expected output is formed from the
// reference conversion and multiplication models and summed exactly in
// double precision; results must match within the accumulator's
// truncation error and appear two cycles after the last term.
// Each mechanism of the design is counted and must occur at least once:
// NC and LPC products, a mode switch inside a dot product, mantissa
// overflow (carry) in NC and in LPC, weight up-scaling, weights flushed to
// zero, weights clamped at the top exponent, zero features, ReLU clipping,
// ReLU bypass, back-to-back dot products and idle cycles inside one.
module tb_scheme2_top;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0, relu_en = 0;
  bf16_t feature; fp32_t weight, bias; amul_mode_e mode;
  logic signed [SCALE_W-1:0] scale;
  logic out_valid; bf16_t result;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef enum int {EV_NC, EV_LPC, EV_SWITCH, EV_CARRY_NC, EV_CARRY_LPC, EV_SCALED,
                    EV_W_UFLOW, EV_W_CLAMP, EV_F_ZERO, EV_RELU_CLIP, EV_RELU_OFF,
                    EV_B2B, EV_GAP, EV_NUM} ev_e;
  int ev[EV_NUM];
  string ev_name[EV_NUM] = '{"nc", "lpc", "mode_switch", "carry_nc", "carry_lpc", "scaled",
                             "weight_underflow", "weight_clamp", "zero_feature", "relu_clip",
                             "relu_bypass", "back_to_back", "idle_gap"};

  typedef struct { int due; real val; real tol; bit relu; } exp_t;
  exp_t expq[$];

  scheme2_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50000000;
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
          real g, want;
          e = expq.pop_front();
          g = bf16_real(result);
          want = (e.relu && e.val < 0.0) ? 0.0 : e.val;
          if (e.relu && e.val < -e.tol) ev[EV_RELU_CLIP]++;
          if (!e.relu) ev[EV_RELU_OFF]++;
          if (e.due != cycle || g - want > e.tol || want - g > e.tol || (e.relu && g < 0.0)) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d (due %0d) got %g want %g tol %g", cycle, e.due, g, want, e.tol);
          end
        end
      end else if (expq.size() != 0 && expq[0].due < cycle) begin
        checks++; failures++;
        void'(expq.pop_front());
        $display("FAIL result missing");
      end
    end
  end

  // random FP32 weight of magnitude about 2^(e-127)
  function automatic logic [31:0] rand_w(input int elo, input int ehi);
    return {1'($urandom), 8'(elo + int'($urandom_range(ehi - elo))), 23'($urandom)};
  endfunction

  // one output neuron
  task automatic neuron(input int n, input int lmode, input int sc, input bit relu, input int wlo, input int whi);
    real s, mx, v;
    logic [31:0] b;
    logic [15:0] bb;
    amul_mode_e prev;
    b = rand_w(wlo, whi);
    bb = {b[31:16]};
    s = bf16_real(bb); mx = (s < 0) ? -s : s;
    if ($urandom % 2 == 0 || cycle < 5) begin
      @(negedge clk); in_valid = 0; @(negedge clk);
    end else ev[EV_B2B]++;
    prev = MODE_NC;
    for (int i = 0; i < n; i++) begin
      logic [15:0] f; logic [31:0] w; logic [7:0] w8; bit lpc; int c8;
      if (i > 0 && $urandom % 10 == 0) begin
        @(negedge clk); in_valid = 0; ev[EV_GAP]++;
      end
      @(negedge clk);
      f = ($urandom % 16 == 0) ? 16'h0000 : rand_bf16(122, 130);
      if (f == 0) ev[EV_F_ZERO]++;
      w = ($urandom % 20 == 0) ? rand_w(95, 105) : ($urandom % 40 == 0) ? rand_w(136, 138) : rand_w(wlo, whi);
      w8 = ref_fp32_to_fp8(w, sc);
      if (w8 == 0) ev[EV_W_UFLOW]++;
      if (int'(w[30:23]) + sc > 135) ev[EV_W_CLAMP]++;
      case (lmode)
        0: lpc = 0;
        1: lpc = 1;
        default: lpc = (int'(w[30:23]) + sc >= 126);   // precise mode for large weights
      endcase
      if (lpc) ev[EV_LPC]++; else ev[EV_NC]++;
      if (i > 0 && amul_mode_e'(lpc) != prev) ev[EV_SWITCH]++;
      prev = amul_mode_e'(lpc);
      if (sc != 0) ev[EV_SCALED]++;
      c8 = 2 * int'(f[6:0]) + 32 * int'(w8[2:0]) + (lpc ? 4 * int'(f[6:4]) * int'(w8[2:0]) + 2 : 0);
      if (f[14:7] != 0 && w8[6:3] != 0 && c8 >= 256) begin
        if (lpc) ev[EV_CARRY_LPC]++; else ev[EV_CARRY_NC]++;
      end
      in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
      feature = f; weight = w; mode = amul_mode_e'(lpc); scale = SCALE_W'(sc);
      bias = (i == 0) ? fp32_t'(b) : fp32_t'($urandom);
      relu_en = (i == n - 1) ? relu : 1'($urandom);
      v = bf16_real(ref_mul(f, w8, lpc, sc));
      s = s + v;
      if (v < 0) v = -v; if (v > mx) mx = v;
      v = (s < 0) ? -s : s; if (v > mx) mx = v;
      if (i == n - 1)
        expq.push_back('{due: cycle + 2, val: s, tol: (n + 2) * mx / 16384.0 + v / 128.0, relu: relu});
    end
  endtask

  initial begin
    feature = '0; weight = '0; bias = '0; mode = MODE_NC; scale = '0;
    #22 rst_n = 1;
    // a few layers: (inputs, outputs, mode 0=NC 1=LPC 2=mixed, scale, relu)
    for (int layer = 0; layer < 12; layer++) begin
      int nin, nout, lmode, sc, wlo, whi;
      bit relu;
      nin   = 8 + int'($urandom_range(40));
      nout  = 4 + int'($urandom_range(8));
      lmode = layer % 3;
      relu  = (layer % 4 != 3);
      // small weights: up-scale them by 2^4 so they stay inside FP8 range
      if (layer % 2 == 0) begin sc = 4; wlo = 112; whi = 124; end
      else begin sc = 0; wlo = 118; whi = 128; end
      for (int o = 0; o < nout; o++) neuron(nin, lmode, sc, relu, wlo, whi);
    end
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    for (int k = 0; k < EV_NUM; k++) begin
      $display("event %-16s %0d", ev_name[k], ev[k]);
      checks++;
      if (ev[k] == 0) begin failures++; $display("FAIL event %s never happened", ev_name[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
