// tb_cnn_inference: forward passes of three of the evaluated CIFAR-10
// networks through the layer datapath, every multiply-accumulate done by
// the hardware.
//   CNN1   : conv 3->16, conv 16->32, conv 32->64 (3x3, pad 1, ReLU, 2x2
//            max pool each), linear 1024->10.
//   CNN2   : conv 3->32, conv 32->64, conv 64->128 (same), linear
//            2048->512 with ReLU, linear 512->10.
//   ResNet9: conv 3->16; two basic blocks of 16 channels at 32x32; a
//            basic block 16->32 with stride 2 and a 1x1 stride-2 shortcut
//            convolution, and one of 32 channels, at 16x16; global average
//            pool; linear 32->10.
//   MobileNetV2 (CIFAR variant, first convolution with stride 1): conv
//            3->32, 17 inverted-residual blocks (1x1 expansion, 3x3
//            depthwise, 1x1 linear projection, identity shortcut where
//            shapes allow), conv 1x1 320->1280, global average pool,
//            linear 1280->10. Its ReLU6 is the datapath's ReLU followed by
//            a clamp at 6 done here, as the clamp is not part of the
//            datapath.
// Layer-wise mixed precision: the first layer of each network runs in
// LPC, all others in NC. Weights are pseudo-random (a hash of layer and index, uniform within
// +-1.7/sqrt(fan-in)), biases small, the 32x32x3 input image random in
// [0, 1); batch normalisation is taken as folded into weights and biases.
// Weights are up-scaled by 2^3 on conversion.
// A residual connection is fed to the MAC as extra terms of the block's
// second convolution: the shortcut value times a weight of exactly 1.0 in
// NC mode (exact in NC; LPC would add 2^-7), or the terms of the 1x1
// shortcut convolution. Global average pooling is a dot product with
// weights 2^-8. Max pooling and flattening are done here on the BF16
// outputs, as they are not part of the datapath.
// Checks: every dot product against the reference conversion and
// multiplication models summed exactly (within the accumulator's
// truncation error) and its two-cycle latency. An exact FP32 forward pass
// runs alongside; the relative error of the final logits is printed
// (with untrained random weights it says nothing about accuracy).
module tb_cnn_inference;
  import amul_pkg::*;
  import amul_ref_pkg::*;
  localparam int SC = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0, relu_en = 0;
  bf16_t feature; fp32_t weight, bias; amul_mode_e mode;
  logic signed [SCALE_W-1:0] scale;
  logic out_valid; bf16_t result;
  int checks = 0, failures = 0;
  int cycle = 0;
  longint n_mac = 0;
  bit last_lpc = 1'b0;
  int n_lpc_layers = 0, n_nc_layers = 0, n_switch = 0, n_residual = 0, n_shortcut = 0, n_clamp6 = 0;

  typedef struct { int due; real val; real tol; bit relu; int idx; } exp_t;
  exp_t expq[$];

  logic [15:0] fm[], nfm[];   // hardware feature maps (BF16)
  real         fx[], nfx[];   // exact feature maps

  scheme2_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000000;
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
          if (e.due != cycle || g - want > e.tol || want - g > e.tol) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d (due %0d) got %g want %g", cycle, e.due, g, want);
          end
          nfm[e.idx] = result;
        end
      end else if (expq.size() != 0 && expq[0].due < cycle) begin
        checks++; failures++;
        void'(expq.pop_front());
        $display("FAIL result missing");
      end
    end
  end

  function automatic real hval(input int l, input int o, input int i);
    int unsigned h;
    h = (l * 32'h9E3779B1) ^ (o * 32'h85EBCA77) ^ (i * 32'hC2B2AE3D) ^ 32'h27D4EB2F;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12; h *= 32'h297A2D39; h ^= h >> 15;
    return real'(h & 32'hFFFF) / 65536.0 - 0.5;   // [-0.5, 0.5)
  endfunction

  // One dot product; each term has its own precision mode.
  task automatic dot(input logic [15:0] f[], input logic [31:0] w[], input real xf[],
                     input bit lpcs[], input logic [31:0] b, input bit relu, input int idx);
    real s, mx, v, ex;
    int n;
    n  = f.size();
    s  = bf16_real(b[31:16]);
    ex = fp32_real(b);
    mx = (s < 0) ? -s : s;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
      feature = f[i]; weight = w[i]; bias = b;
      mode = amul_mode_e'(lpcs[i]); scale = SCALE_W'(SC); relu_en = relu;
      if (lpcs[i] != last_lpc) n_switch++;
      last_lpc = lpcs[i];
      v  = bf16_real(ref_mul(f[i], ref_fp32_to_fp8(w[i], SC), lpcs[i], SC));
      s  = s + v;
      ex = ex + xf[i] * fp32_real(w[i]);
      if (v < 0) v = -v; if (v > mx) mx = v;
      v = (s < 0) ? -s : s; if (v > mx) mx = v;
    end
    n_mac += n;
    expq.push_back('{due: cycle + 2, val: s, tol: (n + 2) * mx / 16384.0 + v / 128.0,
                     relu: relu, idx: idx});
    nfx[idx] = (relu && ex < 0.0) ? 0.0 : ex;
  endtask

  task automatic drain();
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    repeat (4) @(negedge clk);
  endtask

  // k x k convolution with padding (k-1)/2 and the given stride on a
  // cin x hw x hw map (fm/fx), result in fm/fx. rmode adds a residual to
  // every output: 1 = identity shortcut from rfm/rfx, 2 = 1x1 convolution
  // with stride 2 of the rcin-channel map rfm/rfx (layer l + 50).
  task automatic conv(input int l, input int cin, input int cout, input int hw, input int k,
                      input int stride, input bit relu, input bit lpc, input int rmode,
                      input logic [15:0] rfm[], input real rfx[], input int rcin, input int rhw);
    logic [15:0] f[$]; logic [31:0] w[$]; real xf[$]; bit lp[$];
    real lim, lim_sc;
    int ho, pad;
    ho  = hw / stride;
    pad = (k - 1) / 2;
    lim = 2.0 * 1.7 / $sqrt(real'(cin * k * k));
    lim_sc = 2.0 * 1.7 / $sqrt(real'(rcin));
    if (lpc) n_lpc_layers++; else n_nc_layers++;
    nfm = new[cout * ho * ho]; nfx = new[cout * ho * ho];
    for (int co = 0; co < cout; co++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < ho; x++) begin
          int t = 0;
          f.delete(); w.delete(); xf.delete(); lp.delete();
          for (int ci = 0; ci < cin; ci++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = y * stride + ky - pad, ix = x * stride + kx - pad;
                bit pd = (iy < 0 || iy >= hw || ix < 0 || ix >= hw);
                f.push_back(pd ? 16'h0000 : fm[(ci * hw + iy) * hw + ix]);
                xf.push_back(pd ? 0.0 : fx[(ci * hw + iy) * hw + ix]);
                w.push_back(real_to_fp32(lim * hval(l, co, t)));
                lp.push_back(lpc);
                t++;
              end
          if (rmode == 1) begin
            f.push_back(rfm[(co * rhw + y) * rhw + x]);
            xf.push_back(rfx[(co * rhw + y) * rhw + x]);
            w.push_back(32'h3F80_0000);            // 1.0
            lp.push_back(1'b0);
            n_residual++;
          end else if (rmode == 2) begin
            for (int ci = 0; ci < rcin; ci++) begin
              f.push_back(rfm[(ci * rhw + 2 * y) * rhw + 2 * x]);
              xf.push_back(rfx[(ci * rhw + 2 * y) * rhw + 2 * x]);
              w.push_back(real_to_fp32(lim_sc * hval(l + 50, co, ci)));
              lp.push_back(lpc);
            end
            n_shortcut++;
          end
          dot(f, w, xf, lp, real_to_fp32(0.1 * hval(l + 100, co, 0)), relu, (co * ho + y) * ho + x);
        end
    drain();
    fm = nfm; fx = nfx;
  endtask

  task automatic maxpool(input int c_n, input int hw);
    logic [15:0] pm[]; real px[];
    pm = new[c_n * hw * hw / 4]; px = new[c_n * hw * hw / 4];
    for (int c = 0; c < c_n; c++)
      for (int y = 0; y < hw / 2; y++)
        for (int x = 0; x < hw / 2; x++) begin
          logic [15:0] m; real mxr;
          m = fm[(c * hw + 2 * y) * hw + 2 * x]; mxr = fx[(c * hw + 2 * y) * hw + 2 * x];
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++) begin
              int j = (c * hw + 2 * y + dy) * hw + 2 * x + dx;
              if (bf16_real(fm[j]) > bf16_real(m)) m = fm[j];
              if (fx[j] > mxr) mxr = fx[j];
            end
          pm[(c * (hw / 2) + y) * (hw / 2) + x] = m;
          px[(c * (hw / 2) + y) * (hw / 2) + x] = mxr;
        end
    fm = pm; fx = px;
  endtask

  // global average pool as one dot product per channel, weights 2^-8
  task automatic avgpool(input int c_n, input int hw);
    logic [15:0] f[]; logic [31:0] w[]; real xf[]; bit lp[];
    f = new[hw * hw]; w = new[hw * hw]; xf = new[hw * hw]; lp = new[hw * hw];
    nfm = new[c_n]; nfx = new[c_n];
    for (int c = 0; c < c_n; c++) begin
      for (int i = 0; i < hw * hw; i++) begin
        f[i] = fm[c * hw * hw + i]; xf[i] = fx[c * hw * hw + i];
        w[i] = real_to_fp32(1.0 / real'(hw * hw)); lp[i] = 1'b0;
      end
      dot(f, w, xf, lp, 32'h0, 1'b0, c);
    end
    drain();
    fm = nfm; fx = nfx;
  endtask

  // 3x3 depthwise convolution, padding 1, on a c x hw x hw map
  task automatic dwconv(input int l, input int c_n, input int hw, input int stride, input bit lpc);
    logic [15:0] f[]; logic [31:0] w[]; real xf[]; bit lp[];
    real lim;
    int ho;
    ho  = hw / stride;
    lim = 2.0 * 1.7 / 3.0;
    if (lpc) n_lpc_layers++; else n_nc_layers++;
    f = new[9]; w = new[9]; xf = new[9]; lp = new[9];
    nfm = new[c_n * ho * ho]; nfx = new[c_n * ho * ho];
    for (int c = 0; c < c_n; c++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < ho; x++) begin
          for (int t = 0; t < 9; t++) begin
            int iy = y * stride + t / 3 - 1, ix = x * stride + t % 3 - 1;
            bit pd = (iy < 0 || iy >= hw || ix < 0 || ix >= hw);
            f[t]  = pd ? 16'h0000 : fm[(c * hw + iy) * hw + ix];
            xf[t] = pd ? 0.0 : fx[(c * hw + iy) * hw + ix];
            w[t]  = real_to_fp32(lim * hval(l, c, t));
            lp[t] = lpc;
          end
          dot(f, w, xf, lp, real_to_fp32(0.1 * hval(l + 100, c, 0)), 1'b1, (c * ho + y) * ho + x);
        end
    drain();
    fm = nfm; fx = nfx;
  endtask

  // upper clamp of ReLU6
  task automatic clamp6();
    for (int i = 0; i < fm.size(); i++) begin
      if (bf16_real(fm[i]) > 6.0) begin fm[i] = 16'h40C0; n_clamp6++; end
      if (fx[i] > 6.0) fx[i] = 6.0;
    end
  endtask

  task automatic linear(input int l, input int nin, input int nout, input bit relu, input bit lpc);
    logic [31:0] w[]; bit lp[];
    real lim;
    lim = 2.0 * 1.7 / $sqrt(real'(nin));
    if (lpc) n_lpc_layers++; else n_nc_layers++;
    nfm = new[nout]; nfx = new[nout];
    w = new[nin]; lp = new[nin];
    for (int o = 0; o < nout; o++) begin
      for (int i = 0; i < nin; i++) begin
        w[i] = real_to_fp32(lim * hval(l, o, i)); lp[i] = lpc;
      end
      dot(fm, w, fx, lp, real_to_fp32(0.1 * hval(l + 100, o, 0)), relu, o);
    end
    drain();
    fm = nfm; fx = nfx;
  endtask

  task automatic load_image();
    fm = new[3 * 32 * 32]; fx = new[3 * 32 * 32];
    for (int i = 0; i < 3 * 32 * 32; i++) begin
      fm[i] = real_to_fp32(real'($urandom_range(65535)) / 65536.0) >> 16;
      fx[i] = bf16_real(fm[i]);
    end
  endtask

  task automatic report(input string name);
    real e = 0.0, m = 0.0;
    for (int i = 0; i < fm.size(); i++) begin
      real d = bf16_real(fm[i]) - fx[i];
      e += (d < 0) ? -d : d;
      m += (fx[i] < 0) ? -fx[i] : fx[i];
    end
    $display("%s: %0d MACs so far, logits mean error vs FP32 %f", name, n_mac, e / m);
  endtask

  // ResNet basic block at hw x hw; stride 2 with a 1x1 shortcut when
  // cin != cout
  task automatic basic_block(input int l, input int cin, input int cout, input int hw);
    logic [15:0] xm[]; real xr[];
    xm = fm; xr = fx;
    if (cin == cout) begin
      conv(l, cin, cout, hw, 3, 1, 1'b1, 1'b0, 0, xm, xr, 0, 0);
      conv(l + 1, cout, cout, hw, 3, 1, 1'b1, 1'b0, 1, xm, xr, cin, hw);
    end else begin
      conv(l, cin, cout, hw, 3, 2, 1'b1, 1'b0, 0, xm, xr, 0, 0);
      conv(l + 1, cout, cout, hw / 2, 3, 1, 1'b1, 1'b0, 2, xm, xr, cin, hw);
    end
  endtask

  // MobileNetV2 inverted residual block
  task automatic inv_res(inout int l, input int cin, input int cout, input int hw,
                         input int stride, input int t);
    logic [15:0] xm[]; real xr[];
    int hid;
    xm = fm; xr = fx;
    hid = cin * t;
    if (t != 1) begin
      conv(l, cin, hid, hw, 1, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0); clamp6();
    end
    dwconv(l + 1, hid, hw, stride, 1'b0); clamp6();
    if (stride == 1 && cin == cout)
      conv(l + 2, hid, cout, hw / stride, 1, 1, 1'b0, 1'b0, 1, xm, xr, cin, hw);
    else
      conv(l + 2, hid, cout, hw / stride, 1, 1, 1'b0, 1'b0, 0, none_m, none_r, 0, 0);
    l = l + 3;
  endtask

  task automatic mobilenetv2();
    int tcns[7][4] = '{'{1, 16, 1, 1}, '{6, 24, 2, 2}, '{6, 32, 3, 2}, '{6, 64, 4, 2},
                       '{6, 96, 3, 1}, '{6, 160, 3, 2}, '{6, 320, 1, 1}};
    int l, c, hw;
    l = 41; c = 32; hw = 32;
    conv(40, 3, 32, 32, 3, 1, 1'b1, 1'b1, 0, none_m, none_r, 0, 0); clamp6();
    for (int s = 0; s < 7; s++)
      for (int r = 0; r < tcns[s][2]; r++) begin
        int st = (r == 0) ? tcns[s][3] : 1;
        inv_res(l, c, tcns[s][1], hw, st, tcns[s][0]);
        c = tcns[s][1]; hw = hw / st;
      end
    conv(l, c, 1280, hw, 1, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0); clamp6();
    avgpool(1280, hw);
    linear(l + 1, 1280, 10, 1'b0, 1'b0);
  endtask

  logic [15:0] none_m[]; real none_r[];

  initial begin
    feature = '0; weight = '0; bias = '0; mode = MODE_NC; scale = '0;
    #22 rst_n = 1;
    // CNN1
    load_image();
    conv(1, 3, 16, 32, 3, 1, 1'b1, 1'b1, 0, none_m, none_r, 0, 0);  maxpool(16, 32);
    conv(2, 16, 32, 16, 3, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0); maxpool(32, 16);
    conv(3, 32, 64, 8, 3, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0);  maxpool(64, 8);
    linear(4, 64 * 4 * 4, 10, 1'b0, 1'b0);
    report("CNN1");
    // CNN2
    load_image();
    conv(11, 3, 32, 32, 3, 1, 1'b1, 1'b1, 0, none_m, none_r, 0, 0);  maxpool(32, 32);
    conv(12, 32, 64, 16, 3, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0); maxpool(64, 16);
    conv(13, 64, 128, 8, 3, 1, 1'b1, 1'b0, 0, none_m, none_r, 0, 0); maxpool(128, 8);
    linear(14, 128 * 4 * 4, 512, 1'b1, 1'b0);
    linear(15, 512, 10, 1'b0, 1'b0);
    report("CNN2");
    // ResNet9
    load_image();
    conv(21, 3, 16, 32, 3, 1, 1'b1, 1'b1, 0, none_m, none_r, 0, 0);
    basic_block(22, 16, 16, 32);
    basic_block(24, 16, 16, 32);
    basic_block(26, 16, 32, 32);
    basic_block(28, 32, 32, 16);
    avgpool(32, 16);
    linear(30, 32, 10, 1'b0, 1'b0);
    report("ResNet9");
    // MobileNetV2
    load_image();
    mobilenetv2();
    report("MobileNetV2");
    $display("layers: lpc=%0d nc=%0d, mode switches=%0d, residual adds=%0d, shortcut convs=%0d, relu6 clamps=%0d",
             n_lpc_layers, n_nc_layers, n_switch, n_residual, n_shortcut, n_clamp6);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL results missing"); end
    checks++;
    if (n_lpc_layers == 0 || n_nc_layers == 0 || n_switch == 0 || n_residual == 0 || n_shortcut == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
