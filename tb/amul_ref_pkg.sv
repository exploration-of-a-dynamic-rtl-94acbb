// amul_ref_pkg: reference models used by the testbenches.
//
// Values are worked out from the number-format definitions and the
// multiplication equations directly, using plain integers and reals, so
// they do not depend on how the RTL is organised:
//   bf16_real / fp8_real / fp32_real  - value of an encoding
//   ref_mul                           - approximate product, BF16 x FP8
//   ref_fp32_to_fp8                   - weight conversion with up-scaling
//   real_to_fp32                      - encoding of a real value
package amul_ref_pkg;

  function automatic real pow2(input int e);
    return 2.0 ** real'(e);
  endfunction

  // Encode a real as FP32, truncating the mantissa; magnitudes below
  // 2^-126 give +0.
  function automatic logic [31:0] real_to_fp32(input real x);
    real a;
    int  e;
    a = (x < 0.0) ? -x : x;
    if (a < pow2(-126)) return 32'h0;
    e = int'($floor($ln(a) / $ln(2.0)));
    if (a < pow2(e)) e--;
    if (a >= pow2(e + 1)) e++;
    return {x < 0.0, 8'(e + 127), 23'(longint'($floor((a / pow2(e) - 1.0) * 8388608.0)))};
  endfunction

  function automatic real bf16_real(input logic [15:0] v);
    real r;
    if (v[14:7] == 0) return 0.0;
    r = (1.0 + real'(v[6:0]) / 128.0) * pow2(int'(v[14:7]) - 127);
    return v[15] ? -r : r;
  endfunction

  function automatic real fp8_real(input logic [7:0] v);
    real r;
    if (v[6:3] == 0) return 0.0;
    r = (1.0 + real'(v[2:0]) / 8.0) * pow2(int'(v[6:3]) - 7);
    return v[7] ? -r : r;
  endfunction

  function automatic real fp32_real(input logic [31:0] v);
    real r;
    if (v[30:23] == 0) return 0.0;
    r = (1.0 + real'(v[22:0]) / 8388608.0) * pow2(int'(v[30:23]) - 127);
    return v[31] ? -r : r;
  endfunction

  // Approximate product. With both mantissas as fractions x = mA/128 and
  // y = mB/8 the approximated significand is
  //   NC : 1 + x + y
  //   LPC: 1 + x + y + c,  c = (top 3 bits of x) * y, plus 2^-7
  // and a significand of 2 or more is renormalised by one binade:
  //   NC : 1 + (x + y - 1)            (no halving, Mitchell)
  //   LPC: (1 + x + y + c) / 2
  // Everything is kept in units of 2^-8 so the arithmetic stays exact.
  function automatic logic [15:0] ref_mul(input logic [15:0] f, input logic [7:0] w,
                                          input bit lpc, input int scale);
    int x8, y8, c8, s8, e, m;
    bit sgn;
    sgn = f[15] ^ w[7];
    if (f[14:7] == 0 || w[6:3] == 0) return 16'h0000;
    x8 = 2 * int'(f[6:0]);
    y8 = 32 * int'(w[2:0]);
    c8 = lpc ? (4 * int'(f[6:4]) * int'(w[2:0]) + 2) : 0;
    s8 = x8 + y8 + c8;                        // significand - 1, x256
    e  = int'(f[14:7]) + int'(w[6:3]) - 7 - scale;
    if (s8 >= 256) begin
      e = e + 1;
      if (lpc) m = (s8 - 256) / 4;            // ((1+s)/2 - 1) x128
      else     m = (s8 - 256) / 2;
    end else m = s8 / 2;
    if (e <= 0) return 16'h0000;
    if (e >= 255) return {sgn, 8'hFE, 7'h7F};
    return {sgn, 8'(e), 7'(m)};
  endfunction

  // FP32 -> FP8 (E4M3, bias 7) after multiplying by 2^scale: values below
  // 2^-6 become +0, values of 2^9 and above keep their truncated mantissa
  // with the largest exponent.
  function automatic logic [7:0] ref_fp32_to_fp8(input logic [31:0] v, input int scale);
    real a;
    int  e;
    int  m;
    if (v[30:23] == 0) return 8'h00;
    a = fp32_real(v);
    if (a < 0) a = -a;
    a = a * pow2(scale);
    if (a < pow2(-6)) return 8'h00;
    e = -6;
    while (a >= pow2(e + 1)) e++;
    m = int'($floor((a / pow2(e) - 1.0) * 8.0));
    if (e > 8) e = 8;
    return {v[31], 4'(e + 7), 3'(m)};
  endfunction

  // Random normal BF16 with exponent in [elo, ehi].
  function automatic logic [15:0] rand_bf16(input int elo, input int ehi);
    int e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 7'($urandom)};
  endfunction

endpackage
