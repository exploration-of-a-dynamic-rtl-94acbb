// fp_accumulator: floating-point accumulator of the multiply-accumulate
// unit.
//
// Holds a running sum in a widened BF16 format: sign, 8-bit exponent (bias
// 127) and a 7 + GUARD_W bit mantissa, i.e. 16 + GUARD_W bits in all. The
// extra mantissa bits keep the truncation error of long dot products small;
// the output is the BF16 value of the sum (mantissa truncated to 7 bits).
//
// Operation, one addend per cycle:
//   in_valid & in_first : acc <= bias + addend   (start of a dot product)
//   in_valid & !in_first: acc <= acc  + addend
//   out_valid rises the cycle after an addend with in_last; sum is then the
//   finished dot product and stays valid until the next addend is taken.
//
// The adder is a plain single-cycle floating-point adder: swap so the
// larger magnitude comes first, align the smaller one with a right shift
// that keeps guard, round and sticky bits, add or subtract the significands,
// renormalise (one right shift, or a leading-zero count and left shift) and
// truncate. Results that fall below the smallest normal value become +0;
// results beyond the largest finite value saturate. Exact cancellation gives
// +0.
// That the accumulator is a simple floating-point one fed by the bias and
// 16 + 8 bits wide follows the thesis; the adder's internal organisation,
// truncation, saturation and the control signals are this design's choices.
module fp_accumulator
  import amul_pkg::*;
#(
  parameter int unsigned GUARD_W = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  bf16_t bias,
  input  bf16_t addend,
  output logic  out_valid,
  output bf16_t sum
);

  localparam int unsigned MW = BF16_MAN_W + GUARD_W;  // accumulator mantissa
  localparam int unsigned WW = MW + 4;                 // hidden + MW + G,R,S

  typedef struct packed {
    logic          sign;
    logic [7:0]    exp;
    logic [MW-1:0] man;
  } acc_t;

  function automatic acc_t widen(input bf16_t v);
    acc_t r;
    r.sign = v.sign;
    r.exp  = v.exp;
    r.man  = {v.man, {GUARD_W{1'b0}}};
    if (v.exp == '0) r = '0;
    return r;
  endfunction

  acc_t              acc_q, acc_d;
  acc_t              opa, opb, lrg, sml;
  logic [7:0]        dexp;
  logic [WW-1:0]     sig_lrg, sig_sml, sig_al, lost_mask;
  logic [WW:0]       raw, norm;
  logic              sticky;
  int unsigned       lz;
  logic signed [9:0] exp_r;

  always_comb begin
    lost_mask = '0;
    opa = in_first ? widen(bias) : acc_q;
    opb = widen(addend);
    if ({opa.exp, opa.man} >= {opb.exp, opb.man}) begin
      lrg = opa; sml = opb;
    end else begin
      lrg = opb; sml = opa;
    end

    dexp      = lrg.exp - sml.exp;
    sig_lrg   = {1'b1, lrg.man, 3'b000};
    sig_sml = {1'b1, sml.man, 3'b000};
    if (dexp >= 8'(WW)) begin
      sig_al = '0;
      sticky = 1'b1;
    end else begin
      lost_mask = (WW'(1) << dexp) - WW'(1);
      sig_al    = sig_sml >> dexp;
      sticky    = |(sig_sml & lost_mask);
    end
    sig_al[0] = sig_al[0] | sticky;

    if (lrg.sign == sml.sign)
      raw = {1'b0, sig_lrg} + {1'b0, sig_al};
    else
      raw = {1'b0, sig_lrg} - {1'b0, sig_al};

    // leading-zero count below the carry position
    lz = 0;
    for (int i = 0; i < int'(WW); i++)
      if (raw[WW-1-i] == 1'b0 && lz == i) lz = i + 1;
    if (raw[WW]) begin
      norm  = raw >> 1;
      exp_r = $signed({2'b00, lrg.exp}) + 10'sd1;
    end else begin
      norm  = raw << lz;
      exp_r = $signed({2'b00, lrg.exp}) - 10'(lz);
    end

    acc_d      = '0;
    acc_d.sign = lrg.sign;
    acc_d.exp  = exp_r[7:0];
    acc_d.man  = norm[WW-2 -: MW];
    if (sml.exp == '0)
      acc_d = lrg;                     // adding zero (covers 0 + 0)
    else if (raw == '0 || exp_r <= 0)
      acc_d = '0;                      // cancellation or underflow
    else if (exp_r >= 255) begin
      acc_d.exp = 8'hFE;               // saturate to the largest finite value
      acc_d.man = '1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) acc_q <= acc_d;
    end
  end

  always_comb begin
    sum.sign = acc_q.sign;
    sum.exp  = acc_q.exp;
    sum.man  = acc_q.man[MW-1 -: BF16_MAN_W];
  end

endmodule
