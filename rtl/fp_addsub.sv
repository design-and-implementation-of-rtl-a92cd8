// fp_addsub: four-stage pipelined IEEE 754 single precision adder/subtractor
// (unit 0 of the ALU, outputs res0/err0).
//
// Pre-normalization comes first: the implicit leading 1 is inserted, the
// operands are ordered by magnitude, and the significand of the smaller one is
// shifted right by the exponent difference so both share the larger exponent.
// The aligned significands are then added, or subtracted when the effective
// signs differ, and the sum is renormalized and packed.
//
//   stage 1  unpack, effective sign of b (flipped for subtract), compare
//            magnitudes, swap so the larger operand comes first, exponent diff
//   stage 2  align: shift the smaller significand right by the difference,
//            keeping guard, round and sticky bits
//   stage 3  add or subtract the 27-bit significands (28-bit sum)
//   stage 4  leading-one search, normalize, exponent adjust, range check, pack
//
// Interface: en starts an operation on a, b and sub (1 = a - b). res, err and
// valid appear 4 rising edges after the edge that sampled en; one operation
// may start every cycle. err flags overflow (result +/-infinity), underflow
// (non-zero result too small for a normal number, result signed zero) and an
// operand whose exponent field is all ones (result quiet NaN 7FC00000).
//
// The pre-normalization steps, the four-level pipeline and the overflow and
// underflow flags follow the ALU's description. This design's own choices:
// truncation (round toward zero) of the result, subnormal inputs read as zero,
// an exact-zero sum returned as +0, the NaN rule, and the split of the work
// into the four stages.
module fp_addsub
  import fpalu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        sub,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res,
  output logic        err,
  output logic        valid
);

  // ------------------------------------------------------------ stage 1
  fp32_t      fa, fb;
  logic [23:0] ma, mb;
  logic        sb_eff, a_ge_b;

  always_comb begin
    fa     = fp32_t'(a);
    fb     = fp32_t'(b);
    // Implicit 1 unless the exponent field is zero (zero / flushed subnormal).
    ma     = (fa.exp == 8'd0) ? 24'd0 : {1'b1, fa.frac};
    mb     = (fb.exp == 8'd0) ? 24'd0 : {1'b1, fb.frac};
    sb_eff = fb.sign ^ sub;
    a_ge_b = {fa.exp, ma} >= {fb.exp, mb};
  end

  logic        s1_v, s1_nan, s1_sl, s1_ss;
  logic [7:0]  s1_el, s1_diff;
  logic [23:0] s1_ml, s1_ms;

  always_ff @(posedge clk) begin
    s1_v   <= rst ? 1'b0 : en;
    s1_nan <= (fa.exp == EXP_MAX) || (fb.exp == EXP_MAX);
    if (a_ge_b) begin
      s1_sl   <= fa.sign;  s1_el <= fa.exp;  s1_ml <= ma;
      s1_ss   <= sb_eff;   s1_ms <= mb;
      s1_diff <= fa.exp - fb.exp;
    end else begin
      s1_sl   <= sb_eff;   s1_el <= fb.exp;  s1_ml <= mb;
      s1_ss   <= fa.sign;  s1_ms <= ma;
      s1_diff <= fb.exp - fa.exp;
    end
  end

  // ------------------------------------------------------------ stage 2
  // Significands carry 3 extra bits below the LSB: guard, round, sticky.
  logic [49:0] shifted;
  logic [26:0] small_al;

  always_comb begin
    shifted = {s1_ms, 26'd0} >> s1_diff;
    // Up to a shift of 26 no bit leaves the 50-bit window; beyond that the
    // whole significand lies below the round bit and only sticky remains.
    if (s1_diff > 8'd26) small_al = {26'd0, |s1_ms};
    else                 small_al = {shifted[49:24], |shifted[23:0]};
  end

  logic        s2_v, s2_nan, s2_sign, s2_subop;
  logic [7:0]  s2_e;
  logic [26:0] s2_ml, s2_ms;

  always_ff @(posedge clk) begin
    s2_v     <= rst ? 1'b0 : s1_v;
    s2_nan   <= s1_nan;
    s2_sign  <= s1_sl;
    s2_subop <= s1_sl ^ s1_ss;
    s2_e     <= s1_el;
    s2_ml    <= {s1_ml, 3'b000};
    s2_ms    <= small_al;
  end

  // ------------------------------------------------------------ stage 3
  // The larger magnitude comes first, so the difference is never negative.
  logic        s3_v, s3_nan, s3_sign;
  logic [7:0]  s3_e;
  logic [27:0] s3_sum;

  always_ff @(posedge clk) begin
    s3_v    <= rst ? 1'b0 : s2_v;
    s3_nan  <= s2_nan;
    s3_sign <= s2_sign;
    s3_e    <= s2_e;
    s3_sum  <= s2_subop ? ({1'b0, s2_ml} - {1'b0, s2_ms})
                        : ({1'b0, s2_ml} + {1'b0, s2_ms});
  end

  // ------------------------------------------------------------ stage 4
  logic [4:0]         lz;
  logic [26:0]        norm;
  logic [23:0]        mant;
  logic signed [10:0] e_res;
  logic [31:0]        res_d;
  logic               err_d;

  always_comb begin
    // Leading zeros of the 27-bit sum below the carry bit.
    lz = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (s3_sum[i]) lz = 5'(26 - i);
    norm = s3_sum[26:0] << lz;

    if (s3_sum[27]) begin
      mant  = s3_sum[27:4];
      e_res = 11'(s3_e) + 11'sd1;
    end else begin
      mant  = norm[26:3];
      e_res = 11'(s3_e) - 11'(lz);
    end

    err_d = 1'b0;
    if (s3_nan) begin
      res_d = QNAN;
      err_d = 1'b1;
    end else if (s3_sum == 28'd0) begin
      res_d = fp_zero(1'b0);
    end else if (e_res >= 11'sd255) begin
      res_d = fp_inf(s3_sign);
      err_d = 1'b1;
    end else if (e_res <= 11'sd0) begin
      res_d = fp_zero(s3_sign);
      err_d = 1'b1;
    end else begin
      res_d = {s3_sign, e_res[7:0], mant[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    valid <= rst ? 1'b0 : s3_v;
    res   <= res_d;
    err   <= err_d;
  end

endmodule
