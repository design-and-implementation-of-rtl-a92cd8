// fp_muldiv: four-stage pipelined IEEE 754 single precision multiplier and
// divider (unit 1 of the ALU, outputs res1/err1).
//
// The sign is the exclusive OR of the operand signs. For a product the biased
// exponents are added and the bias 127 subtracted; for a quotient the
// exponents are subtracted and the bias added back. The 24-bit significands
// (implicit 1 included) are multiplied into a 48-bit product, or divided into
// a quotient of at least 25 significant bits, and the result is normalized by
// at most one position.
//
//   stage 1  unpack, sign, exponent sum/difference, zero and divide-by-zero
//   stage 2  24 x 24 multiply, or (a_sig * 2^26) / b_sig divide
//   stage 3  normalize by one position, adjust exponent
//   stage 4  range check and pack
//
// Interface: en starts an operation on a, b and div (1 = a / b). res, err and
// valid appear 4 rising edges after the edge that sampled en; one operation
// may start every cycle. err flags a divisor of zero (result +/-infinity),
// overflow (+/-infinity), underflow (signed zero) and an operand whose
// exponent field is all ones (quiet NaN 7FC00000).
//
// Exponent, sign and divide-by-zero rules and the four-level pipeline follow
// the ALU's description. This design's own choices: truncation (round
// toward zero), subnormal inputs read as zero (so a subnormal divisor also
// counts as a divide by zero), the NaN and underflow rules, and the stage split.
module fp_muldiv
  import fpalu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        div,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res,
  output logic        err,
  output logic        valid
);

  // ------------------------------------------------------------ stage 1
  fp32_t fa, fb;
  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  logic               s1_v, s1_div, s1_sign, s1_nan, s1_dz, s1_zero;
  logic signed [10:0] s1_e;
  logic [23:0]        s1_ma, s1_mb;

  always_ff @(posedge clk) begin
    s1_v    <= rst ? 1'b0 : en;
    s1_div  <= div;
    s1_sign <= fa.sign ^ fb.sign;
    s1_nan  <= (fa.exp == EXP_MAX) || (fb.exp == EXP_MAX);
    s1_dz   <= div && (fb.exp == 8'd0);
    s1_zero <= (fa.exp == 8'd0) || (!div && fb.exp == 8'd0);
    s1_ma   <= {1'b1, fa.frac};
    s1_mb   <= {1'b1, fb.frac};
    // For a quotient the bias is 126 here: the normalization of stage 3 adds
    // one whenever the significand ratio is 1 or more.
    s1_e    <= div ? 11'(fa.exp) - 11'(fb.exp) + 11'sd126
                   : 11'(fa.exp) + 11'(fb.exp) - 11'sd127;
  end

  // ------------------------------------------------------------ stage 2
  // Both results are placed in a 48-bit field whose bit 47 or bit 46 holds the
  // leading one: a product lies in [2^46, 2^48); a quotient (a*2^26)/b lies in
  // [2^25, 2^27) and is shifted up by 21.
  logic [49:0] dividend;
  logic [26:0] quot;
  assign dividend = {s1_ma, 26'd0};
  assign quot     = 27'(dividend / 50'(s1_mb));

  logic               s2_v, s2_sign, s2_nan, s2_dz, s2_zero;
  logic signed [10:0] s2_e;
  logic [47:0]        s2_m;

  always_ff @(posedge clk) begin
    s2_v    <= rst ? 1'b0 : s1_v;
    s2_sign <= s1_sign;
    s2_nan  <= s1_nan;
    s2_dz   <= s1_dz;
    s2_zero <= s1_zero;
    s2_e    <= s1_e;
    s2_m    <= s1_div ? {quot, 21'd0} : s1_ma * s1_mb;
  end

  // ------------------------------------------------------------ stage 3
  logic               s3_v, s3_sign, s3_nan, s3_dz, s3_zero;
  logic signed [10:0] s3_e;
  logic [23:0]        s3_m;

  always_ff @(posedge clk) begin
    s3_v    <= rst ? 1'b0 : s2_v;
    s3_sign <= s2_sign;
    s3_nan  <= s2_nan;
    s3_dz   <= s2_dz;
    s3_zero <= s2_zero;
    if (s2_m[47]) begin
      s3_m <= s2_m[47:24];
      s3_e <= s2_e + 11'sd1;
    end else begin
      s3_m <= s2_m[46:23];
      s3_e <= s2_e;
    end
  end

  // ------------------------------------------------------------ stage 4
  logic [31:0] res_d;
  logic        err_d;

  always_comb begin
    err_d = 1'b1;
    if (s3_nan)                  res_d = QNAN;
    else if (s3_dz)              res_d = fp_inf(s3_sign);
    else if (s3_zero) begin
      res_d = fp_zero(s3_sign);
      err_d = 1'b0;
    end
    else if (s3_e >= 11'sd255)   res_d = fp_inf(s3_sign);
    else if (s3_e <= 11'sd0)     res_d = fp_zero(s3_sign);
    else begin
      res_d = {s3_sign, s3_e[7:0], s3_m[22:0]};
      err_d = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    valid <= rst ? 1'b0 : s3_v;
    res   <= res_d;
    err   <= err_d;
  end

endmodule
