// fp_ref_pkg: reference models used by the testbenches of the floating point
// ALU. They compute results with exact wide-integer arithmetic (no guard bits,
// no pipelining) and then truncate, so they share no algorithm with the RTL:
//   add/sub: both significands placed on a common 300-bit integer grid,
//            summed exactly, leading one found, top 24 bits kept
//   mul:     exact 48-bit product, leading one found
//   div:     (a_sig * 2^60) / b_sig in 128 bits, leading one found
//   int->fp: integer converted through the simulator's double precision
// The conventions mirror the ALU: subnormal inputs are zero, an all-ones
// exponent gives 7FC00000 with error, overflow gives signed infinity with
// error, underflow gives signed zero with error, exact zero sums are +0.
package fp_ref_pkg;

  typedef struct packed {
    logic [31:0] res;
    logic        err;
  } ref_t;

  localparam logic [31:0] R_QNAN = 32'h7FC0_0000;

  function automatic int msb300(input logic [299:0] v);
    int p = -1;
    for (int i = 0; i < 300; i++) if (v[i]) p = i;
    return p;
  endfunction

  function automatic int msb128(input logic [127:0] v);
    int p = -1;
    for (int i = 0; i < 128; i++) if (v[i]) p = i;
    return p;
  endfunction

  // Pack biased exponent e and 24-bit significand (leading one at bit 23).
  function automatic ref_t pack(input logic s, input int e, input logic [23:0] m);
    ref_t r;
    if (e >= 255)    begin r.res = {s, 8'hFF, 23'd0}; r.err = 1'b1; end
    else if (e <= 0) begin r.res = {s, 31'd0};        r.err = 1'b1; end
    else             begin r.res = {s, 8'(e), m[22:0]}; r.err = 1'b0; end
    return r;
  endfunction

  function automatic ref_t ref_addsub(input logic [31:0] a, input logic [31:0] b,
                                      input logic sub);
    ref_t r;
    int ea = int'(a[30:23]), eb = int'(b[30:23]), base, p;
    logic sa = a[31], sb = b[31] ^ sub;
    logic [299:0] ia, ib, mag;
    logic signed [300:0] sum;
    if (ea == 255 || eb == 255) begin r.res = R_QNAN; r.err = 1'b1; return r; end
    ia = (ea == 0) ? '0 : 300'({1'b1, a[22:0]});
    ib = (eb == 0) ? '0 : 300'({1'b1, b[22:0]});
    base = (ea < eb) ? ea : eb;
    ia = ia << (ea - base);
    ib = ib << (eb - base);
    sum = (sa ? -$signed({1'b0, ia}) : $signed({1'b0, ia}))
        + (sb ? -$signed({1'b0, ib}) : $signed({1'b0, ib}));
    if (sum == 0) begin r.res = 32'd0; r.err = 1'b0; return r; end
    mag = (sum < 0) ? 300'(-sum) : 300'(sum);
    p = msb300(mag);
    return pack(sum < 0, p + base - 23,
                24'((p >= 23) ? (mag >> (p - 23)) : (mag << (23 - p))));
  endfunction

  function automatic ref_t ref_mul(input logic [31:0] a, input logic [31:0] b);
    ref_t r;
    int ea = int'(a[30:23]), eb = int'(b[30:23]), p;
    logic s = a[31] ^ b[31];
    logic [127:0] prod;
    if (ea == 255 || eb == 255) begin r.res = R_QNAN; r.err = 1'b1; return r; end
    if (ea == 0 || eb == 0) begin r.res = {s, 31'd0}; r.err = 1'b0; return r; end
    prod = 128'({1'b1, a[22:0]}) * 128'({1'b1, b[22:0]});
    p = msb128(prod);
    return pack(s, ea + eb - 127 + (p - 46), 24'(prod >> (p - 23)));
  endfunction

  function automatic ref_t ref_div(input logic [31:0] a, input logic [31:0] b);
    ref_t r;
    int ea = int'(a[30:23]), eb = int'(b[30:23]), p;
    logic s = a[31] ^ b[31];
    logic [127:0] q;
    if (ea == 255 || eb == 255) begin r.res = R_QNAN; r.err = 1'b1; return r; end
    if (eb == 0) begin r.res = {s, 8'hFF, 23'd0}; r.err = 1'b1; return r; end
    if (ea == 0) begin r.res = {s, 31'd0}; r.err = 1'b0; return r; end
    q = (128'({1'b1, a[22:0]}) << 60) / 128'({1'b1, b[22:0]});
    p = msb128(q);
    return pack(s, ea - eb + 127 + (p - 60), 24'(q >> (p - 23)));
  endfunction

  function automatic logic [31:0] ref_i2f(input logic [31:0] bin);
    logic [63:0] d;
    real         r;
    if (bin[30:0] == 0) return {bin[31], 31'd0};
    r = real'(int'({1'b0, bin[30:0]}));
    d = $realtobits(r);
    return {bin[31], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  // Random operand: mostly normal numbers with exponents spread around
  // `centre`, sometimes zero, an all-ones exponent or a subnormal.
  function automatic logic [31:0] rand_fp(input int centre, input int spread);
    int unsigned k = $urandom_range(99);
    int e;
    if (k < 3)  return {1'($urandom), 31'd0};
    if (k < 5)  return {1'($urandom), 8'hFF, 23'($urandom)};
    if (k < 7)  return {1'($urandom), 8'h00, 23'($urandom)};
    if (k < 12) return $urandom;
    e = centre + int'($urandom_range(2 * spread)) - spread;
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
