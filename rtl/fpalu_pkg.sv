// fpalu_pkg: types and constants shared by the floating point ALU.
//
// selop_t is the 3-bit operation code on the ALU's selop pins. Code 000 loads
// operand a from the shared bus; every other code starts an operation and
// takes the bus value as operand b. The code assignment is the one of the
// ALU's operation table. fp32_t is the IEEE 754 single precision layout
// (sign in bit 31, biased exponent in 30:23, fraction in 22:0).
package fpalu_pkg;

  typedef enum logic [2:0] {
    SEL_LOAD_A = 3'b000,
    SEL_ADD    = 3'b001,
    SEL_SUB    = 3'b010,
    SEL_MUL    = 3'b011,
    SEL_DIV    = 3'b100,
    SEL_NOT    = 3'b101,
    SEL_NAND   = 3'b110,
    SEL_SHR    = 3'b111
  } selop_t;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  localparam int unsigned EXP_BIAS = 127;
  localparam logic [7:0]  EXP_MAX  = 8'hFF;

  // Pipeline depth of each arithmetic unit ("four level pipelined").
  localparam int unsigned UNIT_DEPTH = 4;

  // Result given for an operand whose exponent field is all ones.
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Bit positions of the one-hot unit enable selmdl.
  localparam int unsigned MDL_ADDSUB = 0;
  localparam int unsigned MDL_MULDIV = 1;
  localparam int unsigned MDL_LOGIC  = 2;

  // Signed infinity and signed zero.
  function automatic logic [31:0] fp_inf(input logic s);
    return {s, EXP_MAX, 23'd0};
  endfunction

  function automatic logic [31:0] fp_zero(input logic s);
    return {s, 31'd0};
  endfunction

endpackage
