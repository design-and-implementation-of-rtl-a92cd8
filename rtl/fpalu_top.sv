// fpalu_top: pipelined 32-bit IEEE 754 floating point ALU with a single
// multiplexed operand bus, plus an integer to floating point converter.
//
// Operands arrive one per clock on `operand`. selop = 000 stores the bus in
// operand register a. Any other selop stores the bus in operand register b
// and starts an operation on a and b:
//   001 a + b   010 a - b   011 a * b   100 a / b      (floating point)
//   101 NOT a   110 a NAND b   111 a >> 1              (32-bit words)
// The input logic registers the operands and enables one of three units with
// the one-hot selmdl: the adder/subtractor, the multiplier/divider (both four
// stage pipelines) and the logical module (delayed to the same four cycles).
// The output logic picks the unit by the delayed selop and registers its
// result and error flag onto the pins.
//
// Timing: if the edge that samples a non-zero selop is edge 1, result and
// error show that operation's outcome after edge 6. An operation can be
// started on every clock; a stays loaded, so a sequence of operations can
// share it. result and error hold between operations. rst is synchronous and
// active high.
//
// error is set for overflow, underflow, division by zero, or an operand with
// an all-ones exponent field (result 7FC00000).
//
// conv_in/conv_out are the independent integer converter (sign-magnitude
// integer in, IEEE 754 single out, combinational); it shares nothing with the
// ALU.
//
// The 70 ALU pins, the operation codes, the bus multiplexing rule and the
// unit structure are the ALU's. Pipeline timing, rounding (truncation),
// special-value handling and the converter's separate ports are this
// design's choices.
module fpalu_top
  import fpalu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  selop,
  input  logic [31:0] operand,
  output logic [31:0] result,
  output logic        error,
  input  logic [31:0] conv_in,
  output logic [31:0] conv_out
);

  logic [31:0] a, b;
  selop_t      selop_q;
  logic [2:0]  selmdl;
  logic [31:0] res0, res1, res2;
  logic        err0, err1, err2;
  logic        vld0, vld1, vld2;

  input_logic u_in (
    .clk, .rst,
    .selop   (selop_t'(selop)),
    .operand,
    .a, .b, .selop_q, .selmdl
  );

  fp_addsub u_addsub (
    .clk, .rst,
    .en    (selmdl[MDL_ADDSUB]),
    .sub   (selop_q == SEL_SUB),
    .a, .b,
    .res   (res0), .err (err0), .valid (vld0)
  );

  fp_muldiv u_muldiv (
    .clk, .rst,
    .en    (selmdl[MDL_MULDIV]),
    .div   (selop_q == SEL_DIV),
    .a, .b,
    .res   (res1), .err (err1), .valid (vld1)
  );

  logical_module #(.DEPTH(UNIT_DEPTH)) u_logic (
    .clk, .rst,
    .en    (selmdl[MDL_LOGIC]),
    .op    (selop_q[1:0]),
    .a, .b,
    .res   (res2), .err (err2), .valid (vld2)
  );

  output_logic #(.DEPTH(UNIT_DEPTH)) u_out (
    .clk, .rst,
    .selop_q,
    .res0, .res1, .res2,
    .err0, .err1, .err2,
    .vld0, .vld1, .vld2,
    .result, .error
  );

  int_to_fp u_conv (
    .bin (conv_in),
    .fp  (conv_out)
  );

endmodule
