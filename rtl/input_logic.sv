// input_logic: demultiplexes the ALU's single operand bus into the operand
// registers a and b and decodes selop into a one-hot unit enable (selmdl).
//
// The ALU has one 32-bit data bus, so the two operands arrive one after the
// other. On a rising clock edge with selop = 000 the bus is stored in a; with
// any other selop the bus is stored in b and the operation starts: selop is
// registered next to a and b, and exactly one bit of selmdl is raised for one
// cycle (bit 0 adder/subtractor, bit 1 multiplier/divider, bit 2 logical
// module). a is kept across operations, so a chain of operations can reuse it.
//
// Timing: a, b, selop_q and selmdl are all valid in the cycle after the edge
// that sampled the bus. rst is synchronous and active high.
//
// The load-a/load-b rule and the selop codes are the ALU's; the one-hot
// width of selmdl and the reset values are this design's choices.
module input_logic
  import fpalu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  selop_t      selop,
  input  logic [31:0] operand,
  output logic [31:0] a,
  output logic [31:0] b,
  output selop_t      selop_q,
  output logic [2:0]  selmdl
);

  logic [2:0] selmdl_d;

  always_comb begin
    selmdl_d = '0;
    unique case (selop)
      SEL_LOAD_A:              selmdl_d = '0;
      SEL_ADD, SEL_SUB:        selmdl_d[MDL_ADDSUB] = 1'b1;
      SEL_MUL, SEL_DIV:        selmdl_d[MDL_MULDIV] = 1'b1;
      SEL_NOT, SEL_NAND,
      SEL_SHR:                 selmdl_d[MDL_LOGIC]  = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a       <= '0;
      b       <= '0;
      selop_q <= SEL_LOAD_A;
      selmdl  <= '0;
    end else begin
      if (selop == SEL_LOAD_A) a <= operand;
      else                     b <= operand;
      selop_q <= selop;
      selmdl  <= selmdl_d;
    end
  end

  // At most one unit is ever activated.
  assert property (@(posedge clk) disable iff (rst) $onehot0(selmdl));

endmodule
