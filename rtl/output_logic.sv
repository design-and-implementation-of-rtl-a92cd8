// output_logic: routes the result of one of the three units of the ALU to
// the result and error pins.
//
// The selop registered by the input logic is delayed here by DEPTH cycles,
// the latency of the units, so that it arrives together with the result of
// the operation it started. It then selects:
//   001, 010  adder/subtractor    res0 / err0
//   011, 100  multiplier/divider  res1 / err1
//   101..111  logical module      res2 / err2
// and the choice is registered onto result and error. On a delayed selop of
// 000 (an operand load, not an operation) result and error keep their value.
//
// Timing: result/error change DEPTH + 1 rising edges after the input logic
// registered the operation. rst (synchronous) clears them to zero.
//
// Selecting by selop follows the ALU's description; the delay line, the
// holding of the last result and the reset values are this design's choices.
// The unit valid bits are only checked by an assertion.
module output_logic
  import fpalu_pkg::*;
#(
  parameter int unsigned DEPTH = UNIT_DEPTH
) (
  input  logic        clk,
  input  logic        rst,
  input  selop_t      selop_q,
  input  logic [31:0] res0,
  input  logic [31:0] res1,
  input  logic [31:0] res2,
  input  logic        err0,
  input  logic        err1,
  input  logic        err2,
  input  logic        vld0,
  input  logic        vld1,
  input  logic        vld2,
  output logic [31:0] result,
  output logic        error
);

  selop_t sel_dly [DEPTH];
  selop_t sel;
  assign sel = sel_dly[DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sel_dly[i] <= SEL_LOAD_A;
    end else begin
      sel_dly[0] <= selop_q;
      for (int i = 1; i < DEPTH; i++) sel_dly[i] <= sel_dly[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
      error  <= 1'b0;
    end else begin
      unique case (sel)
        SEL_LOAD_A: ;
        SEL_ADD, SEL_SUB: begin
          result <= res0;
          error  <= err0;
        end
        SEL_MUL, SEL_DIV: begin
          result <= res1;
          error  <= err1;
        end
        SEL_NOT, SEL_NAND, SEL_SHR: begin
          result <= res2;
          error  <= err2;
        end
      endcase
    end
  end

  // The unit chosen by the delayed selop must be delivering a result.
  assert property (@(posedge clk) disable iff (rst)
    (sel inside {SEL_ADD, SEL_SUB}) |-> vld0);
  assert property (@(posedge clk) disable iff (rst)
    (sel inside {SEL_MUL, SEL_DIV}) |-> vld1);
  assert property (@(posedge clk) disable iff (rst)
    (sel inside {SEL_NOT, SEL_NAND, SEL_SHR}) |-> vld2);

endmodule
