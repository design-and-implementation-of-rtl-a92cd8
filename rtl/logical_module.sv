// logical_module: the ALU's logical unit (unit 2, outputs res2/err2).
//
// It works on the raw 32-bit words, not on floating point values:
//   op = 01  NOT a          (selop 101)
//   op = 10  a NAND b       (selop 110)
//   op = 11  a >> 1, logical, a zero enters bit 31   (selop 111)
// op is the low two bits of selop. The result passes through DEPTH register
// stages so that it leaves after the same number of cycles as the two
// arithmetic units; results of all three units then reach the output logic
// in issue order and never in the same cycle.
//
// Interface: en starts an operation; res, err and valid appear DEPTH rising
// edges after the edge that sampled en. err is raised only for op = 00,
// which is not a logical operation and which the input logic never issues.
//
// The three operations are the ALU's. The one-bit shift distance, the
// DEPTH-cycle latency and the meaning of err are this design's choices.
module logical_module
  import fpalu_pkg::*;
#(
  parameter int unsigned DEPTH = UNIT_DEPTH
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [1:0]  op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res,
  output logic        err,
  output logic        valid
);

  typedef struct packed {
    logic        v;
    logic        err;
    logic [31:0] res;
  } stage_t;

  stage_t d;
  stage_t pipe [DEPTH];

  always_comb begin
    d.v   = en;
    d.err = 1'b0;
    unique case (op)
      2'b01:   d.res = ~a;
      2'b10:   d.res = ~(a & b);
      2'b11:   d.res = {1'b0, a[31:1]};
      default: begin
        d.res = '0;
        d.err = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    pipe[0]   <= d;
    pipe[0].v <= rst ? 1'b0 : d.v;
    for (int i = 1; i < DEPTH; i++) begin
      pipe[i]   <= pipe[i-1];
      pipe[i].v <= rst ? 1'b0 : pipe[i-1].v;
    end
  end

  assign res   = pipe[DEPTH-1].res;
  assign err   = pipe[DEPTH-1].err;
  assign valid = pipe[DEPTH-1].v;

endmodule
