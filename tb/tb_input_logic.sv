// tb_input_logic: checks the operand bus demultiplexer. Random selop/operand
// sequences are applied; a model of the a/b registers predicts the outputs,
// and selmdl must name the right unit one cycle after the bus was sampled.
module tb_input_logic;
  import fpalu_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  selop_t      selop = SEL_LOAD_A;
  logic [31:0] operand = '0, a, b;
  selop_t      selop_q;
  logic [2:0]  selmdl;
  int          checks = 0, failures = 0;

  logic [31:0] ma = '0, mb = '0;
  logic [2:0]  exp_mdl = '0;
  selop_t      exp_sel = SEL_LOAD_A;

  input_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      selop   = selop_t'($urandom_range(7));
      if (n % 4 == 0) selop = SEL_LOAD_A;
      operand = $urandom;
      // Model: 000 loads a, every other code loads b and enables one unit.
      if (selop == SEL_LOAD_A) begin ma = operand; exp_mdl = 3'b000; end
      else begin
        mb = operand;
        exp_mdl = (selop inside {SEL_ADD, SEL_SUB}) ? 3'b001 :
                  (selop inside {SEL_MUL, SEL_DIV}) ? 3'b010 : 3'b100;
      end
      exp_sel = selop;
      @(negedge clk);
      chk(a == ma, "a");
      chk(b == mb, "b");
      chk(selop_q == exp_sel, "selop_q");
      chk(selmdl == exp_mdl, "selmdl");
      // Hold the bus at load-a between operations half of the time.
      if ($urandom_range(1) == 0) begin
        selop = SEL_LOAD_A; ma = operand;
        @(negedge clk);
        chk(selmdl == 3'b000, "selmdl idle");
        chk(a == ma, "a reload");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
