// tb_fp_muldiv: self-checking testbench of the pipelined multiplier/divider.
// Directed products and quotients (exact values, truncated 1/3, divide by
// zero, overflow, underflow, zero and NaN operands) are followed by random
// operations on random cycles. Results are compared with the exact
// reference of fp_ref_pkg and must leave the pipeline after 4 cycles.
module tb_fp_muldiv;
  import fp_ref_pkg::*;

  localparam int LAT = 4;

  logic        clk = 1'b0, rst = 1'b1, en = 1'b0, div = 1'b0;
  logic [31:0] a = '0, b = '0, res;
  logic        err, valid;
  int          checks = 0, failures = 0, cycle = 0;

  typedef struct { ref_t exp; int t; logic [31:0] a, b; logic div; } item_t;
  item_t q[$];

  fp_muldiv dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && valid) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected valid at cycle %0d", cycle);
    end else begin
      it = q.pop_front();
      if (res !== it.exp.res || err !== it.exp.err || cycle - it.t != LAT) begin
        failures++;
        $display("FAIL %h %s %h: got %h/%b exp %h/%b latency %0d",
                 it.a, it.div ? "/" : "*", it.b, res, err, it.exp.res, it.exp.err,
                 cycle - it.t);
      end
    end
  end

  task automatic issue(input logic [31:0] x, input logic [31:0] y, input logic d);
    item_t it;
    @(negedge clk);
    a = x; b = y; div = d; en = 1'b1;
    it.exp = d ? ref_div(x, y) : ref_mul(x, y); it.a = x; it.b = y; it.div = d;
    it.t = cycle;
    q.push_back(it);
  endtask

  task automatic idle();
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic known(input logic [31:0] x, input logic [31:0] y, input logic d,
                       input logic [31:0] r, input logic e);
    ref_t m = d ? ref_div(x, y) : ref_mul(x, y);
    checks++;
    if (m.res !== r || m.err !== e) begin
      failures++; $display("reference disagrees on %h %h: %h", x, y, m.res);
    end
    issue(x, y, d);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    known(32'h4000_0000, 32'h4040_0000, 0, 32'h40C0_0000, 0); // 2 * 3 = 6
    known(32'hBFC0_0000, 32'h3FC0_0000, 0, 32'hC010_0000, 0); // -1.5 * 1.5 = -2.25
    known(32'h40C0_0000, 32'h4040_0000, 1, 32'h4000_0000, 0); // 6 / 3 = 2
    known(32'h3F80_0000, 32'h4040_0000, 1, 32'h3EAA_AAAA, 0); // 1 / 3 truncated
    known(32'h3F80_0000, 32'h0000_0000, 1, 32'h7F80_0000, 1); // 1 / 0
    known(32'hBF80_0000, 32'h8000_0000, 1, 32'h7F80_0000, 1); // -1 / -0
    known(32'h0000_0000, 32'h0000_0000, 1, 32'h7F80_0000, 1); // 0 / 0
    known(32'h0000_0000, 32'h4040_0000, 1, 32'h0000_0000, 0); // 0 / 3
    known(32'h8000_0000, 32'h4040_0000, 0, 32'h8000_0000, 0); // -0 * 3
    known(32'h7F00_0000, 32'h4000_0000, 0, 32'h7F80_0000, 1); // 2^127 * 2
    known(32'h0D00_0000, 32'h0D00_0000, 0, 32'h0000_0000, 1); // 2^-101 squared
    known(32'h0080_0000, 32'h4000_0000, 1, 32'h0000_0000, 1); // 2^-126 / 2
    known(32'h7FC0_0000, 32'h3F80_0000, 0, 32'h7FC0_0000, 1); // NaN operand
    repeat (6) idle();
    for (int n = 0; n < 20000; n++) begin
      automatic int c = (n % 2 == 0) ? 127 : 1 + int'($urandom_range(253));
      automatic int s = (n % 2 == 0) ? 60 : 10;
      if ($urandom_range(3) == 0) idle();
      issue(rand_fp(c, s), rand_fp(c, s), 1'($urandom));
    end
    repeat (LAT + 2) idle();
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
