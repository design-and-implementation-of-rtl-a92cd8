// tb_fp_addsub: self-checking testbench of the pipelined adder/subtractor.
// Directed cases (exact sums, cancellation, carry-out, overflow, underflow,
// zero and NaN operands, large exponent gaps) are followed by random
// operations started on random cycles. Every result is compared with the
// exact reference of fp_ref_pkg, and its latency must be 4 cycles.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  localparam int LAT = 4;

  logic        clk = 1'b0, rst = 1'b1, en = 1'b0, sub = 1'b0;
  logic [31:0] a = '0, b = '0, res;
  logic        err, valid;
  int          checks = 0, failures = 0, cycle = 0;

  typedef struct { ref_t exp; int t; logic [31:0] a, b; logic sub; } item_t;
  item_t q[$];

  fp_addsub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus changes and results are checked on the falling clock edge.
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
                 it.a, it.sub ? "-" : "+", it.b, res, err, it.exp.res, it.exp.err,
                 cycle - it.t);
      end
    end
  end

  task automatic issue(input logic [31:0] x, input logic [31:0] y, input logic s);
    item_t it;
    @(negedge clk);
    a = x; b = y; sub = s; en = 1'b1;
    it.exp = ref_addsub(x, y, s); it.a = x; it.b = y; it.sub = s;
    it.t = cycle;
    q.push_back(it);
  endtask

  task automatic idle();
    @(negedge clk);
    en = 1'b0;
  endtask

  // Directed cases with hand-worked values, checked against the reference too.
  task automatic known(input logic [31:0] x, input logic [31:0] y, input logic s,
                       input logic [31:0] r, input logic e);
    ref_t m = ref_addsub(x, y, s);
    checks++;
    if (m.res !== r || m.err !== e) begin
      failures++; $display("reference disagrees on %h %h: %h", x, y, m.res);
    end
    issue(x, y, s);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    known(32'h3F80_0000, 32'h3F80_0000, 0, 32'h4000_0000, 0); // 1 + 1 = 2
    known(32'h3FC0_0000, 32'h4020_0000, 0, 32'h4080_0000, 0); // 1.5 + 2.5 = 4
    known(32'h4040_0000, 32'h3F80_0000, 1, 32'h4000_0000, 0); // 3 - 1 = 2
    known(32'h3F80_0000, 32'h3F80_0000, 1, 32'h0000_0000, 0); // 1 - 1 = +0
    known(32'h3F80_0000, 32'h4000_0000, 1, 32'hBF80_0000, 0); // 1 - 2 = -1
    known(32'hC120_0000, 32'h40A0_0000, 0, 32'hC0A0_0000, 0); // -10 + 5 = -5
    known(32'h3F80_0000, 32'h0000_0001, 1, 32'h3F80_0000, 0); // subnormal = 0
    known(32'h3F80_0000, 32'h3380_0000, 1, 32'h3F7F_FFFF, 0); // 1 - 2^-24, truncated
    known(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 32'h7F80_0000, 1); // overflow
    known(32'h0080_0001, 32'h0080_0000, 1, 32'h0000_0000, 1); // underflow
    known(32'h7F80_0000, 32'h3F80_0000, 0, 32'h7FC0_0000, 1); // infinity operand
    known(32'h4B80_0000, 32'h3F80_0000, 0, 32'h4B80_0000, 0); // 2^24 + 1 truncated
    known(32'h0000_0000, 32'hC2C8_0000, 0, 32'hC2C8_0000, 0); // 0 + -100
    repeat (6) idle();
    // Random traffic, back to back and with gaps.
    for (int n = 0; n < 20000; n++) begin
      automatic int c = 1 + int'($urandom_range(253));
      automatic int s = (n % 3 == 0) ? 2 : ((n % 3 == 1) ? 12 : 40);
      if ($urandom_range(3) == 0) idle();
      issue(rand_fp(c, s), rand_fp(c, s), 1'($urandom));
    end
    repeat (LAT + 2) idle();
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
