// tb_logical_module: checks NOT, NAND and one-bit logical shift right on
// random words, the error flag of the unused op code, and that each result
// leaves after DEPTH cycles (checked at the default DEPTH of 4).
module tb_logical_module;
  localparam int LAT = 4;

  logic        clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [1:0]  op = 2'b01;
  logic [31:0] a = '0, b = '0, res;
  logic        err, valid;
  int          checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [31:0] r; logic e; int t; } item_t;
  item_t q[$];

  logical_module dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && valid) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected valid"); end
    else begin
      it = q.pop_front();
      if (res !== it.r || err !== it.e || cycle - it.t != LAT) begin
        failures++;
        $display("FAIL got %h/%b exp %h/%b latency %0d", res, err, it.r, it.e, cycle - it.t);
      end
    end
  end

  // Expected values written out bit by bit, independently of the operators.
  function automatic logic [31:0] model(input logic [1:0] o, input logic [31:0] x,
                                        input logic [31:0] y);
    logic [31:0] r;
    for (int i = 0; i < 32; i++)
      case (o)
        2'b01:   r[i] = (x[i] == 1'b0);
        2'b10:   r[i] = !(x[i] == 1'b1 && y[i] == 1'b1);
        2'b11:   r[i] = (i == 31) ? 1'b0 : x[i+1];
        default: r[i] = 1'b0;
      endcase
    return r;
  endfunction

  task automatic issue(input logic [1:0] o, input logic [31:0] x, input logic [31:0] y);
    item_t it;
    @(negedge clk);
    op = o; a = x; b = y; en = 1'b1;
    it.r = model(o, x, y); it.e = (o == 2'b00); it.t = cycle;
    q.push_back(it);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    issue(2'b01, 32'h0F0F_00FF, 32'h0);            // NOT
    issue(2'b10, 32'hFFFF_0000, 32'hFF00_FF00);    // NAND
    issue(2'b11, 32'h8000_0001, 32'h0);            // shift right
    issue(2'b00, 32'h1234_5678, 32'h0);            // not a logical op
    for (int n = 0; n < 5000; n++) begin
      if ($urandom_range(2) == 0) begin @(negedge clk); en = 1'b0; end
      issue(2'($urandom_range(1, 3)), $urandom, $urandom);
    end
    @(negedge clk); en = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
