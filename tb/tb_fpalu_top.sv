// tb_fpalu_top: end-to-end test of the floating point ALU at its default
// configuration. Operands are sent over the single operand bus exactly as a
// processor would: selop = 000 with operand a, then one or more operation
// codes each carrying an operand b. Every operation's result and error flag
// are predicted with the exact reference models and must appear on the pins
// after the 6th rising edge counted from the edge that sampled the operation.
// The test counts how often each mechanism occurred (every operation, operand
// reuse, back-to-back issue, result hold, overflow, underflow, divide by zero,
// all-ones exponent operand) and fails a mechanism that never happened. The
// integer converter beside the ALU is checked on the same run.
module tb_fpalu_top;
  import fpalu_pkg::*;
  import fp_ref_pkg::*;

  localparam int LAT = 6;   // sampling edge of the operation counts as 1

  logic        clk = 1'b0, rst = 1'b1;
  logic [2:0]  selop = 3'b000;
  logic [31:0] operand = '0, result, conv_in = '0, conv_out;
  logic        error;
  int          checks = 0, failures = 0, cycle = 0;

  typedef enum int {
    M_ADD, M_SUB, M_MUL, M_DIV, M_NOT, M_NAND, M_SHR, M_LOAD, M_REUSE,
    M_BACK2BACK, M_HOLD, M_OVF, M_UNF, M_DZ, M_NAN, M_CONV, M_NUM
  } mech_t;
  int    mech [M_NUM];
  string mech_name [M_NUM] = '{"add", "sub", "mul", "div", "not", "nand", "shr",
    "load_a", "reuse_a", "back_to_back", "hold", "overflow", "underflow",
    "div_by_zero", "nan_operand", "int_to_fp"};

  typedef struct { logic [31:0] r; logic e; int t; selop_t s; } item_t;
  item_t q[$];
  logic [31:0] a_model = '0;
  logic [31:0] last_r = '0;
  logic        last_e = 1'b0;
  logic        prev_was_op = 1'b0;

  fpalu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Results due this cycle are compared; on other cycles the pins must hold.
  always @(negedge clk) if (!rst) begin
    item_t it;
    if (q.size() != 0 && cycle - q[0].t == LAT) begin
      it = q.pop_front();
      checks++;
      if (result !== it.r || error !== it.e) begin
        failures++;
        $display("FAIL selop %s: got %h/%b expected %h/%b", it.s.name(), result, error,
                 it.r, it.e);
      end
      last_r = it.r; last_e = it.e;
    end else if (q.size() != 0 && cycle - q[0].t > LAT) begin
      failures++; $display("result missing for %s", q[0].s.name());
      void'(q.pop_front());
    end else if (cycle > LAT + 3) begin
      checks++;
      if (result !== last_r || error !== last_e) begin
        failures++; $display("FAIL result did not hold");
      end
    end
  end

  task automatic load_a(input logic [31:0] x);
    @(negedge clk);
    selop = 3'b000; operand = x; a_model = x;
    mech[M_LOAD]++;
    prev_was_op = 1'b0;
  endtask

  task automatic op(input selop_t s, input logic [31:0] y);
    item_t it;
    ref_t  m;
    @(negedge clk);
    selop = s; operand = y;
    unique case (s)
      SEL_ADD:  begin m = ref_addsub(a_model, y, 1'b0); mech[M_ADD]++; end
      SEL_SUB:  begin m = ref_addsub(a_model, y, 1'b1); mech[M_SUB]++; end
      SEL_MUL:  begin m = ref_mul(a_model, y);          mech[M_MUL]++; end
      SEL_DIV:  begin m = ref_div(a_model, y);          mech[M_DIV]++; end
      SEL_NOT:  begin m.res = ~a_model;                 m.err = 1'b0; mech[M_NOT]++;  end
      SEL_NAND: begin m.res = ~(a_model & y);           m.err = 1'b0; mech[M_NAND]++; end
      SEL_SHR:  begin m.res = a_model >> 1;             m.err = 1'b0; mech[M_SHR]++;  end
      default:  m = '0;
    endcase
    if (prev_was_op) mech[M_BACK2BACK]++;
    if (q.size() != 0 || prev_was_op) mech[M_REUSE] += (s != SEL_LOAD_A);
    if (m.err) begin
      if (s == SEL_DIV && y[30:23] == 8'd0) mech[M_DZ]++;
      else if (m.res == 32'h7FC0_0000)      mech[M_NAN]++;
      else if (m.res[30:23] == 8'hFF)       mech[M_OVF]++;
      else                                  mech[M_UNF]++;
    end
    it.r = m.res; it.e = m.err; it.t = cycle; it.s = s;
    q.push_back(it);
    prev_was_op = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      selop = 3'b000; operand = a_model;   // reloads the same a: no change
      prev_was_op = 1'b0;
    end
    mech[M_HOLD]++;
  endtask

  task automatic conv(input logic [31:0] x);
    conv_in = x;
    #1;
    checks++;
    mech[M_CONV]++;
    if (conv_out !== ref_i2f(x)) begin
      failures++; $display("FAIL int_to_fp %h -> %h", x, conv_out);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // A worked sequence: a = 6.0, then 6+1.5, 6-1.5, 6*1.5, 6/1.5.
    load_a(32'h40C0_0000);
    op(SEL_ADD, 32'h3FC0_0000);   // 7.5  = 40F00000
    op(SEL_SUB, 32'h3FC0_0000);   // 4.5  = 40900000
    op(SEL_MUL, 32'h3FC0_0000);   // 9.0  = 41100000
    op(SEL_DIV, 32'h3FC0_0000);   // 4.0  = 40800000
    op(SEL_NOT, 32'h0);
    op(SEL_NAND, 32'hFFFF_0000);
    op(SEL_SHR, 32'h0);
    idle(10);
    // Error cases.
    load_a(32'h7F00_0000);
    op(SEL_ADD, 32'h7F00_0000);   // overflow
    op(SEL_MUL, 32'h7F00_0000);   // overflow
    op(SEL_DIV, 32'h0000_0000);   // divide by zero
    load_a(32'h0100_0000);
    op(SEL_MUL, 32'h0100_0000);   // underflow
    op(SEL_SUB, 32'h0100_0001);   // underflow of a tiny difference
    op(SEL_ADD, 32'h7F80_0000);   // infinity operand
    idle(8);
    // The operand pair of the published addition waveform:
    // a = 1 00110011 11000000000000000000111, b = 0 00011101 11100000000000000000011.
    load_a(32'h99E0_0007);
    op(SEL_ADD, 32'h0EF0_0003);   // truncated IEEE sum 99E00003
    checks++;
    if (q[$].r !== 32'h99E0_0003) begin failures++; $display("FAIL reference of waveform sum"); end
    idle(8);
    // Random programs: reload a at random, random ops, random gaps.
    for (int n = 0; n < 30000; n++) begin
      automatic int c = 1 + int'($urandom_range(253));
      if ($urandom_range(3) == 0) load_a(rand_fp(c, 8));
      if ($urandom_range(7) == 0) idle(1 + int'($urandom_range(8)));
      op(selop_t'($urandom_range(1, 7)), rand_fp(a_model[30:23] == 0 ? 127 : int'(a_model[30:23]), 10));
    end
    idle(LAT + 2);
    for (int n = 0; n < 200; n++) conv({1'($urandom), 31'($urandom) >> $urandom_range(30)});
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("%-13s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
