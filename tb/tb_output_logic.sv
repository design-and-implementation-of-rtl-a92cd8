// tb_output_logic: checks the result router. Every cycle a random selop is
// presented together with fresh random unit results; DEPTH cycles later the
// unit named by that selop must be routed, so result/error after the next
// edge must equal that unit's values of that cycle. A load-a code must leave
// result and error unchanged. Valid bits are driven as the units would.
module tb_output_logic;
  import fpalu_pkg::*;

  localparam int D = 4;
  localparam int N = 5000;

  logic        clk = 1'b0, rst = 1'b1;
  selop_t      selop_q = SEL_LOAD_A;
  logic [31:0] res0 = '0, res1 = '0, res2 = '0, result;
  logic        err0 = 1'b0, err1 = 1'b0, err2 = 1'b0, error;
  logic        vld0 = 1'b0, vld1 = 1'b0, vld2 = 1'b0;
  int          checks = 0, failures = 0;

  selop_t      s_hist [N];
  logic [31:0] r_hist [N][3];
  logic        e_hist [N][3];

  output_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unit_of(input selop_t s);
    if (s == SEL_ADD || s == SEL_SUB) return 0;
    if (s == SEL_MUL || s == SEL_DIV) return 1;
    if (s == SEL_LOAD_A)              return -1;
    return 2;
  endfunction

  initial begin
    logic [31:0] want_r = '0;
    logic        want_e = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N; k++) begin
      int u;
      // Result expected now: routed at edge k from the selop of cycle k-1-D.
      if (k >= D + 1) begin
        u = unit_of(s_hist[k-1-D]);
        if (u >= 0) begin want_r = r_hist[k-1][u]; want_e = e_hist[k-1][u]; end
      end
      checks++;
      if (result !== want_r || error !== want_e) begin
        failures++;
        $display("FAIL cycle %0d: got %h/%b expected %h/%b", k, result, error, want_r, want_e);
      end
      s_hist[k] = (k < D) ? SEL_LOAD_A : selop_t'($urandom_range(7));
      for (int j = 0; j < 3; j++) begin
        r_hist[k][j] = $urandom;
        e_hist[k][j] = 1'($urandom);
      end
      selop_q = s_hist[k];
      {res0, res1, res2} = {r_hist[k][0], r_hist[k][1], r_hist[k][2]};
      {err0, err1, err2} = {e_hist[k][0], e_hist[k][1], e_hist[k][2]};
      u = (k >= D) ? unit_of(s_hist[k-D]) : -1;
      {vld2, vld1, vld0} = (u < 0) ? 3'b000 : 3'(1 << u);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
