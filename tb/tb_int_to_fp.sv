// tb_int_to_fp: checks the sign-magnitude integer to IEEE 754 converter
// against hand-worked values and against a conversion through the
// simulator's double precision (fp_ref_pkg::ref_i2f) for random integers of
// every length.
module tb_int_to_fp;
  import fp_ref_pkg::*;

  logic [31:0] bin = '0, fp;
  int          checks = 0, failures = 0;

  int_to_fp dut (.*);

  task automatic chk(input logic [31:0] x, input logic [31:0] want);
    bin = x;
    #1;
    checks++;
    if (fp !== want) begin
      failures++; $display("FAIL %h -> %h, expected %h", x, fp, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(32'h0000_0001, 32'h3F80_0000);   // 1
    chk(32'h8000_0001, 32'hBF80_0000);   // -1
    chk(32'h0000_000A, 32'h4120_0000);   // 10
    chk(32'h0000_0000, 32'h0000_0000);   // 0
    chk(32'h8000_0000, 32'h8000_0000);   // -0
    chk(32'h7FFF_FFFF, 32'h4EFF_FFFF);   // 2^31 - 1, truncated
    chk(32'h0100_0001, 32'h4B80_0000);   // 2^24 + 1, truncated
    for (int n = 0; n < 20000; n++) begin
      automatic logic [31:0] x = {1'($urandom), 31'($urandom) >> $urandom_range(30)};
      chk(x, ref_i2f(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
