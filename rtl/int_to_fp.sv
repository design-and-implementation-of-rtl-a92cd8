// int_to_fp: combinational conversion of a 32-bit sign-magnitude binary
// integer into IEEE 754 single precision.
//
// Bit 31 of the input is the sign and is copied to bit 31 of the result.
// The magnitude (bits 30:0) is shifted left until its leading one reaches
// bit 31; that one becomes the implicit bit and bits 30:8 of the shifted word
// become the 23-bit fraction. The exponent is the original position of the
// leading one plus the bias 127. Bits below the 23 kept are dropped
// (truncation). A zero magnitude gives a signed zero.
//
// Interface: bin in, fp out, no clock. The conversion steps are the ALU's;
// sign-magnitude input, truncation and the zero case are this design's reading.
module int_to_fp
  import fpalu_pkg::*;
(
  input  logic [31:0] bin,
  output logic [31:0] fp
);

  logic [4:0]  pos;
  logic [31:0] shifted;

  always_comb begin
    pos = '0;
    for (int i = 0; i <= 30; i++)
      if (bin[i]) pos = 5'(i);
    shifted = {1'b0, bin[30:0]} << (5'd31 - pos);
    if (bin[30:0] == 31'd0) fp = fp_zero(bin[31]);
    else                    fp = {bin[31], 8'(pos) + 8'(EXP_BIAS), shifted[30:8]};
  end

endmodule
