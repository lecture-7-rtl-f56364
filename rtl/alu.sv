// alu: 32-bit arithmetic-logic unit of the single-cycle processor.
//
// Performs the operation chosen by ALUctr<2:0> on A and B: add, subtract (no overflow
// detection, as for addu/subu), bitwise and, bitwise or, and set-on-less-than
// (signed compare, result 1 or 0). Zero is high when the result is all zeros; the
// branch logic uses it after a subtract to test rs == rt. Purely combinational.
// The binary code of each operation is this design's choice (see mips_pkg); an
// unused code gives an add.
module alu
  import mips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  aluctr_e alu_ctr,
  output word_t   result,
  output logic    zero
);
  word_t diff;
  always_comb begin
    diff = a - b;
    unique case (alu_ctr)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_SLT: result = {31'd0, $signed(a) < $signed(b)};
      default: result = a + b;
    endcase
    zero = (result == '0);
  end
endmodule
