// extender: widens the 16-bit immediate of an I-format instruction to 32 bits.
//
// ExtOp = 1 copies bit 15 into the upper half (sign extension, used by lw and sw for
// the address offset); ExtOp = 0 fills the upper half with zeros (zero extension,
// used by ori). Purely combinational.
module extender
  import mips_pkg::*;
(
  input  logic [15:0] imm,
  input  logic        ext_op,
  output word_t       ext
);
  always_comb ext = {{16{ext_op & imm[15]}}, imm};
endmodule
