// mux2: two-input multiplexer, y = sel ? d1 : d0.
//
// The "MUX" element of the datapath. It selects the write register (RegDst), the
// ALU B operand (ALUSrc), the register write data (MemtoReg), the branch target
// and the jump target. Purely combinational; width is a parameter.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
