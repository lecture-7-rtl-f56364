// adder: two-input binary adder, Sum = A + B, carry out dropped.
//
// The combinational "Add" element of the datapath. This design uses it for the
// sequential next-PC (PC + 1 word) and for the branch target (PC + 1 + offset).
// Purely combinational; width is a parameter (30 bits in the fetch unit).
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  always_comb sum = a + b;
endmodule
