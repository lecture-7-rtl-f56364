// dff_reg: W-bit register of rising-edge D flip-flops with synchronous reset.
//
// q takes the value of d at every rising clock edge and holds it until the next one,
// so d must be stable around the edge (setup and hold). The processor keeps its
// program counter in one. The synchronous reset to RESET_VAL is this design's
// choice; the flip-flops described for the processor have no stated reset.
module dff_reg #(
  parameter int unsigned W         = 32,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VAL;
    else     q <= d;
  end
endmodule
