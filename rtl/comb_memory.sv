// comb_memory: word-organised memory with a combinational read, used as the
// instruction memory and as the data memory of the single-cycle processor.
//
// Interface: a byte address, DataIn, WriteEn and DataOut. DataOut is a combinational
// function of the address (no clock on the read path), because an instruction fetch
// and a load must both finish inside the one cycle of an instruction. The word is
// selected by addr[ADDR_BITS+1:2]; the two low bits are ignored (only aligned words
// are accessed) and upper address bits beyond the memory's size wrap.
//
// The write is a single pulse per cycle: this design samples WriteEn, the address and
// DataIn at the rising clock edge, which is when every other state element of the
// processor updates. The size, 2**ADDR_BITS words, is this design's choice, and the
// array has no reset: its contents are undefined until written.
module comb_memory
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 10   // 1024 words = 4 KiB
) (
  input  logic  clk,
  input  word_t addr,
  input  word_t din,
  input  logic  we,
  output word_t dout
);
  word_t mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] widx;

  always_comb widx = addr[ADDR_BITS+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= din;
  end

  always_comb dout = mem[widx];
endmodule
