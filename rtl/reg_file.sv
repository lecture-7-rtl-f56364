// reg_file: the processor's 32 x 32-bit register file with three ports.
//
// Two read ports (addresses ra1 = rs, ra2 = rt) and one write port (wa, wd, we), so
// three accesses per cycle. Reads are combinational: rd1/rd2 follow their addresses
// within the same cycle, which a one-cycle instruction needs. A write takes effect at
// the rising clock edge when we is high, so an instruction that reads and writes the
// same register sees the old value and leaves the new one for the next instruction.
//
// This design's choices: register 0 always reads 0 and ignores writes (the MIPS
// convention), and a synchronous reset clears every register.
module reg_file
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = NREG
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t ra1,
  input  reg_idx_t ra2,
  output word_t    rd1,
  output word_t    rd2,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);
  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : regs[ra2];
  end
endmodule
