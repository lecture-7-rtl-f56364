// ifu: instruction fetch unit, the program counter and the next-address logic.
//
// Instructions are 4 bytes long and aligned, so the PC register holds only the word
// address PC[31:2] (30 bits); the byte address sent to instruction memory is
// {PC[31:2], 2'b00}. Every cycle the next PC is chosen from:
//   sequential   PC[31:2] + 1
//   branch       PC[31:2] + 1 + SignExt(imm16)        when Branch and Zero
//   jump         {PC[31:28], target[25:0]}            when Jump (pseudo-direct)
// The fetch unit has its own 16-to-30-bit sign extender for the branch offset, so it
// does not depend on the datapath extender's mode. The branch mux comes first and
// the jump mux after it. Reset loads RESET_PC (this design's choice: 0).
module ifu
  import mips_pkg::*;
#(
  parameter logic [29:0] RESET_PC = '0   // word address loaded at reset
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [25:0] instr_lo,  // instruction[25:0]: jump target, imm16 in [15:0]
  input  logic        branch,
  input  logic        zero,
  input  logic        jump,
  output word_t       pc,        // byte address of the current instruction
  output logic        br_taken
);
  logic [29:0] pc_q, pc_plus1, br_off, br_target, pc_br, jmp_target, pc_next;

  dff_reg #(.W(30), .RESET_VAL(RESET_PC)) u_pc (
    .clk, .rst, .d(pc_next), .q(pc_q));

  adder #(.W(30)) u_inc (.a(pc_q), .b(30'd1), .sum(pc_plus1));

  always_comb br_off = {{14{instr_lo[15]}}, instr_lo[15:0]};

  adder #(.W(30)) u_br_add (.a(pc_plus1), .b(br_off), .sum(br_target));

  always_comb br_taken = branch & zero;

  mux2 #(.W(30)) u_br_mux (.d0(pc_plus1), .d1(br_target), .sel(br_taken), .y(pc_br));

  always_comb jmp_target = {pc_q[29:26], instr_lo};

  mux2 #(.W(30)) u_j_mux (.d0(pc_br), .d1(jmp_target), .sel(jump), .y(pc_next));

  always_comb pc = {pc_q, 2'b00};
endmodule
