// mips_single_cycle: single-cycle processor for a subset of the MIPS instruction set
// (lw, sw, addu, subu, and, ori, slt, beq, j).
//
// Every instruction runs in exactly one clock cycle (CPI = 1), so there is no
// controller state. Within a cycle: the fetch unit's PC addresses the instruction
// memory; the rs and rt fields read the register file straight from the instruction
// bits, before decode; the main decoder sets the control points from the opcode and
// the local ALU decoder sets ALUctr from ALUop and funct; the ALU adds, subtracts,
// ands, ors or compares rs with rt or with the extended immediate (ALUSrc); the data
// memory is read combinationally at the ALU result; and the MemtoReg mux picks ALU
// result or loaded word for the register write to rd or rt (RegDst). At the rising
// edge the register file, the data memory (sw) and the PC (PC + 4, branch target when
// Branch and Zero, or jump target) all update together.
//
// Ports besides clk and rst: a write port into the instruction memory used to load a
// program while rst is high (its address overrides the PC while imem_we is high), and
// an observation bundle that shows, for the instruction of the current cycle, the PC,
// the instruction and the register-file and data-memory writes it will commit at the
// next edge. The load port, the observation outputs, the synchronous active-high
// reset (PC = 0, registers = 0, all writes held off) and the memory sizes are this
// design's choices; the datapath and control follow the lecture.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 10,  // instruction memory: 2**10 words
  parameter int unsigned DMEM_ADDR_BITS = 10   // data memory: 2**10 words
) (
  input  logic     clk,
  input  logic     rst,
  // program load port (instruction memory write)
  input  logic     imem_we,
  input  word_t    imem_waddr,
  input  word_t    imem_wdata,
  // observation of the instruction in flight
  output word_t    pc,
  output word_t    instr,
  output logic     rf_we,
  output reg_idx_t rf_waddr,
  output word_t    rf_wdata,
  output logic     dm_we,
  output word_t    dm_addr,
  output word_t    dm_wdata,
  output logic     branch_taken,
  output logic     jump_taken
);
  ctrl_t    ctrl;
  aluctr_e  alu_ctr;
  word_t    imem_addr, rs_val, rt_val, ext_imm, alu_b, alu_y, dm_rdata, wb_data;
  reg_idx_t wreg;
  logic     alu_zero;

  // ---- instruction fetch ----
  ifu u_ifu (
    .clk, .rst,
    .instr_lo (instr[25:0]),
    .branch   (ctrl.branch),
    .zero     (alu_zero),
    .jump     (ctrl.jump),
    .pc       (pc),
    .br_taken (branch_taken)
  );

  mux2 #(.W(32)) u_imem_amux (.d0(pc), .d1(imem_waddr), .sel(imem_we), .y(imem_addr));

  comb_memory #(.ADDR_BITS(IMEM_ADDR_BITS)) u_imem (
    .clk, .addr(imem_addr), .din(imem_wdata), .we(imem_we), .dout(instr));

  // ---- control ----
  main_control u_ctrl (.opcode(instr[31:26]), .ctrl(ctrl));

  alu_control u_aluctl (.alu_op(ctrl.alu_op), .funct(instr[5:0]), .alu_ctr(alu_ctr));

  // ---- register read, operand select, execute ----
  mux2 #(.W(5)) u_regdst_mux (.d0(instr[20:16]), .d1(instr[15:11]), .sel(ctrl.reg_dst),
                              .y(wreg));

  reg_file u_rf (
    .clk, .rst,
    .ra1 (instr[25:21]), .ra2 (instr[20:16]),
    .rd1 (rs_val),       .rd2 (rt_val),
    .we  (rf_we),        .wa  (wreg),      .wd (wb_data)
  );

  extender u_ext (.imm(instr[15:0]), .ext_op(ctrl.ext_op), .ext(ext_imm));

  mux2 #(.W(32)) u_alusrc_mux (.d0(rt_val), .d1(ext_imm), .sel(ctrl.alu_src), .y(alu_b));

  alu u_alu (.a(rs_val), .b(alu_b), .alu_ctr(alu_ctr), .result(alu_y), .zero(alu_zero));

  // ---- data memory and write back ----
  comb_memory #(.ADDR_BITS(DMEM_ADDR_BITS)) u_dmem (
    .clk, .addr(alu_y), .din(rt_val), .we(dm_we), .dout(dm_rdata));

  mux2 #(.W(32)) u_wb_mux (.d0(alu_y), .d1(dm_rdata), .sel(ctrl.mem_to_reg), .y(wb_data));

  // writes are held off during reset and program load
  always_comb begin
    rf_we      = ctrl.reg_write & ~rst;
    dm_we      = ctrl.mem_write & ~rst;
    rf_waddr   = wreg;
    rf_wdata   = wb_data;
    dm_addr    = alu_y;
    dm_wdata   = rt_val;
    jump_taken = ctrl.jump;
  end

  // program loading is only allowed while the processor is held in reset
  a_load_in_reset: assert property (@(posedge clk) imem_we |-> rst)
    else $error("instruction memory written while the processor runs");
endmodule
