// mips_pkg: shared types and constants of the single-cycle MIPS-subset processor.
//
// Holds the instruction field layout (R, I and J formats), the opcodes and function
// codes of the implemented subset (lw, sw, addu, subu, and, ori, slt, beq, j), the
// two-level control encodings (ALUop from the main decoder, ALUctr from the local ALU
// decoder) and the bundle of control signals the main decoder drives.
//
// Opcodes for R-type, ori, lw, sw, beq and j, and the function codes of add (10 0000)
// and sub (10 0010), follow the lecture's control table. The function codes of addu,
// subu, and, or and slt, and the binary values of ALUop and ALUctr, are this design's
// choice (the standard MIPS codes and the textbook ALU control encoding).
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data path width
  localparam int unsigned NREG = 32;  // architectural registers
  localparam int unsigned RADDR_W = 5;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RADDR_W-1:0] reg_idx_t;

  // Opcode field, instr[31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b00_0000,
    OP_J     = 6'b00_0010,
    OP_BEQ   = 6'b00_0100,
    OP_ORI   = 6'b00_1101,
    OP_LW    = 6'b10_0011,
    OP_SW    = 6'b10_1011
  } opcode_e;

  // Function field of R-type instructions, instr[5:0]
  localparam logic [5:0] FN_ADD  = 6'b10_0000;
  localparam logic [5:0] FN_ADDU = 6'b10_0001;
  localparam logic [5:0] FN_SUB  = 6'b10_0010;
  localparam logic [5:0] FN_SUBU = 6'b10_0011;
  localparam logic [5:0] FN_AND  = 6'b10_0100;
  localparam logic [5:0] FN_OR   = 6'b10_0101;
  localparam logic [5:0] FN_SLT  = 6'b10_1010;

  // Operation class the main decoder hands to the local ALU decoder
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_RTYPE = 2'b10,
    ALUOP_OR    = 2'b11
  } aluop_e;

  // ALUctr<2:0>: the operation the ALU performs
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } aluctr_e;

  // Control points set by the main decoder
  typedef struct packed {
    logic   reg_dst;    // 1: write register is rd, 0: rt
    logic   alu_src;    // 1: ALU B input is the extended immediate
    logic   mem_to_reg; // 1: register write data comes from data memory
    logic   reg_write;
    logic   mem_write;
    logic   branch;
    logic   jump;
    logic   ext_op;     // 1: sign-extend imm, 0: zero-extend
    aluop_e alu_op;
  } ctrl_t;

endpackage
