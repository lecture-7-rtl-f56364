// main_control: main decoder of the single-cycle processor.
//
// Every instruction completes in one cycle, so control holds no state: it is a pure
// function of the opcode (instr[31:26]). Its outputs are the mux selects (RegDst,
// ALUSrc, MemtoReg, Jump, and Branch, which is ANDed with the ALU's Zero), the write
// enables (RegWrite, MemWrite), the extender mode (ExtOp) and the ALU class ALUop,
// which the local ALU decoder refines with the function field.
//
// The settings follow the lecture's control table for R-type, ori, lw, sw, beq and j.
// Where that table says "don't care" this design drives 0, and an opcode outside the
// subset drives all-zero control, so it writes nothing and falls through to PC + 4.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_write: 1'b0,
             mem_write: 1'b0, branch: 1'b0, jump: 1'b0, ext_op: 1'b0,
             alu_op: ALUOP_ADD};
    case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.ext_op    = 1'b0;
        ctrl.alu_op    = ALUOP_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_op     = ALUOP_ADD;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.ext_op    = 1'b1;
        ctrl.alu_op    = ALUOP_ADD;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
