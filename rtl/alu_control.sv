// alu_control: local ALU decoder, the second level of the two-level control.
//
// Only the ALU needs the function field of R-type instructions, so the main decoder
// sends a short ALUop class and this unit turns it, with funct (instr[5:0]), into
// ALUctr<2:0>. ALUop add / sub / or pass straight to the matching operation (lw, sw,
// beq, ori); ALUop R-type decodes funct: add/addu -> add, sub/subu -> sub, and, or,
// slt. An unknown funct gives add (this design's choice). Purely combinational.
module alu_control
  import mips_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [5:0]  funct,
  output aluctr_e     alu_ctr
);
  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_ctr = ALU_ADD;
      ALUOP_SUB: alu_ctr = ALU_SUB;
      ALUOP_OR:  alu_ctr = ALU_OR;
      default: begin  // ALUOP_RTYPE
        case (funct)
          FN_ADD, FN_ADDU: alu_ctr = ALU_ADD;
          FN_SUB, FN_SUBU: alu_ctr = ALU_SUB;
          FN_AND:          alu_ctr = ALU_AND;
          FN_OR:           alu_ctr = ALU_OR;
          FN_SLT:          alu_ctr = ALU_SLT;
          default:         alu_ctr = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
