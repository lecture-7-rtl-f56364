// tb_alu_control: self-checking test of the local ALU decoder. Walks every ALUop
// class and, for the R-type class, every function code, comparing ALUctr with the
// operation each instruction needs: lw/sw add, beq subtract, ori or, and for R-type
// add/addu add, sub/subu subtract, and, or, slt (other codes: add). A watchdog ends
// the run.
module tb_alu_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  aluop_e     alu_op;
  logic [5:0] funct;
  aluctr_e    ctr, want;
  alu_control dut (.alu_op(alu_op), .funct(funct), .alu_ctr(ctr));

  initial begin
    for (int op = 0; op < 4; op++) begin
      for (int f = 0; f < 64; f++) begin
        alu_op = aluop_e'(op); funct = 6'(f); #1;
        case (alu_op)
          ALUOP_ADD: want = ALU_ADD;
          ALUOP_SUB: want = ALU_SUB;
          ALUOP_OR:  want = ALU_OR;
          default:
            case (f)
              32, 33:  want = ALU_ADD;  // add, addu
              34, 35:  want = ALU_SUB;  // sub, subu
              36:      want = ALU_AND;
              37:      want = ALU_OR;
              42:      want = ALU_SLT;
              default: want = ALU_ADD;
            endcase
        endcase
        checks++;
        if (ctr !== want) begin
          failures++;
          $display("FAIL aluop=%0d funct=%0d ctr=%b want %b", op, f, ctr, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
