// tb_main_control: self-checking test of the main decoder against the control table.
// For each opcode of the subset it checks every control point the table specifies,
// skipping the "don't care" entries, and checks that unknown opcodes write neither
// registers nor memory and do not redirect the PC. A watchdog ends the run.
module tb_main_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] opcode;
  ctrl_t      c;
  main_control dut (.opcode(opcode), .ctrl(c));

  // expected row: RegDst ALUSrc MemtoReg RegWrite MemWrite Branch Jump ExtOp;
  // 2 means "don't care"
  task automatic row(logic [5:0] op, string nm, int rd, int as, int m2r, int rw,
                     int mw, int br, int j, int ex, int aop);
    int got [9];
    int want [9];
    opcode = op; #1;
    got  = '{c.reg_dst, c.alu_src, c.mem_to_reg, c.reg_write, c.mem_write,
             c.branch, c.jump, c.ext_op, int'(c.alu_op)};
    want = '{rd, as, m2r, rw, mw, br, j, ex, aop};
    for (int k = 0; k < 9; k++) begin
      if (want[k] == 2 || (k == 8 && want[k] < 0)) continue;
      checks++;
      if (got[k] !== want[k]) begin
        failures++;
        $display("FAIL %s signal %0d = %0d want %0d", nm, k, got[k], want[k]);
      end
    end
  endtask

  initial begin
    //            op          name    RD AS M2R RW MW BR J EX ALUop
    row(6'b000000, "R-type", 1, 0, 0, 1, 0, 0, 0, 2, int'(ALUOP_RTYPE));
    row(6'b001101, "ori",    0, 1, 0, 1, 0, 0, 0, 0, int'(ALUOP_OR));
    row(6'b100011, "lw",     0, 1, 1, 1, 0, 0, 0, 1, int'(ALUOP_ADD));
    row(6'b101011, "sw",     2, 1, 2, 0, 1, 0, 0, 1, int'(ALUOP_ADD));
    row(6'b000100, "beq",    2, 0, 2, 0, 0, 1, 0, 2, int'(ALUOP_SUB));
    row(6'b000010, "j",      2, 2, 2, 0, 0, 0, 1, 2, -1);
    for (int op = 0; op < 64; op++) begin
      if (op inside {0, 2, 4, 13, 35, 43}) continue;
      row(6'(op), "other", 2, 2, 2, 0, 0, 0, 0, 2, -1);
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
