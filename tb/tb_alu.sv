// tb_alu: self-checking test of the ALU. Every operation (and, or, add, sub, slt) is
// applied to random and corner operands, including signed compares across the sign
// boundary and equal operands for the Zero flag, and compared with a result the
// bench computes itself. A watchdog ends the run.
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t   a, b, y, want;
  aluctr_e op;
  logic    zero;
  alu dut (.a(a), .b(b), .alu_ctr(op), .result(y), .zero(zero));

  task automatic check(word_t x, word_t w, aluctr_e o);
    a = x; b = w; op = o; #1;
    case (o)
      ALU_AND: want = x & w;
      ALU_OR:  want = x | w;
      ALU_ADD: want = x + w;
      ALU_SUB: want = x - w;
      ALU_SLT: want = (signed'(x) < signed'(w)) ? 32'd1 : 32'd0;
      default: want = 'x;
    endcase
    checks += 2;
    if (y !== want) begin
      failures++; $display("FAIL op=%s a=%h b=%h y=%h want %h", o.name(), x, w, y, want);
    end
    if (zero !== (want == 0)) begin
      failures++; $display("FAIL zero op=%s a=%h b=%h zero=%b", o.name(), x, w, zero);
    end
  endtask

  aluctr_e ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  initial begin
    check(32'hFFFF_FFFF, 32'd1, ALU_SLT);   // -1 < 1
    check(32'd1, 32'hFFFF_FFFF, ALU_SLT);
    check(32'h8000_0000, 32'h7FFF_FFFF, ALU_SLT);
    check(32'h7FFF_FFFF, 32'h8000_0000, ALU_SLT);
    check(32'd5, 32'd5, ALU_SLT);
    check(32'h1234_5678, 32'h1234_5678, ALU_SUB);  // beq equal -> Zero
    check(32'h1234_5678, 32'h1234_5679, ALU_SUB);
    check(32'hFFFF_FFFF, 32'd1, ALU_ADD);
    check(32'h0F0F_0F0F, 32'hF0F0_F0F0, ALU_AND);
    check(32'h0F0F_0000, 32'h0000_00F0, ALU_OR);
    repeat (400) begin
      foreach (ops[k]) check($urandom, $urandom, ops[k]);
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
