// tb_extender: self-checking test of the immediate extender. For random and corner
// 16-bit immediates it checks sign extension (ExtOp = 1) against a signed cast and
// zero extension (ExtOp = 0) against an unsigned one. A watchdog ends the run.
module tb_extender;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] imm;
  logic        ext_op;
  word_t       ext, want;
  extender dut (.imm(imm), .ext_op(ext_op), .ext(ext));

  task automatic check(logic [15:0] i, logic op);
    imm = i; ext_op = op; #1;
    want = op ? word_t'(signed'(i)) : word_t'(i);
    checks++;
    if (ext !== want) begin
      failures++; $display("FAIL imm=%h op=%b ext=%h want %h", i, op, ext, want);
    end
  endtask

  initial begin
    check(16'h8000, 1'b1); check(16'h8000, 1'b0);
    check(16'h7FFF, 1'b1); check(16'hFFFF, 1'b1); check(16'hFFFF, 1'b0);
    repeat (300) check(16'($urandom), 1'($urandom));
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
