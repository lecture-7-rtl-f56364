// tb_adder: self-checking test of the adder at 32 bits and at the 30 bits the fetch
// unit uses. Random and corner operands; the expected sum is computed in the bench
// with a wider addition truncated to the adder's width. A watchdog ends the run.
module tb_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a32, b32, s32;
  logic [29:0] a30, b30, s30;
  adder #(.W(32)) dut32 (.a(a32), .b(b32), .sum(s32));
  adder #(.W(30)) dut30 (.a(a30), .b(b30), .sum(s30));

  task automatic check32(logic [31:0] a, logic [31:0] b);
    logic [32:0] wide;
    a32 = a; b32 = b; #1;
    wide = {1'b0, a} + {1'b0, b};
    checks++;
    if (s32 !== wide[31:0]) begin
      failures++; $display("FAIL adder32 %h + %h = %h, want %h", a, b, s32, wide[31:0]);
    end
  endtask

  task automatic check30(logic [29:0] a, logic [29:0] b);
    logic [31:0] wide;
    a30 = a; b30 = b; #1;
    wide = {2'b0, a} + {2'b0, b};
    checks++;
    if (s30 !== wide[29:0]) begin
      failures++; $display("FAIL adder30 %h + %h = %h, want %h", a, b, s30, wide[29:0]);
    end
  endtask

  initial begin
    check32(32'hFFFF_FFFF, 32'd1);
    check32(32'h7FFF_FFFF, 32'd1);
    check32(32'd0, 32'd0);
    check30(30'h3FFF_FFFF, 30'd1);
    check30(30'd5, 30'h3FFF_FFFF);  // 5 + (-1)
    repeat (500) begin
      check32($urandom, $urandom);
      check30(30'($urandom), 30'($urandom));
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
