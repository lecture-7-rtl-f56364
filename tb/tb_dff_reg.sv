// tb_dff_reg: self-checking test of the D flip-flop register. Checks that q takes d
// only at the rising edge, holds it between edges while d changes, and that the
// synchronous reset loads the reset value. A watchdog ends the run.
module tb_dff_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [29:0] RV = 30'h0000_0123;
  logic rst;
  logic [29:0] d, q, expect_q;
  dff_reg #(.W(30), .RESET_VAL(RV)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin
    rst = 1'b1; d = 30'($urandom);
    @(posedge clk); #1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 1'b0;
    repeat (200) begin
      d = 30'($urandom); expect_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL q=%h want %h", q, expect_q); end
      d = ~d; #2;  // change d between edges: q must hold
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL q changed between edges"); end
    end
    rst = 1'b1; @(posedge clk); #1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL second reset q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
