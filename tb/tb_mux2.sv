// tb_mux2: self-checking test of the two-input multiplexer at 32 and 5 bits with
// random data and both select values. A watchdog ends the run.
module tb_mux2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] d0, d1, y;
  logic [4:0]  e0, e1, z;
  logic        sel;
  mux2 #(.W(32)) dut  (.d0(d0), .d1(d1), .sel(sel), .y(y));
  mux2 #(.W(5))  dut5 (.d0(e0), .d1(e1), .sel(sel), .y(z));

  initial begin
    repeat (400) begin
      d0 = $urandom; d1 = $urandom; e0 = 5'($urandom); e1 = 5'($urandom);
      sel = 1'($urandom); #1;
      checks += 2;
      if (y !== (sel ? d1 : d0)) begin failures++; $display("FAIL mux32 sel=%b y=%h", sel, y); end
      if (z !== (sel ? e1 : e0)) begin failures++; $display("FAIL mux5 sel=%b z=%h", sel, z); end
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
