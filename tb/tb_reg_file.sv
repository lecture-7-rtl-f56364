// tb_reg_file: self-checking test of the 3-port register file against an array kept
// in the bench. Random writes and reads on both ports each cycle; checks that reads
// are combinational, that a write appears only after the clock edge (a same-cycle
// read returns the old value), that register 0 stays 0 and that reset clears all
// registers. A watchdog ends the run.
module tb_reg_file;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst, we;
  reg_idx_t ra1, ra2, wa;
  word_t    rd1, rd2, wd;
  word_t    model [32];

  reg_file dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
                .we(we), .wa(wa), .wd(wd));

  task automatic check_reads();
    checks += 2;
    if (rd1 !== model[ra1]) begin failures++; $display("FAIL rd1 r%0d=%h want %h", ra1, rd1, model[ra1]); end
    if (rd2 !== model[ra2]) begin failures++; $display("FAIL rd2 r%0d=%h want %h", ra2, rd2, model[ra2]); end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 32; i++) begin  // reset cleared everything
      ra1 = 5'(i); ra2 = 5'(31 - i); #1; check_reads();
    end
    repeat (2000) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1; check_reads();                 // old value before the edge
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1; check_reads();                 // new value after the edge
    end
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0; we = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(i); #1; check_reads();
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
