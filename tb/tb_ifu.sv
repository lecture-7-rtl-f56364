// tb_ifu: self-checking test of the instruction fetch unit. After reset (PC 0) it
// drives random mixes of sequential steps, taken and untaken branches (Branch with
// and without Zero) and jumps, and compares the PC after each clock edge with the
// next-address rules computed in the bench: PC + 4, PC + 4 + SignExt(imm) * 4, or
// {PC[31:28], target, 00}. Also checks that the PC changes once per cycle.
// A watchdog ends the run.
module tb_ifu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_nbr = 0, n_j = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, branch, zero, jump, br_taken;
  logic [25:0] instr_lo;
  word_t       pc, want;

  ifu dut (.clk(clk), .rst(rst), .instr_lo(instr_lo), .branch(branch), .zero(zero),
           .jump(jump), .pc(pc), .br_taken(br_taken));

  initial begin
    rst = 1'b1; branch = 1'b0; zero = 1'b0; jump = 1'b0; instr_lo = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (pc !== 32'd0) begin failures++; $display("FAIL reset pc=%h", pc); end
    repeat (3000) begin
      instr_lo = 26'($urandom);
      case ($urandom % 4)
        0: begin branch = 1'b0; jump = 1'b0; zero = 1'($urandom); end
        1: begin branch = 1'b1; jump = 1'b0; zero = 1'b1; end
        2: begin branch = 1'b1; jump = 1'b0; zero = 1'b0; end
        default: begin branch = 1'b0; jump = 1'b1; zero = 1'($urandom); end
      endcase
      #1;
      if (jump) begin
        want = {pc[31:28], instr_lo, 2'b00}; n_j++;
      end else if (branch && zero) begin
        want = pc + 32'd4 + (word_t'(signed'(instr_lo[15:0])) << 2); n_br++;
      end else begin
        want = pc + 32'd4;
        if (branch) n_nbr++; else n_seq++;
      end
      checks++;
      if (br_taken !== (branch & zero)) begin failures++; $display("FAIL br_taken"); end
      @(posedge clk); #1;
      checks++;
      if (pc !== want) begin
        failures++;
        $display("FAIL pc=%h want %h (b=%b z=%b j=%b)", pc, want, branch, zero, jump);
      end
    end
    $display("sequential=%0d taken=%0d untaken=%0d jumps=%0d", n_seq, n_br, n_nbr, n_j);
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
