// tb_comb_memory: self-checking test of the combinational-read memory at its default
// size (1024 words). Fills it with known words, then mixes random reads and writes:
// a read must show the addressed word in the same cycle with no clock edge, a write
// must land only at the clock edge and only when WriteEn is high, and the two low
// address bits must be ignored. A watchdog ends the run.
module tb_comb_memory;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned AB = 10;
  word_t addr, din, dout;
  logic  we;
  word_t model [2**AB];

  comb_memory dut (.clk(clk), .addr(addr), .din(din), .we(we), .dout(dout));

  function automatic word_t baddr(int unsigned w);
    return word_t'(w) << 2;
  endfunction

  task automatic check_read(word_t a);
    addr = a; #1;
    checks++;
    if (dout !== model[a[AB+1:2]]) begin
      failures++; $display("FAIL read %h = %h want %h", a, dout, model[a[AB+1:2]]);
    end
  endtask

  initial begin
    we = 1'b0; din = '0; addr = '0;
    @(negedge clk);
    for (int w = 0; w < 2**AB; w++) begin   // fill
      addr = baddr(w); din = word_t'(w) * 32'h9E37_79B9; we = 1'b1;
      model[w] = din;
      @(negedge clk);
    end
    we = 1'b0;
    for (int w = 0; w < 2**AB; w += 7) check_read(baddr(w) | word_t'($urandom % 4));
    repeat (3000) begin
      @(negedge clk);
      addr = {20'($urandom), 12'($urandom)};
      din = $urandom; we = 1'($urandom);
      #1;
      checks++;  // combinational read, before the edge: old contents
      if (dout !== model[addr[AB+1:2]]) begin
        failures++; $display("FAIL pre-edge read %h", addr);
      end
      @(posedge clk);
      if (we) model[addr[AB+1:2]] = din;
      #1;
      checks++;
      if (dout !== model[addr[AB+1:2]]) begin
        failures++; $display("FAIL post-edge read %h = %h want %h", addr, dout, model[addr[AB+1:2]]);
      end
      we = 1'b0;
      check_read(baddr($urandom % (2**AB)));
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
