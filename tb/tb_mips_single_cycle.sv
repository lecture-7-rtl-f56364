// tb_mips_single_cycle: end-to-end self-checking test of the single-cycle processor at
// its default sizes (1024-word instruction and data memories).
//
// The bench assembles programs itself, loads them through the instruction-memory
// load port while reset is held, releases reset and runs them. A small
// instruction-set model in the bench executes the same program one instruction at a
// time. Every cycle the processor's PC and the register and memory writes it is
// about to commit are compared with the model's, so each cycle must complete exactly
// one instruction (CPI = 1).
//
// Program 1 computes N! with only the subset's instructions (multiplication by
// repeated addition in a nested loop), stores the result and loads it back; the
// loaded value is also checked against N! computed directly. Program 2 is a random
// mix of addu, subu, and, ori, slt, lw, sw and forward beq over a data area the
// prologue fills. Each program ends in a jump-to-self. The bench counts how often
// each mechanism happened (each instruction, taken and untaken branches, jumps,
// sign- and zero-extended immediates, a negative lw/sw offset, a write to register 0
// that must be dropped, slt true and false, a load of a just-stored word) and counts
// a failure for any that never did. A watchdog ends the run.
module tb_mips_single_cycle;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned DM_WORDS = 1024;
  localparam int unsigned N = 7;            // program 1 computes N!

  logic     rst, imem_we;
  word_t    imem_waddr, imem_wdata;
  word_t    pc, instr, rf_wdata, dm_addr, dm_wdata;
  logic     rf_we, dm_we, branch_taken, jump_taken;
  reg_idx_t rf_waddr;

  mips_single_cycle dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .pc, .instr, .rf_we, .rf_waddr, .rf_wdata, .dm_we, .dm_addr, .dm_wdata,
    .branch_taken, .jump_taken);

  // ---------------- assembler ----------------
  word_t prog [$];
  function automatic word_t r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'b0, fn};
  endfunction
  function automatic word_t i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t addu_(int rd, int rs, int rt); return r_op(6'h21, rd, rs, rt); endfunction
  function automatic word_t subu_(int rd, int rs, int rt); return r_op(6'h23, rd, rs, rt); endfunction
  function automatic word_t and_ (int rd, int rs, int rt); return r_op(6'h24, rd, rs, rt); endfunction
  function automatic word_t slt_ (int rd, int rs, int rt); return r_op(6'h2A, rd, rs, rt); endfunction
  function automatic word_t ori_ (int rt, int rs, int imm); return i_op(6'h0D, rt, rs, imm); endfunction
  function automatic word_t lw_  (int rt, int off, int rs); return i_op(6'h23, rt, rs, off); endfunction
  function automatic word_t sw_  (int rt, int off, int rs); return i_op(6'h2B, rt, rs, off); endfunction
  // beq at word index 'at' to word index 'to'
  function automatic word_t beq_ (int rs, int rt, int at, int to); return i_op(6'h04, rt, rs, to - at - 1); endfunction
  function automatic word_t j_   (int to); return {6'b000010, 26'(to)}; endfunction

  // ---------------- instruction-set model ----------------
  word_t m_reg [32];
  word_t m_mem [DM_WORDS];
  word_t m_pc;
  // effects of the model's current instruction
  logic  e_rf_we, e_dm_we, e_br, e_j;
  int    e_waddr;
  word_t e_wdata, e_daddr, e_dwdata, e_npc;

  // mechanism counters
  int n_addu = 0, n_subu = 0, n_and = 0, n_ori = 0, n_slt = 0, n_lw = 0, n_sw = 0;
  int n_beq_t = 0, n_beq_nt = 0, n_j = 0;
  int n_r0_write = 0, n_neg_off = 0, n_zext_hi = 0, n_slt_true = 0, n_slt_false = 0;
  int n_ld_after_st = 0;
  word_t last_st_addr;

  function automatic word_t sext(logic [15:0] i); return word_t'(signed'(i)); endfunction

  task automatic model_eval(word_t iw);
    logic [5:0] op, fn;
    int rs, rt, rd;
    word_t a, b, ea;
    op = iw[31:26]; fn = iw[5:0];
    rs = int'(iw[25:21]); rt = int'(iw[20:16]); rd = int'(iw[15:11]);
    a = m_reg[rs]; b = m_reg[rt];
    e_rf_we = 0; e_dm_we = 0; e_br = 0; e_j = 0; e_waddr = 0; e_wdata = 0;
    e_daddr = 0; e_dwdata = 0; e_npc = m_pc + 4;
    case (op)
      6'h00: begin
        e_rf_we = 1; e_waddr = rd;
        case (fn)
          6'h20, 6'h21: begin e_wdata = a + b; n_addu++; end
          6'h22, 6'h23: begin e_wdata = a - b; n_subu++; end
          6'h24: begin e_wdata = a & b; n_and++; end
          6'h25: e_wdata = a | b;
          6'h2A: begin
            e_wdata = (signed'(a) < signed'(b)) ? 1 : 0; n_slt++;
            if (e_wdata == 1) n_slt_true++; else n_slt_false++;
          end
          default: e_wdata = a + b;
        endcase
      end
      6'h0D: begin
        e_rf_we = 1; e_waddr = rt; e_wdata = a | {16'b0, iw[15:0]}; n_ori++;
        if (iw[15]) n_zext_hi++;
      end
      6'h23: begin
        ea = a + sext(iw[15:0]);
        e_rf_we = 1; e_waddr = rt; e_wdata = m_mem[ea[11:2]]; e_daddr = ea; n_lw++;
        if (iw[15]) n_neg_off++;
        if (ea == last_st_addr) n_ld_after_st++;
      end
      6'h2B: begin
        ea = a + sext(iw[15:0]);
        e_dm_we = 1; e_daddr = ea; e_dwdata = b; n_sw++;
        if (iw[15]) n_neg_off++;
      end
      6'h04: begin
        e_br = (a == b);
        if (e_br) begin e_npc = m_pc + 4 + (sext(iw[15:0]) << 2); n_beq_t++; end
        else n_beq_nt++;
      end
      6'h02: begin e_j = 1; e_npc = {m_pc[31:28], iw[25:0], 2'b00}; n_j++; end
      default: ;
    endcase
    if (e_rf_we && e_waddr == 0) n_r0_write++;
  endtask

  task automatic model_commit();
    if (e_rf_we && e_waddr != 0) m_reg[e_waddr] = e_wdata;
    if (e_dm_we) begin m_mem[e_daddr[11:2]] = e_dwdata; last_st_addr = e_daddr; end
    m_pc = e_npc;
  endtask

  task automatic expect_eq(string what, word_t got, word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s: got %h want %h", m_pc, what, got, want);
    end
  endtask

  // load 'prog', reset, run until the program sits in its final jump-to-self;
  // returns the number of instructions executed before the halt loop
  task automatic run_program(int max_cycles, output int executed, output int cycles);
    int halt_idx;
    halt_idx = prog.size() - 1;
    rst = 1'b1; imem_we = 1'b0;
    @(negedge clk);
    foreach (prog[k]) begin
      imem_we = 1'b1; imem_waddr = word_t'(k) << 2; imem_wdata = prog[k];
      @(negedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk);
    foreach (m_reg[k]) m_reg[k] = '0;
    m_pc = '0;
    rst = 1'b0;
    executed = 0; cycles = 0;
    while (cycles < max_cycles) begin
      #1;
      expect_eq("pc", pc, m_pc);
      if (pc !== m_pc) break;
      if (m_pc == word_t'(halt_idx) << 2) break;
      model_eval(instr);
      expect_eq("rf_we", word_t'(rf_we), word_t'(e_rf_we));
      if (e_rf_we) begin
        expect_eq("rf_waddr", word_t'(rf_waddr), word_t'(e_waddr));
        expect_eq("rf_wdata", rf_wdata, e_wdata);
      end
      expect_eq("dm_we", word_t'(dm_we), word_t'(e_dm_we));
      if (e_dm_we) begin
        expect_eq("dm_addr", dm_addr, e_daddr);
        expect_eq("dm_wdata", dm_wdata, e_dwdata);
      end
      expect_eq("branch_taken", word_t'(branch_taken), word_t'(e_br));
      expect_eq("jump", word_t'(jump_taken), word_t'(e_j));
      @(posedge clk);
      model_commit();
      executed++; cycles++;
      @(negedge clk);
    end
  endtask

  function automatic int unsigned fact(int unsigned n);
    return (n <= 1) ? 1 : n * fact(n - 1);
  endfunction

  int executed, cycles, loaded_result;

  initial begin
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0; last_st_addr = '1;

    // ---------- program 1: N! ----------
    prog = {};
    prog.push_back(ori_(1, 0, N));          // 0  n
    prog.push_back(ori_(2, 0, 1));          // 1  result = 1
    prog.push_back(ori_(5, 0, 1));          // 2  one
    prog.push_back(ori_(0, 0, 'h55));     // 3  write to $0: dropped
    prog.push_back(ori_(9, 0, 'h8000));   // 4  zero-extended immediate
    prog.push_back(ori_(10, 0, 'h200));   // 5  base address
    prog.push_back(sw_(9, 'h40, 0));      // 6
    // outer loop at 7
    prog.push_back(slt_(6, 5, 1));          // 7  1 < n ?
    prog.push_back(beq_(6, 0, 8, 18));      // 8  no -> done
    prog.push_back(addu_(7, 0, 0));         // 9  acc = 0
    prog.push_back(addu_(8, 1, 0));         // 10 cnt = n
    // inner loop at 11
    prog.push_back(addu_(7, 7, 2));         // 11 acc += result
    prog.push_back(subu_(8, 8, 5));         // 12 cnt--
    prog.push_back(beq_(8, 0, 13, 15));     // 13 cnt == 0 -> leave
    prog.push_back(j_(11));                 // 14
    prog.push_back(addu_(2, 7, 0));         // 15 result = acc
    prog.push_back(subu_(1, 1, 5));         // 16 n--
    prog.push_back(j_(7));                  // 17
    // done at 18
    prog.push_back(sw_(2, -4, 10));         // 18 mem[0x1FC] = result (negative offset)
    prog.push_back(lw_(11, -4, 10));        // 19 reload it
    prog.push_back(lw_(13, 'h40, 0));     // 20
    prog.push_back(and_(12, 11, 13));       // 21
    prog.push_back(subu_(14, 0, 5));        // 22 -1
    prog.push_back(slt_(15, 14, 0));        // 23 -1 < 0 : 1
    prog.push_back(slt_(16, 0, 14));        // 24 0 < -1 : 0
    prog.push_back(j_(25));                 // 25 halt
    run_program(5000, executed, cycles);
    checks++;
    if (m_reg[11] !== word_t'(fact(N)) || m_mem[32'h1FC / 4] !== word_t'(fact(N))) begin
      failures++; $display("FAIL N! result %0d want %0d", m_reg[11], fact(N));
    end
    checks++;  // one instruction per cycle
    if (executed != cycles || cycles == 0) begin
      failures++; $display("FAIL CPI: %0d instructions in %0d cycles", executed, cycles);
    end
    $display("program 1: %0d! = %0d in %0d cycles", N, m_reg[11], cycles);

    // ---------- program 2: random instruction mix ----------
    prog = {};
    for (int r = 1; r < 32; r++) prog.push_back(ori_(r, 0, int'($urandom % 65536)));
    for (int w = 0; w < 64; w++) prog.push_back(sw_(1 + w % 31, w * 4, 0));
    for (int k = 0; k < 400; k++) begin
      int at, kind, rd, rs, rt;
      at = prog.size();
      kind = int'($urandom % 9);
      rd = int'($urandom % 32); rs = int'($urandom % 32); rt = int'($urandom % 32);
      case (kind)
        0: prog.push_back(addu_(rd, rs, rt));
        1: prog.push_back(subu_(rd, rs, rt));
        2: prog.push_back(and_(rd, rs, rt));
        3: prog.push_back(slt_(rd, rs, rt));
        4: prog.push_back(ori_(rt, rs, int'($urandom % 65536)));
        5: prog.push_back(lw_(rt, int'($urandom % 64) * 4, 0));
        6: prog.push_back(sw_(rt, int'($urandom % 64) * 4, 0));
        7: prog.push_back(beq_(rs, (($urandom % 2) != 0) ? rs : rt, at, at + 1 + int'($urandom % 3)));
        default: prog.push_back(lw_(rt, 0, 0));
      endcase
    end
    for (int k = 0; k < 3; k++) prog.push_back(ori_(0, 0, 0));  // landing pad for late branches
    prog.push_back(j_(prog.size()));                             // halt
    run_program(5000, executed, cycles);
    checks++;
    if (executed != cycles || cycles == 0) begin
      failures++; $display("FAIL CPI: %0d instructions in %0d cycles", executed, cycles);
    end
    $display("program 2: %0d instructions in %0d cycles", executed, cycles);

    // ---------- mechanism coverage ----------
    $display("addu=%0d subu=%0d and=%0d ori=%0d slt=%0d lw=%0d sw=%0d beq taken=%0d untaken=%0d j=%0d",
             n_addu, n_subu, n_and, n_ori, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_j);
    $display("r0 writes=%0d negative offsets=%0d zero-ext imm=%0d slt true=%0d false=%0d load-after-store=%0d",
             n_r0_write, n_neg_off, n_zext_hi, n_slt_true, n_slt_false, n_ld_after_st);
    begin
      int cov [16];
      cov = '{n_addu, n_subu, n_and, n_ori, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt,
                       n_j, n_r0_write, n_neg_off, n_zext_hi, n_slt_true, n_slt_false,
                       n_ld_after_st};
      foreach (cov[k]) begin
        checks++;
        if (cov[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
