// tb_lc3_top: end-to-end test of the LC-3 processor at its default sizes.
//
// An instruction-level reference model of the LC-3, written here, runs in
// lock step with the processor: each time the processor returns to FETCH,
// the model executes one instruction and the PC, IR, all eight registers,
// the condition codes and any word stored are compared.
//
// Phase 1 runs a directed program at x3000 that uses every addressing mode
// and every instruction: ADD/AND in register and immediate mode, NOT, LEA,
// LD, LDI, LDR, ST, STI, STR, a branch not taken, a branch taken, JMP to
// x1480 where LD R3, x09 must read x148A (not x1489), and TRAP x25 through
// the vector table. Phase 2 fills all 64K words with random values and
// executes a few hundred instructions from x3000, sixteen times over, which also reaches the
// opcodes this processor fetches and ignores (JSR, RTI, 1101).
//
// The number of cycles of every instruction is checked against the count
// of its control states, a memory access lasting MEM_LATENCY + 1 cycles.
//
// It counts how often each mechanism happened (each addressing mode, branch
// taken / not taken, memory wait for R, each condition code, TRAP, JMP) and
// counts a failure for any that never did.
module tb_lc3_top;
  import lc3_pkg::*;

  localparam int RANDOM_ROUNDS = 16;     // each with fresh random memory
  localparam int RANDOM_INSTRS = 400;

  logic clk = 0, rst_n = 0;
  word_t dbg_pc, dbg_ir, dbg_bus;
  state_t dbg_state;
  logic [2:0] dbg_nzp;
  int checks = 0, failures = 0;

  lc3_top dut (.clk, .rst_n, .dbg_pc, .dbg_ir, .dbg_state, .dbg_nzp, .dbg_bus);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  word_t      m_mem [65536];
  word_t      m_reg [8];
  word_t      m_pc, m_ir;
  logic [2:0] m_nzp;
  logic       m_stored;
  word_t      m_store_addr;

  function automatic word_t sx(input word_t v, input int bits);
    int s = int'(v & word_t'((1 << bits) - 1));
    if (s >= (1 << (bits - 1))) s -= (1 << bits);
    return word_t'(s);
  endfunction

  function automatic void set_cc(input word_t v);
    m_nzp = (v[15]) ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  // mechanism counters
  int n_imm, n_regmode, n_not, n_ld, n_ldi, n_ldr, n_st, n_sti, n_str, n_lea;
  int n_br_taken, n_br_not, n_jmp, n_trap, n_ignored, n_wait, n_cc_n, n_cc_z, n_cc_p;

  int m_cycles;   // cycles the instruction should take, FETCH included

  task automatic m_step();
    int mem_c;
    logic [3:0] op;
    word_t a, v;
    reg_idx_t dr, s1;
    m_ir = m_mem[m_pc];
    m_pc = m_pc + 1;
    op = m_ir[15:12];
    dr = m_ir[11:9];
    s1 = m_ir[8:6];
    m_stored = 0;
    // FETCH1, FETCH2 (a memory access), FETCH3, DECODE, then the execute
    // states; a memory access state lasts MEM_LATENCY + 1 cycles
    mem_c = int'(dut.MEM_LATENCY) + 1;
    case (op)
      4'b0001, 4'b0101, 4'b1001, 4'b1110, 4'b0000, 4'b1100: m_cycles = 1;
      4'b0010, 4'b0110: m_cycles = 2 + mem_c;
      4'b1010:          m_cycles = 3 + 2 * mem_c;
      4'b0011, 4'b0111: m_cycles = 2 + mem_c;
      4'b1011:          m_cycles = 3 + 2 * mem_c;
      4'b1111:          m_cycles = 2 + mem_c;
      default:          m_cycles = 0;
    endcase
    m_cycles += 3 + mem_c;
    case (op)
      4'b0001, 4'b0101: begin
        v = m_ir[5] ? sx(m_ir, 5) : m_reg[m_ir[2:0]];
        if (m_ir[5]) n_imm++; else n_regmode++;
        v = (op == 4'b0001) ? m_reg[s1] + v : m_reg[s1] & v;
        m_reg[dr] = v; set_cc(v);
      end
      4'b1001: begin v = ~m_reg[s1]; m_reg[dr] = v; set_cc(v); n_not++; end
      4'b0010: begin v = m_mem[m_pc + sx(m_ir, 9)]; m_reg[dr] = v; set_cc(v); n_ld++; end
      4'b1010: begin v = m_mem[m_mem[m_pc + sx(m_ir, 9)]]; m_reg[dr] = v; set_cc(v); n_ldi++; end
      4'b0110: begin v = m_mem[m_reg[s1] + sx(m_ir, 6)]; m_reg[dr] = v; set_cc(v); n_ldr++; end
      4'b1110: begin v = m_pc + sx(m_ir, 9); m_reg[dr] = v; set_cc(v); n_lea++; end
      4'b0011: begin a = m_pc + sx(m_ir, 9); m_stored = 1; n_st++; end
      4'b1011: begin a = m_mem[m_pc + sx(m_ir, 9)]; m_stored = 1; n_sti++; end
      4'b0111: begin a = m_reg[s1] + sx(m_ir, 6); m_stored = 1; n_str++; end
      4'b0000: begin
        if ((m_ir[11:9] & m_nzp) != 0) begin m_pc = m_pc + sx(m_ir, 9); n_br_taken++; end
        else n_br_not++;
      end
      4'b1100: begin m_pc = m_reg[s1]; n_jmp++; end
      4'b1111: begin m_reg[7] = m_pc; m_pc = m_mem[{8'h00, m_ir[7:0]}]; n_trap++; end
      default: n_ignored++;
    endcase
    if (m_stored) begin
      m_mem[a] = m_reg[dr];
      m_store_addr = a;
    end
  endtask

  // ---------------- helpers ----------------
  function automatic word_t enc_op(input logic [3:0] op, input int dr, input int sr1,
                                   input bit imm, input int x);
    return imm ? {op, 3'(dr), 3'(sr1), 1'b1, 5'(x)} : {op, 3'(dr), 3'(sr1), 3'b000, 3'(x)};
  endfunction
  function automatic word_t enc_off9(input logic [3:0] op, input int r, input int off);
    return {op, 3'(r), 9'(off)};
  endfunction
  function automatic word_t enc_off6(input logic [3:0] op, input int r, input int base, input int off);
    return {op, 3'(r), 3'(base), 6'(off)};
  endfunction

  task automatic put(input word_t a, input word_t v);
    m_mem[a] = v;
    dut.u_mem.mem[a] = v;
  endtask

  task automatic compare(input string what);
    checks++;
    if (dbg_pc !== m_pc || dbg_ir !== m_ir || dbg_nzp !== m_nzp) begin
      failures++;
      $display("FAIL %s: pc %h/%h ir %h/%h nzp %b/%b", what, dbg_pc, m_pc, dbg_ir, m_ir, dbg_nzp, m_nzp);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.u_datapath.u_regfile.regs[i] !== m_reg[i]) begin
        failures++;
        $display("FAIL %s ir=%h: R%0d = %h expected %h", what, m_ir, i,
                 dut.u_datapath.u_regfile.regs[i], m_reg[i]);
      end
    end
    if (m_stored) begin
      checks++;
      if (dut.u_mem.mem[m_store_addr] !== m_mem[m_store_addr]) begin
        failures++;
        $display("FAIL %s ir=%h: M[%h] = %h expected %h", what, m_ir, m_store_addr,
                 dut.u_mem.mem[m_store_addr], m_mem[m_store_addr]);
      end
    end
  endtask

  task automatic reset_both();
    rst_n = 0;
    for (int i = 0; i < 8; i++) m_reg[i] = '0;
    m_pc = 16'h3000; m_nzp = 3'b010; m_ir = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  // Run until `n` instructions are done or the PC reaches stop_pc.
  task automatic run(input int n, input bit use_stop, input word_t stop_pc, input string what,
                    output int done);
    int cycles = 0;
    done = 0;
    // the state at this negedge is FETCH1 of the first instruction
    forever begin
      @(negedge clk);
      cycles++;
      if (dbg_state inside {S_FETCH2, S_IND_READ, S_LD_READ, S_ST_WRITE, S_TRAP2}
          && !dut.mem_ready) n_wait++;
      if (dbg_state == S_OPERATE || dbg_state == S_LD_WB || dbg_state == S_LEA)
        case (dbg_bus[15] ? 0 : (dbg_bus == 0) ? 1 : 2)
          0: n_cc_n++;
          1: n_cc_z++;
          default: n_cc_p++;
        endcase
      if (dbg_state == S_FETCH1) begin
        m_step();
        compare(what);
        checks++;
        if (cycles != m_cycles) begin
          failures++;
          $display("FAIL %s ir=%h took %0d cycles, expected %0d", what, m_ir, cycles, m_cycles);
        end
        cycles = 0;
        done++;
        if (done >= n || (use_stop && m_pc == stop_pc)) break;
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done, ncycles, exp_total;
    word_t r4;
    // ---------------- phase 1: directed program ----------------
    for (int i = 0; i < 65536; i++) put(word_t'(i), 16'h0000);
    put(16'h0025, 16'h0500);                             // HALT vector
    put(16'h0500, 16'h0FFF);                             // BRnzp #-1 (HALT service: spin)
    put(16'h3000, enc_op(4'b0101, 0, 0, 1, 0));          // AND R0,R0,#0
    put(16'h3001, enc_op(4'b0001, 1, 0, 1, -1));         // ADD R1,R0,#-1
    put(16'h3002, enc_op(4'b0001, 2, 0, 1, 15));         // ADD R2,R0,#15
    put(16'h3003, enc_op(4'b0001, 3, 1, 0, 2));          // ADD R3,R1,R2
    put(16'h3004, {4'b1001, 3'd4, 3'd2, 6'b111111});     // NOT R4,R2
    put(16'h3005, enc_op(4'b0101, 5, 3, 1, 3));          // AND R5,R3,#3
    put(16'h3006, enc_op(4'b0101, 6, 1, 1, -2));         // AND R6,R1,#-2
    put(16'h3007, enc_off9(4'b1110, 0, 8));              // LEA R0,#8 -> x3010
    put(16'h3008, enc_off9(4'b0010, 1, 7));              // LD  R1,#7 -> M[x3010]
    put(16'h3009, enc_off9(4'b1010, 2, 7));              // LDI R2,#7 -> M[M[x3011]]
    put(16'h300A, enc_off6(4'b0110, 3, 0, 2));           // LDR R3,R0,#2 -> M[x3012]
    put(16'h300B, enc_off9(4'b0011, 4, 8));              // ST  R4,#8 -> M[x3014]
    put(16'h300C, enc_off9(4'b1011, 5, 6));              // STI R5,#6 -> M[M[x3013]]
    put(16'h300D, enc_off6(4'b0111, 6, 0, 5));           // STR R6,R0,#5 -> M[x3015]
    put(16'h300E, enc_off9(4'b0000, 7, 7));              // BRnzp #7 -> x3016
    put(16'h3010, 16'h8001);
    put(16'h3011, 16'h4000);
    put(16'h4000, 16'h1234);
    put(16'h3012, 16'h0000);
    put(16'h3013, 16'h4001);
    put(16'h3016, enc_off9(4'b0000, 1, 1));              // BRp #1 (not taken, Z)
    put(16'h3017, enc_off9(4'b0000, 2, 1));              // BRz #1 (taken)
    put(16'h3018, enc_op(4'b0001, 0, 0, 1, 1));          // skipped
    put(16'h3019, enc_off9(4'b0010, 7, 2));              // LD R7,#2 -> x1480
    put(16'h301A, {4'b1100, 3'b000, 3'd7, 6'b000000});   // JMP R7
    put(16'h301C, 16'h1480);
    put(16'h1480, enc_off9(4'b0010, 3, 9));              // LD R3, x09
    put(16'h1481, {4'b1111, 4'b0000, 8'h25});            // TRAP x25
    put(16'h1489, 16'h1111);
    put(16'h148A, 16'hBEEF);
    reset_both();
    ncycles = $time;
    run(100, 1, 16'h0500, "directed", done);
    // results worked out by hand
    r4 = 16'hFFF0;                                       // NOT 15
    checks += 7;
    if (dut.u_datapath.u_regfile.regs[3] !== 16'hBEEF) begin failures++; $display("FAIL R3 != M[x148A]"); end
    if (dut.u_datapath.u_regfile.regs[7] !== 16'h1482) begin failures++; $display("FAIL R7 link"); end
    if (dut.u_datapath.u_regfile.regs[2] !== 16'h1234) begin failures++; $display("FAIL LDI"); end
    if (dut.u_mem.mem[16'h3014] !== r4)                begin failures++; $display("FAIL ST"); end
    if (dut.u_mem.mem[16'h4001] !== 16'h0002)          begin failures++; $display("FAIL STI"); end
    if (dut.u_mem.mem[16'h3015] !== 16'hFFFE)          begin failures++; $display("FAIL STR"); end
    if (dut.u_datapath.u_regfile.regs[0] !== 16'h3010) begin failures++; $display("FAIL skipped ADD ran"); end
    checks++;
    checks++;
    // 159 cycles with a one-cycle memory; its 32 memory accesses each add
    // one cycle per extra cycle of latency
    exp_total = 159 + 32 * (int'(dut.MEM_LATENCY) - 1);
    if (($time - ncycles) / 10 != exp_total) begin
      failures++;
      $display("FAIL directed program took %0d cycles, expected %0d", ($time - ncycles) / 10, exp_total);
    end
    if (done != 21 || dbg_pc !== 16'h0500) begin
      failures++;
      $display("FAIL directed program: %0d instructions, pc %h", done, dbg_pc);
    end
    $display("directed program: %0d instructions in %0d cycles", done, ($time - ncycles) / 10);

    // ---------------- phase 2: random memory ----------------
    for (int round = 0; round < RANDOM_ROUNDS; round++) begin
      for (int i = 0; i < 65536; i++) put(word_t'(i), word_t'($urandom));
      reset_both();
      run(RANDOM_INSTRS, 0, 16'h0000, "random", done);
      checks++;
      for (int i = 0; i < 65536; i++) begin
        if (dut.u_mem.mem[i] !== m_mem[i]) begin
          failures++;
          $display("FAIL final memory M[%h] = %h expected %h", i, dut.u_mem.mem[i], m_mem[i]);
          break;
        end
      end
    end

    // ---------------- coverage of mechanisms ----------------
    $display("imm=%0d reg=%0d not=%0d ld=%0d ldi=%0d ldr=%0d st=%0d sti=%0d str=%0d lea=%0d",
             n_imm, n_regmode, n_not, n_ld, n_ldi, n_ldr, n_st, n_sti, n_str, n_lea);
    $display("br_taken=%0d br_not=%0d jmp=%0d trap=%0d ignored=%0d mem_wait=%0d N=%0d Z=%0d P=%0d",
             n_br_taken, n_br_not, n_jmp, n_trap, n_ignored, n_wait, n_cc_n, n_cc_z, n_cc_p);
    begin
      int cnt [19];
      cnt = '{n_imm, n_regmode, n_not, n_ld, n_ldi, n_ldr, n_st, n_sti, n_str, n_lea,
                       n_br_taken, n_br_not, n_jmp, n_trap, n_ignored, n_wait, n_cc_n, n_cc_z, n_cc_p};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
