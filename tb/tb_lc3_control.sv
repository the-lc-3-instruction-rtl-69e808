// tb_lc3_control: self-checking test of the LC-3 control unit.
// For each opcode (and BEN 0/1), runs one instruction through the FSM with a
// memory ready signal that arrives after a random number of wait cycles, and
// compares the visited states and the key control signals of each state with
// expected sequences listed here: which register loads, which gate drives
// the bus and which mux settings are used. Also counts the cycles of each
// instruction against the expected state count plus the wait cycles.
module tb_lc3_control;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0, ben = 0, r;
  logic [3:0] opcode = '0;
  ctrl_t ctrl;
  state_t state;
  int checks = 0, failures = 0;

  lc3_control dut (.clk, .rst_n, .opcode, .ben, .r, .ctrl, .state);

  always #5 clk = ~clk;

  // Memory model: R goes high after `wait_n` cycles of mio_en.
  int wait_n = 0, wait_cnt = 0;
  always_ff @(posedge clk) wait_cnt <= (ctrl.mio_en && !r) ? wait_cnt + 1 : 0;
  assign r = ctrl.mio_en && (wait_cnt >= wait_n);

  function automatic string sig(ctrl_t c);
    // compact text of the fields that matter for checking
    return $sformatf("mar%0d mdr%0d ir%0d ben%0d reg%0d cc%0d pc%0d gpc%0d gmdr%0d galu%0d gmm%0d pcm%0d dr%0d sr1%0d a1%0d a2%0d mm%0d k%0d en%0d w%0d",
      c.ld_mar, c.ld_mdr, c.ld_ir, c.ld_ben, c.ld_reg, c.ld_cc, c.ld_pc,
      c.gate_pc, c.gate_mdr, c.gate_alu, c.gate_marmux, c.pcmux, c.drmux, c.sr1mux,
      c.addr1mux, c.addr2mux, c.marmux, c.aluk, c.mio_en, c.r_w);
  endfunction

  // Expected control word of a state, written from the register transfers.
  function automatic ctrl_t expect_ctrl(state_t s, logic [3:0] op, logic b);
    ctrl_t c = '0;
    c.aluk = aluk_t'(op[3:2]);
    case (s)
      S_FETCH1:   begin c.gate_pc = 1; c.ld_mar = 1; c.ld_pc = 1; end
      S_FETCH2, S_IND_READ, S_LD_READ: begin c.mio_en = 1; c.ld_mdr = 1; end
      S_FETCH3:   begin c.gate_mdr = 1; c.ld_ir = 1; end
      S_DECODE:   c.ld_ben = 1;
      S_OPERATE:  begin c.sr1mux = SR1MUX_IR8; c.gate_alu = 1; c.ld_reg = 1; c.ld_cc = 1; end
      S_LEA:      begin c.addr2mux = ADDR2_OFF9; c.marmux = MARMUX_ADDER; c.gate_marmux = 1;
                        c.ld_reg = 1; c.ld_cc = 1; end
      S_ADDR_PC:  begin c.addr2mux = ADDR2_OFF9; c.marmux = MARMUX_ADDER; c.gate_marmux = 1;
                        c.ld_mar = 1; end
      S_ADDR_BASE: begin c.sr1mux = SR1MUX_IR8; c.addr1mux = ADDR1_SR1; c.addr2mux = ADDR2_OFF6;
                         c.marmux = MARMUX_ADDER; c.gate_marmux = 1; c.ld_mar = 1; end
      S_IND_MAR:  begin c.gate_mdr = 1; c.ld_mar = 1; end
      S_LD_WB:    begin c.gate_mdr = 1; c.ld_reg = 1; c.ld_cc = 1; end
      S_ST_MDR:   begin c.aluk = ALU_PASSA; c.gate_alu = 1; c.ld_mdr = 1; end
      S_ST_WRITE: begin c.mio_en = 1; c.r_w = 1; end
      S_BR:       begin c.addr2mux = ADDR2_OFF9; c.pcmux = PCMUX_ADDER; c.ld_pc = b; end
      S_JMP:      begin c.sr1mux = SR1MUX_IR8; c.addr1mux = ADDR1_SR1; c.pcmux = PCMUX_ADDER;
                        c.ld_pc = 1; end
      S_TRAP1:    begin c.gate_marmux = 1; c.ld_mar = 1; end
      S_TRAP2:    begin c.mio_en = 1; c.ld_mdr = 1; c.gate_pc = 1; c.drmux = DRMUX_R7;
                        c.ld_reg = 1; end
      S_TRAP3:    begin c.gate_mdr = 1; c.pcmux = PCMUX_BUS; c.ld_pc = 1; end
      default: ;
    endcase
    return c;
  endfunction

  // Expected state sequence after DECODE.
  function automatic void exec_states(logic [3:0] op, ref state_t q[$]);
    q = {};
    case (op)
      4'b0001, 4'b0101, 4'b1001: q = {S_OPERATE};
      4'b1110: q = {S_LEA};
      4'b0010: q = {S_ADDR_PC, S_LD_READ, S_LD_WB};
      4'b0110: q = {S_ADDR_BASE, S_LD_READ, S_LD_WB};
      4'b1010: q = {S_ADDR_PC, S_IND_READ, S_IND_MAR, S_LD_READ, S_LD_WB};
      4'b0011: q = {S_ADDR_PC, S_ST_MDR, S_ST_WRITE};
      4'b0111: q = {S_ADDR_BASE, S_ST_MDR, S_ST_WRITE};
      4'b1011: q = {S_ADDR_PC, S_IND_READ, S_IND_MAR, S_ST_MDR, S_ST_WRITE};
      4'b0000: q = {S_BR};
      4'b1100: q = {S_JMP};
      4'b1111: q = {S_TRAP1, S_TRAP2, S_TRAP3};
      default: q = {};
    endcase
  endfunction

  function automatic bit is_mem(state_t s);
    return s inside {S_FETCH2, S_IND_READ, S_LD_READ, S_ST_WRITE, S_TRAP2};
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t q[$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int rep = 0; rep < 20; rep++)
      for (int o = 0; o < 16; o++) begin
        state_t seq[$];
        int cycles, waits, exp_cycles;
        exec_states(4'(o), q);
        seq = {S_FETCH1, S_FETCH2, S_FETCH3, S_DECODE};
        seq = {seq, q};
        cycles = 0; waits = 0;
        wait_n = $urandom_range(0, 3);
        foreach (seq[i]) begin
          int w;
          w = 0;
          // the opcode is in the IR from DECODE on; before it, drive garbage
          opcode = (seq[i] inside {S_FETCH1, S_FETCH2, S_FETCH3}) ? 4'($urandom) : 4'(o);
          ben = $urandom_range(0, 1);
          forever begin
            ctrl_t e;
            #1;
            e = expect_ctrl(seq[i], opcode, ben);
            checks++;
            if (state !== seq[i] || ctrl !== e) begin
              failures++;
              $display("FAIL op=%b step %0d: state %s expected %s\n  got %s\n  exp %s",
                       o[3:0], i, state.name(), seq[i].name(), sig(ctrl), sig(e));
            end
            @(negedge clk);
            cycles++;
            if (!(is_mem(seq[i]) && state == seq[i])) break;
            waits++;
            w++;
          end
          // a memory state waits exactly as long as memory withholds R
          if (is_mem(seq[i])) begin
            checks++;
            if (w != wait_n) begin
              failures++;
              $display("FAIL op=%b %s waited %0d cycles, R came after %0d", o[3:0], seq[i].name(), w, wait_n);
            end
          end
        end
        // back in FETCH1, and the cycle count matches
        exp_cycles = seq.size() + waits;
        #1;
        checks++;
        if (state !== S_FETCH1 || cycles != exp_cycles) begin
          failures++;
          $display("FAIL op=%b end: state %s, %0d cycles, expected %0d",
                   o[3:0], state.name(), cycles, exp_cycles);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
