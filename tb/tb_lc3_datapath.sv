// tb_lc3_datapath: self-checking test of the LC-3 datapath without its
// control unit.
//
// The testbench plays the control unit: for each instruction it applies,
// one cycle at a time, the control words of its register transfers (FETCH,
// then the execute transfers), and it plays a memory that answers every
// access in the same cycle. Random instructions of every executed kind, with
// random fields, are run; a shadow model of the registers, PC, condition
// codes and memory, kept here, is compared after each instruction. BEN is
// checked after each DECODE.
module tb_lc3_datapath;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0;
  ctrl_t ctrl = '0;
  word_t mem_rdata, mem_addr, mem_wdata, ir, pc, bus;
  logic mem_en, mem_we, ben;
  logic [2:0] nzp;
  int checks = 0, failures = 0;

  lc3_datapath #(.RESET_PC(16'h3000)) dut (
    .clk, .rst_n, .ctrl, .mem_rdata, .mem_addr, .mem_wdata, .mem_en, .mem_we,
    .ir, .ben, .pc, .nzp, .bus
  );

  always #5 clk = ~clk;

  // memory answering in the same cycle
  word_t mem [65536];
  assign mem_rdata = mem[mem_addr];
  always @(posedge clk) if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;

  // shadow state
  word_t s_reg [8];
  word_t s_pc;
  logic [2:0] s_nzp;

  function automatic word_t sx(input word_t v, input int bits);
    int s = int'(v & word_t'((1 << bits) - 1));
    if (s >= (1 << (bits - 1))) s -= (1 << bits);
    return word_t'(s);
  endfunction

  function automatic logic [2:0] cc(input word_t v);
    return v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  task automatic xfer(input ctrl_t c);
    @(negedge clk) ctrl = c;
    @(posedge clk);
    #1 ctrl = '0;
  endtask

  // control words of the register transfers
  function automatic ctrl_t c_mar_pc_inc();
    ctrl_t c = '0; c.gate_pc = 1; c.ld_mar = 1; c.ld_pc = 1; c.pcmux = PCMUX_INC; return c;
  endfunction
  function automatic ctrl_t c_mdr_mem();
    ctrl_t c = '0; c.mio_en = 1; c.ld_mdr = 1; return c;
  endfunction
  function automatic ctrl_t c_ir_mdr();
    ctrl_t c = '0; c.gate_mdr = 1; c.ld_ir = 1; return c;
  endfunction
  function automatic ctrl_t c_mar_addr(input addr1mux_t a1, input addr2mux_t a2);
    ctrl_t c = '0; c.sr1mux = SR1MUX_IR8; c.addr1mux = a1; c.addr2mux = a2;
    c.marmux = MARMUX_ADDER; c.gate_marmux = 1; c.ld_mar = 1; return c;
  endfunction
  function automatic ctrl_t c_dr_mdr();
    ctrl_t c = '0; c.gate_mdr = 1; c.ld_reg = 1; c.ld_cc = 1; return c;
  endfunction
  function automatic ctrl_t c_mar_mdr();
    ctrl_t c = '0; c.gate_mdr = 1; c.ld_mar = 1; return c;
  endfunction
  function automatic ctrl_t c_mdr_sr();
    ctrl_t c = '0; c.sr1mux = SR1MUX_IR11; c.aluk = ALU_PASSA; c.gate_alu = 1; c.ld_mdr = 1; return c;
  endfunction
  function automatic ctrl_t c_mem_write();
    ctrl_t c = '0; c.mio_en = 1; c.r_w = 1; return c;
  endfunction

  task automatic run_one(input word_t instr);
    ctrl_t c;
    logic [3:0] op = instr[15:12];
    int dr = instr[11:9], s1 = instr[8:6];
    word_t v, a;
    logic exp_ben;
    mem[s_pc] = instr;
    xfer(c_mar_pc_inc());
    xfer(c_mdr_mem());
    xfer(c_ir_mdr());
    s_pc = s_pc + 1;
    c = '0; c.ld_ben = 1; xfer(c);
    exp_ben = |(instr[11:9] & s_nzp);
    checks++;
    if (ben !== exp_ben) begin failures++; $display("FAIL ben=%b expected %b ir=%h", ben, exp_ben, instr); end
    case (op)
      4'b0001, 4'b0101, 4'b1001: begin
        c = '0; c.sr1mux = SR1MUX_IR8; c.aluk = aluk_t'(op[3:2]); c.gate_alu = 1;
        c.ld_reg = 1; c.ld_cc = 1; xfer(c);
        v = instr[5] ? sx(instr, 5) : s_reg[instr[2:0]];
        v = (op == 4'b0001) ? s_reg[s1] + v : (op == 4'b0101) ? s_reg[s1] & v : ~s_reg[s1];
        s_reg[dr] = v; s_nzp = cc(v);
      end
      4'b1110: begin
        c = c_mar_addr(ADDR1_PC, ADDR2_OFF9); c.ld_mar = 0; c.ld_reg = 1; c.ld_cc = 1; xfer(c);
        v = s_pc + sx(instr, 9); s_reg[dr] = v; s_nzp = cc(v);
      end
      4'b0010, 4'b0110, 4'b1010: begin
        xfer(op == 4'b0110 ? c_mar_addr(ADDR1_SR1, ADDR2_OFF6) : c_mar_addr(ADDR1_PC, ADDR2_OFF9));
        a = (op == 4'b0110) ? s_reg[s1] + sx(instr, 6) : s_pc + sx(instr, 9);
        if (op == 4'b1010) begin
          xfer(c_mdr_mem()); xfer(c_mar_mdr()); a = mem[a];
        end
        xfer(c_mdr_mem()); xfer(c_dr_mdr());
        v = mem[a]; s_reg[dr] = v; s_nzp = cc(v);
      end
      4'b0011, 4'b0111, 4'b1011: begin
        xfer(op == 4'b0111 ? c_mar_addr(ADDR1_SR1, ADDR2_OFF6) : c_mar_addr(ADDR1_PC, ADDR2_OFF9));
        a = (op == 4'b0111) ? s_reg[s1] + sx(instr, 6) : s_pc + sx(instr, 9);
        if (op == 4'b1011) begin
          xfer(c_mdr_mem()); xfer(c_mar_mdr()); a = mem[a];
        end
        v = s_reg[dr];
        xfer(c_mdr_sr()); xfer(c_mem_write());
        checks++;
        if (mem[a] !== v) begin failures++; $display("FAIL store M[%h]=%h expected %h", a, mem[a], v); end
      end
      4'b0000: begin
        c = '0; c.addr1mux = ADDR1_PC; c.addr2mux = ADDR2_OFF9; c.pcmux = PCMUX_ADDER;
        c.ld_pc = ben; xfer(c);
        if (exp_ben) s_pc = s_pc + sx(instr, 9);
      end
      4'b1100: begin
        c = '0; c.sr1mux = SR1MUX_IR8; c.addr1mux = ADDR1_SR1; c.addr2mux = ADDR2_ZERO;
        c.pcmux = PCMUX_ADDER; c.ld_pc = 1; xfer(c);
        s_pc = s_reg[s1];
      end
      default: begin   // TRAP
        c = '0; c.marmux = MARMUX_ZEXT; c.gate_marmux = 1; c.ld_mar = 1; xfer(c);
        c = c_mdr_mem(); c.gate_pc = 1; c.drmux = DRMUX_R7; c.ld_reg = 1; xfer(c);
        c = '0; c.gate_mdr = 1; c.pcmux = PCMUX_BUS; c.ld_pc = 1; xfer(c);
        s_reg[7] = s_pc; s_pc = mem[{8'h00, instr[7:0]}];
      end
    endcase
    checks++;
    if (pc !== s_pc || ir !== instr || nzp !== s_nzp) begin
      failures++;
      $display("FAIL ir=%h: pc %h/%h ir %h nzp %b/%b", instr, pc, s_pc, ir, nzp, s_nzp);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.u_regfile.regs[i] !== s_reg[i]) begin
        failures++;
        $display("FAIL ir=%h: R%0d=%h expected %h", instr, i, dut.u_regfile.regs[i], s_reg[i]);
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
    logic [3:0] ops [15] = '{4'b0001, 4'b0101, 4'b1001, 4'b1110, 4'b0010, 4'b0110, 4'b1010,
                             4'b0011, 4'b0111, 4'b1011, 4'b0000, 4'b1100, 4'b1111, 4'b0001, 4'b0101};
    for (int i = 0; i < 65536; i++) mem[i] = word_t'($urandom);
    for (int i = 0; i < 8; i++) s_reg[i] = '0;
    s_pc = 16'h3000; s_nzp = 3'b010;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++)
      run_one({ops[$urandom_range(0, 14)], 12'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
