// tb_lc3_addr_gen: self-checking test of the LC-3 address generator.
// For random IR, PC and SR1 values and every ADDR1MUX/ADDR2MUX/MARMUX
// setting, compares the adder and MARMUX outputs with offsets extracted and
// sign-extended here with signed arithmetic. Includes the PC-relative
// example LD R3, x09 at x1480 (PC x1481, address x148A).
module tb_lc3_addr_gen;
  import lc3_pkg::*;

  logic [10:0] ir;
  word_t pc, sr1, adder_out, marmux_out, exp_add, exp_mm;
  addr1mux_t addr1mux;
  addr2mux_t addr2mux;
  marmux_t   marmux;
  int checks = 0, failures = 0;

  lc3_addr_gen dut (.ir, .pc, .sr1, .addr1mux, .addr2mux, .marmux, .adder_out, .marmux_out);

  task automatic check(input logic [10:0] tir, input word_t tpc, input word_t tsr1,
                       input addr1mux_t a1, input addr2mux_t a2, input marmux_t mm);
    int off, base;
    ir = tir; pc = tpc; sr1 = tsr1; addr1mux = a1; addr2mux = a2; marmux = mm;
    #1;
    case (a2)
      ADDR2_ZERO:  off = 0;
      ADDR2_OFF6:  off = int'(tir[5:0])  - (tir[5]  ? 64   : 0);
      ADDR2_OFF9:  off = int'(tir[8:0])  - (tir[8]  ? 512  : 0);
      default:     off = int'(tir[10:0]) - (tir[10] ? 2048 : 0);
    endcase
    base = (a1 == ADDR1_SR1) ? int'(tsr1) : int'(tpc);
    exp_add = word_t'(base + off);
    exp_mm  = (mm == MARMUX_ZEXT) ? word_t'(tir[7:0]) : exp_add;
    checks++;
    if (adder_out !== exp_add || marmux_out !== exp_mm) begin
      failures++;
      $display("FAIL ir=%h pc=%h sr1=%h a1=%0d a2=%0d mm=%0d: add=%h/%h mm=%h/%h",
               tir, tpc, tsr1, a1, a2, mm, adder_out, exp_add, marmux_out, exp_mm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // LD R3, x09 at x1480: PC = x1481, address x148A
    check(11'h609, 16'h1481, 16'h0, ADDR1_PC, ADDR2_OFF9, MARMUX_ADDER);
    if (adder_out !== 16'h148A) begin failures++; $display("FAIL example address"); end
    checks++;
    // extremes of each offset
    check(11'h100, 16'h1000, 16'h0, ADDR1_PC, ADDR2_OFF9, MARMUX_ADDER);   // -256
    check(11'h0FF, 16'h1000, 16'h0, ADDR1_PC, ADDR2_OFF9, MARMUX_ADDER);   // +255
    check(11'h020, 16'h0, 16'h4000, ADDR1_SR1, ADDR2_OFF6, MARMUX_ADDER);  // -32
    check(11'h400, 16'h0010, 16'h0, ADDR1_PC, ADDR2_OFF11, MARMUX_ADDER);  // -1024
    check(11'h0ABC & 11'h7FF, 16'h0, 16'h1234, ADDR1_SR1, ADDR2_ZERO, MARMUX_ADDER);
    check(11'h725, 16'h3000, 16'h0, ADDR1_PC, ADDR2_OFF9, MARMUX_ZEXT);    // trap x25
    for (int i = 0; i < 3000; i++)
      check(11'($urandom), word_t'($urandom), word_t'($urandom),
            addr1mux_t'($urandom_range(0, 1)), addr2mux_t'($urandom_range(0, 3)),
            marmux_t'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
