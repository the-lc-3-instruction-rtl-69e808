// tb_lc3_regfile: self-checking test of the LC-3 register file.
// Checks the reset contents, then performs random writes and reads against a
// shadow array kept here, including a read of the register being written
// (old value in that cycle, new value next cycle).
module tb_lc3_regfile;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0, ld_reg = 0;
  reg_idx_t dr = '0, sr1 = '0, sr2 = '0;
  word_t wdata = '0, sr1_out, sr2_out;
  word_t shadow [8];
  int checks = 0, failures = 0;

  lc3_regfile dut (.clk, .rst_n, .ld_reg, .dr, .wdata, .sr1, .sr2, .sr1_out, .sr2_out);

  always #5 clk = ~clk;

  task automatic check_reads();
    #1;
    checks++;
    if (sr1_out !== shadow[sr1] || sr2_out !== shadow[sr2]) begin
      failures++;
      $display("FAIL sr1 R%0d=%h (exp %h) sr2 R%0d=%h (exp %h)",
               sr1, sr1_out, shadow[sr1], sr2, sr2_out, shadow[sr2]);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      sr1 = reg_idx_t'(i); sr2 = reg_idx_t'(7 - i);
      check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_reg = ($urandom_range(0, 3) != 0);
      dr = reg_idx_t'($urandom); wdata = word_t'($urandom);
      sr1 = (i % 4 == 0) ? dr : reg_idx_t'($urandom);
      sr2 = reg_idx_t'($urandom);
      check_reads();                 // before the edge: old contents
      @(posedge clk);
      if (ld_reg) shadow[dr] = wdata;
      check_reads();                 // after the edge: new contents
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
