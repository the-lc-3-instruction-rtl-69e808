// tb_lc3_alu: self-checking test of the LC-3 ALU.
// Applies edge values and random operands to each ALUK function and compares
// the output with a reference computed here. Combinational, no clock.
module tb_lc3_alu;
  import lc3_pkg::*;

  aluk_t aluk;
  word_t a, b, y, exp_y;
  int checks = 0, failures = 0;

  lc3_alu dut (.aluk, .a, .b, .y);

  task automatic check(input aluk_t k, input word_t ta, input word_t tb_);
    aluk = k; a = ta; b = tb_;
    #1;
    case (k)
      ALU_ADD:   exp_y = word_t'(32'(ta) + 32'(tb_));
      ALU_AND:   exp_y = ta & tb_;
      ALU_NOT:   exp_y = ta ^ 16'hFFFF;
      default:   exp_y = ta;
    endcase
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL aluk=%s a=%h b=%h y=%h expected %h", k.name(), ta, tb_, y, exp_y);
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
    // examples: +1, -1, masks, AND 0
    check(ALU_ADD, 16'h0005, 16'h0001);
    check(ALU_ADD, 16'h0005, 16'hFFFF);
    check(ALU_ADD, 16'h7FFF, 16'h0001);
    check(ALU_ADD, 16'hFFFF, 16'hFFFF);
    check(ALU_AND, 16'hABCD, 16'h0003);
    check(ALU_AND, 16'hABCD, 16'hFFFE);
    check(ALU_AND, 16'hABCD, 16'h0000);
    check(ALU_NOT, 16'h0F0F, 16'h1234);
    check(ALU_PASSA, 16'hBEEF, 16'h1234);
    for (int i = 0; i < 2000; i++)
      check(aluk_t'($urandom_range(0, 3)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
