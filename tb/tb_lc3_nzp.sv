// tb_lc3_nzp: self-checking test of the LC-3 condition codes.
// Checks that reset gives Z, then loads random and edge bus values (x0000,
// x8000, x7FFF, xFFFF) and compares N, Z, P with the sign and zero-ness
// worked out here; with LD.CC low the codes must hold.
module tb_lc3_nzp;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0, ld_cc = 0;
  word_t bus = '0;
  logic [2:0] nzp, model;
  int checks = 0, failures = 0;

  lc3_nzp dut (.clk, .rst_n, .ld_cc, .bus, .nzp);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    model = 3'b010;
    checks++;
    if (nzp !== model) begin failures++; $display("FAIL reset nzp=%b", nzp); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_cc = ($urandom_range(0, 3) != 0);
      case (i % 6)
        0: bus = 16'h0000;
        1: bus = 16'h8000;
        2: bus = 16'h7FFF;
        3: bus = 16'hFFFF;
        default: bus = word_t'($urandom);
      endcase
      @(posedge clk);
      if (ld_cc) model = ($signed(bus) < 0) ? 3'b100 : (($signed(bus) == 0) ? 3'b010 : 3'b001);
      #1;
      checks++;
      if (nzp !== model) begin
        failures++;
        $display("FAIL bus=%h ld=%0d nzp=%b expected %b", bus, ld_cc, nzp, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
