// tb_lc3_ben: self-checking test of the LC-3 branch enable register.
// Runs every combination of the instruction's n, z, p bits and the condition
// codes, with LD.BEN on and off, and checks BEN against the branch rule:
// taken when some bit set in the instruction matches the condition code that
// is set. Includes the named cases BRnz, BRnp and BRnzp.
module tb_lc3_ben;
  logic clk = 0, rst_n = 0, ld_ben = 0, ben, model;
  logic [2:0] ir_nzp = '0, cc_nzp = '0;
  int checks = 0, failures = 0;

  lc3_ben dut (.clk, .rst_n, .ld_ben, .ir_nzp, .cc_nzp, .ben);

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
    @(negedge clk) rst_n = 1;
    model = 1'b0;
    for (int rep = 0; rep < 4; rep++)
      for (int i = 0; i < 8; i++)
        for (int c = 0; c < 3; c++) begin
          @(negedge clk);
          ir_nzp = 3'(i);
          cc_nzp = 3'b100 >> c;       // exactly one condition code is set
          ld_ben = (rep != 1);
          @(posedge clk);
          if (ld_ben)
            case (c)
              0: model = ir_nzp[2];   // N set: taken if n
              1: model = ir_nzp[1];   // Z set: taken if z
              default: model = ir_nzp[0];
            endcase
          #1;
          checks++;
          if (ben !== model) begin
            failures++;
            $display("FAIL nzp(ir)=%b NZP=%b ben=%b expected %b", ir_nzp, cc_nzp, ben, model);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
