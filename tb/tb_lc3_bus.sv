// tb_lc3_bus: self-checking test of the LC-3 bus multiplexer.
// Opens each gate alone with random source values and checks that the bus
// carries that source; with no gate open the bus must read zero.
module tb_lc3_bus;
  import lc3_pkg::*;

  logic clk = 0;
  logic gate_pc, gate_mdr, gate_alu, gate_marmux;
  word_t pc, mdr, alu, marmux, bus, exp_bus;
  int checks = 0, failures = 0;

  lc3_bus dut (.clk, .gate_pc, .gate_mdr, .gate_alu, .gate_marmux,
               .pc, .mdr, .alu, .marmux, .bus);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int g;
      @(negedge clk);
      pc = word_t'($urandom); mdr = word_t'($urandom);
      alu = word_t'($urandom); marmux = word_t'($urandom);
      g = $urandom_range(0, 4);
      {gate_pc, gate_mdr, gate_alu, gate_marmux} = (g == 4) ? 4'b0000 : 4'(4'b1000 >> g);
      case (g)
        0: exp_bus = pc;
        1: exp_bus = mdr;
        2: exp_bus = alu;
        3: exp_bus = marmux;
        default: exp_bus = '0;
      endcase
      #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL gate %0d: bus=%h expected %h", g, bus, exp_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
