// tb_lc3_pc: self-checking test of the LC-3 PC and PCMUX.
// Checks the reset address, then random loads from each PCMUX input (PC+1,
// bus, adder) and cycles with LD.PC low, against a model kept here.
module tb_lc3_pc;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0, ld_pc = 0;
  pcmux_t pcmux = PCMUX_INC;
  word_t bus = '0, adder = '0, pc, model;
  int checks = 0, failures = 0;

  lc3_pc #(.RESET_PC(16'h3000)) dut (.clk, .rst_n, .ld_pc, .pcmux, .bus, .adder, .pc);

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
    model = 16'h3000;
    checks++;
    if (pc !== model) begin failures++; $display("FAIL reset pc=%h", pc); end
    @(negedge clk) rst_n = 1;
    // wrap-around of PC + 1
    ld_pc = 1; pcmux = PCMUX_BUS; bus = 16'hFFFF;
    @(posedge clk) #1;
    @(negedge clk) pcmux = PCMUX_INC;
    @(posedge clk) #1;
    checks++;
    if (pc !== 16'h0000) begin failures++; $display("FAIL wrap pc=%h", pc); end
    model = pc;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_pc = ($urandom_range(0, 3) != 0);
      pcmux = pcmux_t'($urandom_range(0, 2));
      bus = word_t'($urandom); adder = word_t'($urandom);
      @(posedge clk);
      if (ld_pc)
        case (pcmux)
          PCMUX_BUS:   model = bus;
          PCMUX_ADDER: model = adder;
          default:     model = model + 1;
        endcase
      #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL ld=%0d mux=%0d pc=%h expected %h", ld_pc, pcmux, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
