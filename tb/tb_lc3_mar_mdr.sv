// tb_lc3_mar_mdr: self-checking test of the LC-3 MAR and MDR.
// Random cycles of LD.MAR, LD.MDR, memory enable and read/write; checks that
// MAR follows the bus, and that MDR takes the memory's read data during a
// read and the bus otherwise, against a model kept here.
module tb_lc3_mar_mdr;
  import lc3_pkg::*;

  logic clk = 0, rst_n = 0, ld_mar = 0, ld_mdr = 0, mio_en = 0, r_w = 0;
  word_t bus = '0, mem_rdata = '0, mar, mdr, m_mar, m_mdr;
  int checks = 0, failures = 0;

  lc3_mar_mdr dut (.clk, .rst_n, .ld_mar, .ld_mdr, .mio_en, .r_w, .bus, .mem_rdata, .mar, .mdr);

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
    m_mar = '0; m_mdr = '0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_mar = $urandom_range(0, 1); ld_mdr = $urandom_range(0, 1);
      mio_en = $urandom_range(0, 1); r_w = $urandom_range(0, 1);
      bus = word_t'($urandom); mem_rdata = word_t'($urandom);
      @(posedge clk);
      if (ld_mar) m_mar = bus;
      if (ld_mdr) m_mdr = (mio_en && !r_w) ? mem_rdata : bus;
      #1;
      checks++;
      if (mar !== m_mar || mdr !== m_mdr) begin
        failures++;
        $display("FAIL mar=%h (%h) mdr=%h (%h)", mar, m_mar, mdr, m_mdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
