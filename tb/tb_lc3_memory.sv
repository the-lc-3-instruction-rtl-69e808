// tb_lc3_memory: self-checking test of the LC-3 memory and its R handshake.
// With a latency of 3 cycles, performs random reads and writes through the
// enable/ready protocol, compares read data with a shadow copy kept here and
// checks that ready rises exactly LATENCY cycles after enable.
module tb_lc3_memory;
  import lc3_pkg::*;

  localparam int unsigned AW  = 8;
  localparam int unsigned LAT = 3;

  logic clk = 0, rst_n = 0, en = 0, we = 0, ready;
  logic [AW-1:0] addr = '0;
  word_t wdata = '0, rdata;
  word_t shadow [2**AW];
  int checks = 0, failures = 0;

  lc3_memory #(.ADDR_W(AW), .LATENCY(LAT)) dut (.clk, .rst_n, .en, .we, .addr, .wdata, .rdata, .ready);

  always #5 clk = ~clk;

  // One access; returns the read data.
  task automatic access(input logic w, input logic [AW-1:0] a, input word_t d, output word_t q);
    int cycles = 0;
    @(negedge clk);
    en = 1; we = w; addr = a; wdata = d;
    forever begin
      #1;
      if (ready) break;
      @(negedge clk);
      cycles++;
    end
    q = rdata;
    checks++;
    if (cycles != LAT) begin
      failures++;
      $display("FAIL ready after %0d cycles, expected %0d", cycles, LAT);
    end
    @(posedge clk);
    @(negedge clk) en = 0; we = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t q;
    for (int i = 0; i < 2**AW; i++) begin
      shadow[i] = word_t'($urandom);
      dut.mem[i] = shadow[i];
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      logic w;
      logic [AW-1:0] a;
      word_t d;
      w = $urandom_range(0, 1); a = AW'($urandom); d = word_t'($urandom);
      access(w, a, d, q);
      if (w) shadow[a] = d;
      else begin
        checks++;
        if (q !== shadow[a]) begin
          failures++;
          $display("FAIL read [%h] = %h expected %h", a, q, shadow[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
