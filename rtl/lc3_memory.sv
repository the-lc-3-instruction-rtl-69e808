// lc3_memory: LC-3 main memory, 2^ADDR_W words of 16 bits.
//
// Word addressed, one access at a time. The control unit holds en high (and
// we for a write) for the whole access, with addr and wdata steady. The
// memory raises ready (the R signal) LATENCY cycles after en rises. Read data
// is registered and is valid in the ready cycle; a write takes effect at the
// end of the ready cycle. The access ends when en falls; en must be low for
// at least one cycle between accesses. The 16-bit address and word follow
// the LC-3; the handshake and the latency (default 1) are this design's
// choice. Contents are not reset.
module lc3_memory
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned LATENCY = 1     // >= 1 cycles from en to ready
) (
  input  logic              clk,
  input  logic              rst_n,       // synchronous, active low
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             wdata,
  output word_t             rdata,
  output logic              ready
);

  word_t mem [2**ADDR_W];

  localparam int unsigned CNT_W = $clog2(LATENCY + 1);
  logic [CNT_W-1:0] cnt;

  assign ready = en && (cnt == CNT_W'(LATENCY));

  always_ff @(posedge clk) begin
    if (!rst_n || !en || ready) cnt <= '0;
    else                        cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
    if (en && we && ready) mem[addr] <= wdata;
  end

  // Handshake rule: once an access has started, it stays requested with the
  // same address and direction, and a write with the same data, until ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   en && !ready |=> en && $stable(addr) && $stable(we) && (!we || $stable(wdata)))
    else $error("memory access changed before ready");

  initial assert (LATENCY >= 1) else $fatal(1, "LATENCY must be at least 1");

endmodule
