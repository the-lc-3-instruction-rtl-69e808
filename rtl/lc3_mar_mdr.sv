// lc3_mar_mdr: the LC-3 memory address register and memory data register.
//
// MAR loads from the bus when ld_mar is high. MDR loads when ld_mdr is high:
// from the memory's read data during a read access (mio_en high, r_w low),
// otherwise from the bus (the value a store will write, or any bus value).
// During a read the control unit keeps ld_mdr high until memory signals
// ready, so the last load holds the word read. The MAR drives the memory
// address and the MDR its write data; the MDR also reaches the bus through
// GateMDR, which is how LDI/STI move a pointer from MDR to MAR.
module lc3_mar_mdr
  import lc3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,      // synchronous, active low
  input  logic  ld_mar,     // LD.MAR
  input  logic  ld_mdr,     // LD.MDR
  input  logic  mio_en,     // memory access in progress
  input  logic  r_w,        // 1: write
  input  word_t bus,
  input  word_t mem_rdata,
  output word_t mar,
  output word_t mdr
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ld_mar) mar <= bus;
      if (ld_mdr) mdr <= (mio_en && !r_w) ? mem_rdata : bus;
    end
  end

endmodule
