// lc3_nzp: the LC-3 condition codes N, Z and P.
//
// Three 1-bit registers. On a rising clock edge with ld_cc high they record
// whether the value on the bus (the value being written to the register
// file) is negative (bit 15 set), zero, or positive, so exactly one of them
// is 1. Reset sets Z, which keeps that rule from the first cycle; the reset
// value is this design's choice.
module lc3_nzp
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,   // synchronous, active low
  input  logic       ld_cc,   // LD.CC
  input  word_t      bus,
  output logic [2:0] nzp      // {N, Z, P}
);

  logic [2:0] nzp_next;

  always_comb begin
    if (bus[WORD_W-1])   nzp_next = 3'b100;
    else if (bus == '0)  nzp_next = 3'b010;
    else                 nzp_next = 3'b001;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     nzp <= 3'b010;
    else if (ld_cc) nzp <= nzp_next;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(nzp))
    else $error("condition codes not one-hot: %b", nzp);

endmodule
