// lc3_addr_gen: LC-3 address generation.
//
// The address adder sums two operands. ADDR1MUX chooses the PC or the SR1
// register (a base register). ADDR2MUX chooses zero or a sign-extended field
// of the instruction: IR[5:0] (base+offset), IR[8:0] (PC-relative, branches,
// LEA) or IR[10:0]. MARMUX then chooses between the sum and the
// zero-extended IR[7:0] (a trap vector) for the bus. All of it is
// combinational; the muxes, their inputs and the extension widths follow
// the LC-3 datapath.
module lc3_addr_gen
  import lc3_pkg::*;
(
  input  logic [10:0] ir,         // IR[10:0]
  input  word_t     pc,
  input  word_t     sr1,
  input  addr1mux_t addr1mux,
  input  addr2mux_t addr2mux,
  input  marmux_t   marmux,
  output word_t     adder_out,   // to PCMUX
  output word_t     marmux_out   // to the bus through GateMARMUX
);

  word_t off6, off9, off11, op1, op2;

  lc3_sext #(.IN_W(6),  .OUT_W(WORD_W)) u_sext6  (.in(ir[5:0]),  .out(off6));
  lc3_sext #(.IN_W(9),  .OUT_W(WORD_W)) u_sext9  (.in(ir[8:0]),  .out(off9));
  lc3_sext #(.IN_W(11), .OUT_W(WORD_W)) u_sext11 (.in(ir[10:0]), .out(off11));

  always_comb begin
    op1 = (addr1mux == ADDR1_SR1) ? sr1 : pc;
    unique case (addr2mux)
      ADDR2_ZERO:  op2 = '0;
      ADDR2_OFF6:  op2 = off6;
      ADDR2_OFF9:  op2 = off9;
      ADDR2_OFF11: op2 = off11;
    endcase
  end

  assign adder_out  = op1 + op2;
  assign marmux_out = (marmux == MARMUX_ZEXT) ? {8'h00, ir[7:0]} : adder_out;

endmodule
