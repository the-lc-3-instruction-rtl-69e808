// lc3_regfile: the LC-3 register file, R0..R7, 16 bits each.
//
// Two combinational read ports, SR1 and SR2, and one write port: on a rising
// clock edge with ld_reg high, the register named by dr takes wdata (the bus).
// Register names are 3 bits wide, as in the instruction formats. Reading a
// register in the cycle it is written returns the old value; the new value
// shows from the next cycle. Clearing every register on reset is this
// design's choice (the ISA leaves reset contents open).
module lc3_regfile
  import lc3_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,     // synchronous, active low
  input  logic     ld_reg,    // LD.REG
  input  reg_idx_t dr,        // destination register
  input  word_t    wdata,     // value from the bus
  input  reg_idx_t sr1,
  input  reg_idx_t sr2,
  output word_t    sr1_out,
  output word_t    sr2_out
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= wdata;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[sr2];

endmodule
