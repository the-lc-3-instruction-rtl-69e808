// lc3_pc: the LC-3 program counter and PCMUX.
//
// On a rising clock edge with ld_pc high the PC takes the PCMUX output:
// PC + 1 (during fetch, so that an executing instruction sees the address
// after its own), the bus (TRAP, loading PC from the MDR) or the address
// adder (taken branches, JMP). Reset loads RESET_PC; the reset address is
// this design's choice (x3000, the usual start of LC-3 user programs).
module lc3_pc
  import lc3_pkg::*;
#(
  parameter word_t RESET_PC = 16'h3000
) (
  input  logic   clk,
  input  logic   rst_n,    // synchronous, active low
  input  logic   ld_pc,    // LD.PC
  input  pcmux_t pcmux,
  input  word_t  bus,
  input  word_t  adder,
  output word_t  pc
);

  word_t pc_next;

  always_comb begin
    unique case (pcmux)
      PCMUX_BUS:   pc_next = bus;
      PCMUX_ADDER: pc_next = adder;
      default:     pc_next = pc + 16'd1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     pc <= RESET_PC;
    else if (ld_pc) pc <= pc_next;
  end

endmodule
