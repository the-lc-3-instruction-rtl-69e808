// lc3_bus: the shared 16-bit bus of the LC-3 datapath.
//
// Four gate signals decide which source drives the bus: GatePC, GateMDR,
// GateALU and GateMARMUX. Here the bus is an AND-OR multiplexer:
// each source is masked by its gate and the results are ORed, and the bus
// reads zero when no gate is open. At most one gate may be open in a cycle;
// an assertion checks it.
module lc3_bus
  import lc3_pkg::*;
(
  input  logic  clk,            // only for the assertion
  input  logic  gate_pc,
  input  logic  gate_mdr,
  input  logic  gate_alu,
  input  logic  gate_marmux,
  input  word_t pc,
  input  word_t mdr,
  input  word_t alu,
  input  word_t marmux,
  output word_t bus
);

  assign bus = ({WORD_W{gate_pc}}     & pc)
             | ({WORD_W{gate_mdr}}    & mdr)
             | ({WORD_W{gate_alu}}    & alu)
             | ({WORD_W{gate_marmux}} & marmux);

  assert property (@(posedge clk) $onehot0({gate_pc, gate_mdr, gate_alu, gate_marmux}))
    else $error("more than one gate drives the bus");

endmodule
