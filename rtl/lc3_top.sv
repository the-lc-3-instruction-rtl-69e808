// lc3_top: a complete LC-3 processor with its memory.
//
// Joins the control unit, the datapath and a 2^16 x 16-bit memory. After
// rst_n is released the processor fetches from RESET_PC (x3000 by default)
// and runs until reset; there is no halt state, as HALT is an operating
// system service reached through TRAP x25 and the trap vector table at
// x0000-x00FF. Memory contents are not reset: programs, data and the trap
// vector table must be placed in the memory array (u_mem.mem) before reset
// is released. The debug outputs show the PC, IR, condition codes, the bus
// and the control state. A typical instruction takes 5 to 11 cycles with the
// default one-cycle memory latency.
module lc3_top
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned MEM_LATENCY = 1,
  parameter word_t       RESET_PC    = 16'h3000
) (
  input  logic       clk,
  input  logic       rst_n,      // synchronous, active low
  output word_t      dbg_pc,
  output word_t      dbg_ir,
  output state_t     dbg_state,
  output logic [2:0] dbg_nzp,
  output word_t      dbg_bus
);

  ctrl_t ctrl;
  word_t ir, pc, bus, mem_addr, mem_wdata, mem_rdata;
  logic  ben, mem_en, mem_we, mem_ready;
  logic [2:0] nzp;
  state_t state;

  lc3_control u_control (
    .clk, .rst_n, .opcode(ir[15:12]), .ben, .r(mem_ready), .ctrl, .state
  );

  lc3_datapath #(.RESET_PC(RESET_PC)) u_datapath (
    .clk, .rst_n, .ctrl, .mem_rdata, .mem_addr, .mem_wdata,
    .mem_en, .mem_we, .ir, .ben, .pc, .nzp, .bus
  );

  lc3_memory #(.ADDR_W(ADDR_W), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst_n, .en(mem_en), .we(mem_we),
    .addr(mem_addr[ADDR_W-1:0]), .wdata(mem_wdata),
    .rdata(mem_rdata), .ready(mem_ready)
  );

  assign dbg_pc    = pc;
  assign dbg_ir    = ir;
  assign dbg_state = state;
  assign dbg_nzp   = nzp;
  assign dbg_bus   = bus;

endmodule
