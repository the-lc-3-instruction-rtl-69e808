// lc3_datapath: the LC-3 datapath, built around one 16-bit bus.
//
// Holds the IR, the PC unit (PC, +1, PCMUX), the register file, SR2MUX with
// SEXT(IR[4:0]), the ALU, the address generator (ADDR1MUX, ADDR2MUX, SEXT
// of IR[5:0], IR[8:0], IR[10:0], the address adder, ZEXT(IR[7:0]) and
// MARMUX), MAR and MDR, the N/Z/P condition codes and BEN. Sources reach the
// bus through GatePC, GateMDR, GateALU and GateMARMUX. SR2MUX takes the
// immediate when IR[5] is 1. SR2 is IR[2:0]; SR1 is IR[8:6] or, for a
// store's source, IR[11:9]; DR is IR[11:9] or R7 (TRAP). The control word
// comes from lc3_control; the memory is outside, reached through the MAR
// (address), MDR (write data), mio_en/r_w and mem_rdata. All registers
// change on the rising clock edge; rst_n is synchronous.
module lc3_datapath
  import lc3_pkg::*;
#(
  parameter word_t RESET_PC = 16'h3000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  word_t      mem_rdata,
  output word_t      mem_addr,
  output word_t      mem_wdata,
  output logic       mem_en,
  output logic       mem_we,
  output word_t      ir,
  output logic       ben,
  output word_t      pc,
  output logic [2:0] nzp,
  output word_t      bus
);

  word_t    sr1_out, sr2_out, imm5, sr2mux_out, alu_out;
  word_t    adder_out, marmux_out, mar, mdr;
  reg_idx_t dr, sr1;

  // Instruction register
  always_ff @(posedge clk) begin
    if (!rst_n)          ir <= '0;
    else if (ctrl.ld_ir) ir <= bus;
  end

  lc3_bus u_bus (
    .clk, .gate_pc(ctrl.gate_pc), .gate_mdr(ctrl.gate_mdr),
    .gate_alu(ctrl.gate_alu), .gate_marmux(ctrl.gate_marmux),
    .pc, .mdr, .alu(alu_out), .marmux(marmux_out), .bus
  );

  lc3_pc #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .ld_pc(ctrl.ld_pc), .pcmux(ctrl.pcmux),
    .bus, .adder(adder_out), .pc
  );

  assign dr  = (ctrl.drmux  == DRMUX_R7)   ? reg_idx_t'(7) : ir[11:9];
  assign sr1 = (ctrl.sr1mux == SR1MUX_IR8) ? ir[8:6]       : ir[11:9];

  lc3_regfile u_regfile (
    .clk, .rst_n, .ld_reg(ctrl.ld_reg), .dr, .wdata(bus),
    .sr1, .sr2(ir[2:0]), .sr1_out, .sr2_out
  );

  lc3_sext #(.IN_W(5), .OUT_W(WORD_W)) u_sext5 (.in(ir[4:0]), .out(imm5));
  assign sr2mux_out = ir[5] ? imm5 : sr2_out;

  lc3_alu u_alu (.aluk(ctrl.aluk), .a(sr1_out), .b(sr2mux_out), .y(alu_out));

  lc3_addr_gen u_addr_gen (
    .ir(ir[10:0]), .pc, .sr1(sr1_out), .addr1mux(ctrl.addr1mux),
    .addr2mux(ctrl.addr2mux), .marmux(ctrl.marmux),
    .adder_out, .marmux_out
  );

  lc3_mar_mdr u_mar_mdr (
    .clk, .rst_n, .ld_mar(ctrl.ld_mar), .ld_mdr(ctrl.ld_mdr),
    .mio_en(ctrl.mio_en), .r_w(ctrl.r_w), .bus, .mem_rdata, .mar, .mdr
  );

  lc3_nzp u_nzp (.clk, .rst_n, .ld_cc(ctrl.ld_cc), .bus, .nzp);

  lc3_ben u_ben (
    .clk, .rst_n, .ld_ben(ctrl.ld_ben), .ir_nzp(ir[11:9]), .cc_nzp(nzp), .ben
  );

  assign mem_addr  = mar;
  assign mem_wdata = mdr;
  assign mem_en    = ctrl.mio_en;
  assign mem_we    = ctrl.r_w;

endmodule
