// lc3_control: the LC-3 control unit, a finite state machine.
//
// Each instruction runs FETCH (three states: MAR <- PC and PC <- PC + 1;
// MDR <- M[MAR]; IR <- MDR), then DECODE, which loads BEN and dispatches on
// IR[15:12], then the execute states of its opcode, and returns to FETCH.
// Every state produces one control word (ctrl_t) for the datapath. States
// that access memory hold until the memory's R (ready) input is high.
//
// Execute sequences (bus transfers, one per state):
//   ADD/AND/NOT  DR <- ALU, set CC; ALUK = IR[15:14]
//   LEA          DR <- PC + SEXT(IR[8:0]) through MARMUX, set CC
//   LD           MAR <- PC + off9; MDR <- M; DR <- MDR, set CC
//   LDR          MAR <- BaseR + off6; then as LD
//   LDI          MAR <- PC + off9; MDR <- M; MAR <- MDR; then as LD
//   ST/STR/STI   address as LD/LDR/LDI; MDR <- SR (ALU passes A);
//                M[MAR] <- MDR
//   BR           if BEN then PC <- PC + SEXT(IR[8:0])
//   JMP          PC <- BaseR (adder with ADDR2 = 0)
//   TRAP         MAR <- ZEXT(IR[7:0]); MDR <- M and R7 <- PC; PC <- MDR
// The RTL of each instruction, the FETCH/DECODE split and BEN in DECODE
// follow the LC-3; the state split, the TRAP sequence and the treatment of
// opcodes this design does not execute (JSR, RTI, 1101: fetched and ignored)
// are this design's choices. Condition codes are set by every write of a
// register except the R7 link written by TRAP.
//
// Timing: state and outputs change on the rising clock edge; outputs are a
// function of the state, the opcode and BEN only. rst_n is synchronous.
module lc3_control
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,     // synchronous, active low
  input  logic [3:0] opcode,  // IR[15:12]
  input  logic   ben,
  input  logic   r,         // memory ready
  output ctrl_t  ctrl,
  output state_t state
);

  opcode_t op;
  state_t  next;

  assign op = opcode_t'(opcode);

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_FETCH1;
    else        state <= next;
  end

  // Next state
  always_comb begin
    next = state;
    unique case (state)
      S_FETCH1: next = S_FETCH2;
      S_FETCH2: if (r) next = S_FETCH3;
      S_FETCH3: next = S_DECODE;
      S_DECODE: begin
        unique case (op)
          OP_ADD, OP_AND, OP_NOT:         next = S_OPERATE;
          OP_LEA:                         next = S_LEA;
          OP_LD, OP_ST, OP_LDI, OP_STI:   next = S_ADDR_PC;
          OP_LDR, OP_STR:                 next = S_ADDR_BASE;
          OP_BR:                          next = S_BR;
          OP_JMP:                         next = S_JMP;
          OP_TRAP:                        next = S_TRAP1;
          default:                        next = S_FETCH1;
        endcase
      end
      S_ADDR_PC, S_ADDR_BASE: begin
        unique case (op)
          OP_LDI, OP_STI: next = S_IND_READ;
          OP_ST, OP_STR:  next = S_ST_MDR;
          default:        next = S_LD_READ;
        endcase
      end
      S_IND_READ: if (r) next = S_IND_MAR;
      S_IND_MAR:  next = (op == OP_STI) ? S_ST_MDR : S_LD_READ;
      S_LD_READ:  if (r) next = S_LD_WB;
      S_ST_MDR:   next = S_ST_WRITE;
      S_ST_WRITE: if (r) next = S_FETCH1;
      S_TRAP1:    next = S_TRAP2;
      S_TRAP2:    if (r) next = S_TRAP3;
      S_OPERATE, S_LEA, S_LD_WB, S_BR, S_JMP, S_TRAP3: next = S_FETCH1;
      default:    next = S_FETCH1;
    endcase
  end

  // Control word of each state
  always_comb begin
    ctrl = CTRL_IDLE;
    ctrl.aluk = aluk_t'(opcode[3:2]);   // IR[15:14]
    unique case (state)
      S_FETCH1: begin
        ctrl.gate_pc = 1'b1;
        ctrl.ld_mar  = 1'b1;
        ctrl.ld_pc   = 1'b1;
        ctrl.pcmux   = PCMUX_INC;
      end
      S_FETCH2, S_IND_READ, S_LD_READ: begin
        ctrl.mio_en = 1'b1;
        ctrl.ld_mdr = 1'b1;
      end
      S_FETCH3: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.ld_ir    = 1'b1;
      end
      S_DECODE: ctrl.ld_ben = 1'b1;
      S_OPERATE: begin
        ctrl.sr1mux   = SR1MUX_IR8;
        ctrl.gate_alu = 1'b1;
        ctrl.ld_reg   = 1'b1;
        ctrl.ld_cc    = 1'b1;
      end
      S_LEA: begin
        ctrl.addr1mux    = ADDR1_PC;
        ctrl.addr2mux    = ADDR2_OFF9;
        ctrl.marmux      = MARMUX_ADDER;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_reg      = 1'b1;
        ctrl.ld_cc       = 1'b1;
      end
      S_ADDR_PC: begin
        ctrl.addr1mux    = ADDR1_PC;
        ctrl.addr2mux    = ADDR2_OFF9;
        ctrl.marmux      = MARMUX_ADDER;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_mar      = 1'b1;
      end
      S_ADDR_BASE: begin
        ctrl.sr1mux      = SR1MUX_IR8;
        ctrl.addr1mux    = ADDR1_SR1;
        ctrl.addr2mux    = ADDR2_OFF6;
        ctrl.marmux      = MARMUX_ADDER;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_mar      = 1'b1;
      end
      S_IND_MAR: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.ld_mar   = 1'b1;
      end
      S_LD_WB: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.ld_reg   = 1'b1;
        ctrl.ld_cc    = 1'b1;
      end
      S_ST_MDR: begin
        ctrl.sr1mux   = SR1MUX_IR11;
        ctrl.aluk     = ALU_PASSA;
        ctrl.gate_alu = 1'b1;
        ctrl.ld_mdr   = 1'b1;
      end
      S_ST_WRITE: begin
        ctrl.mio_en = 1'b1;
        ctrl.r_w    = 1'b1;
      end
      S_BR: begin
        ctrl.addr1mux = ADDR1_PC;
        ctrl.addr2mux = ADDR2_OFF9;
        ctrl.pcmux    = PCMUX_ADDER;
        ctrl.ld_pc    = ben;
      end
      S_JMP: begin
        ctrl.sr1mux   = SR1MUX_IR8;
        ctrl.addr1mux = ADDR1_SR1;
        ctrl.addr2mux = ADDR2_ZERO;
        ctrl.pcmux    = PCMUX_ADDER;
        ctrl.ld_pc    = 1'b1;
      end
      S_TRAP1: begin
        ctrl.marmux      = MARMUX_ZEXT;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_mar      = 1'b1;
      end
      S_TRAP2: begin
        ctrl.mio_en  = 1'b1;
        ctrl.ld_mdr  = 1'b1;
        ctrl.gate_pc = 1'b1;
        ctrl.drmux   = DRMUX_R7;
        ctrl.ld_reg  = 1'b1;
      end
      S_TRAP3: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.pcmux    = PCMUX_BUS;
        ctrl.ld_pc    = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
