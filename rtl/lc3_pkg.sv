// lc3_pkg: types and constants shared by the LC-3 processor.
//
// Holds the opcode encoding (IR[15:12]), the ALU function code ALUK, the
// select codes of the datapath multiplexers, the control word that the
// control unit hands to the datapath each cycle, and the control states.
// The opcodes of ADD, AND, NOT, LD, ST, LDI, STI, LDR, STR, LEA, BR and TRAP
// follow the LC-3 instruction formats; JMP uses the standard LC-3 code 1100.
// The numeric codes of the mux selects and of the states are this design's
// own choice.
package lc3_pkg;

  localparam int unsigned WORD_W = 16;   // width of a word, register and address
  localparam int unsigned NREGS  = 8;    // R0..R7, named by 3-bit fields
  localparam int unsigned REG_AW = 3;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_idx_t;

  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,   // not executed by this design (treated as no-op)
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,   // not executed by this design (treated as no-op)
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,   // reserved (treated as no-op)
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_t;

  // ALUK: for operate instructions it equals IR[15:14] (ADD 00, AND 01,
  // NOT 10); code 11 passes input A for stores.
  typedef enum logic [1:0] {
    ALU_ADD   = 2'b00,
    ALU_AND   = 2'b01,
    ALU_NOT   = 2'b10,
    ALU_PASSA = 2'b11
  } aluk_t;

  typedef enum logic [1:0] {
    PCMUX_INC   = 2'd0,   // PC + 1
    PCMUX_BUS   = 2'd1,   // value on the bus
    PCMUX_ADDER = 2'd2    // output of the address adder
  } pcmux_t;

  typedef enum logic [1:0] {
    ADDR2_ZERO  = 2'd0,
    ADDR2_OFF6  = 2'd1,   // SEXT(IR[5:0])
    ADDR2_OFF9  = 2'd2,   // SEXT(IR[8:0])
    ADDR2_OFF11 = 2'd3    // SEXT(IR[10:0])
  } addr2mux_t;

  typedef enum logic {
    ADDR1_PC  = 1'b0,
    ADDR1_SR1 = 1'b1
  } addr1mux_t;

  typedef enum logic {
    MARMUX_ZEXT  = 1'b0,  // ZEXT(IR[7:0]), trap vector
    MARMUX_ADDER = 1'b1
  } marmux_t;

  typedef enum logic {
    DRMUX_IR11 = 1'b0,    // IR[11:9]
    DRMUX_R7   = 1'b1
  } drmux_t;

  typedef enum logic {
    SR1MUX_IR11 = 1'b0,   // IR[11:9], source of a store
    SR1MUX_IR8  = 1'b1    // IR[8:6], SR1 / BaseR
  } sr1mux_t;

  // One cycle's worth of control signals.
  typedef struct packed {
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_ben;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    logic      gate_pc;
    logic      gate_mdr;
    logic      gate_alu;
    logic      gate_marmux;
    pcmux_t    pcmux;
    drmux_t    drmux;
    sr1mux_t   sr1mux;
    addr1mux_t addr1mux;
    addr2mux_t addr2mux;
    marmux_t   marmux;
    aluk_t     aluk;
    logic      mio_en;    // memory access in progress
    logic      r_w;       // 1: write, 0: read
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  typedef enum logic [4:0] {
    S_FETCH1,     // MAR <- PC, PC <- PC + 1
    S_FETCH2,     // MDR <- M[MAR], wait for R
    S_FETCH3,     // IR <- MDR
    S_DECODE,     // BEN <- nN + zZ + pP, dispatch on opcode
    S_OPERATE,    // DR <- SR1 op SR2/imm5, set CC
    S_LEA,        // DR <- PC + SEXT(IR[8:0]), set CC
    S_ADDR_PC,    // MAR <- PC + SEXT(IR[8:0])      (LD, ST, LDI, STI)
    S_ADDR_BASE,  // MAR <- BaseR + SEXT(IR[5:0])   (LDR, STR)
    S_IND_READ,   // MDR <- M[MAR], wait for R      (LDI, STI)
    S_IND_MAR,    // MAR <- MDR                     (LDI, STI)
    S_LD_READ,    // MDR <- M[MAR], wait for R
    S_LD_WB,      // DR <- MDR, set CC
    S_ST_MDR,     // MDR <- SR (ALU passes A)
    S_ST_WRITE,   // M[MAR] <- MDR, wait for R
    S_BR,         // if BEN: PC <- PC + SEXT(IR[8:0])
    S_JMP,        // PC <- BaseR
    S_TRAP1,      // MAR <- ZEXT(IR[7:0])
    S_TRAP2,      // MDR <- M[MAR], R7 <- PC, wait for R
    S_TRAP3       // PC <- MDR
  } state_t;

endpackage
