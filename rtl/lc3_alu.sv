// lc3_alu: the LC-3 arithmetic and logic unit.
//
// Purely combinational. ALUK selects the function: ADD (A + B, 16-bit two's
// complement, carry dropped), AND (bitwise), NOT (bitwise complement of A,
// B unused) or PASSA (A unchanged, used to move a store's source register
// to the MDR). For ADD, AND and NOT the code equals IR[15:14] of the
// instruction; the PASSA code 11 is this design's choice.
module lc3_alu
  import lc3_pkg::*;
(
  input  aluk_t aluk,
  input  word_t a,      // from SR1
  input  word_t b,      // from SR2MUX: SR2 or SEXT(IR[4:0])
  output word_t y
);

  always_comb begin
    unique case (aluk)
      ALU_ADD:   y = a + b;
      ALU_AND:   y = a & b;
      ALU_NOT:   y = ~a;
      ALU_PASSA: y = a;
    endcase
  end

endmodule
