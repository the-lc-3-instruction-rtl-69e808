// lc3_sext: sign extension of an IN_W-bit two's complement field to OUT_W
// bits (the SEXT boxes of the datapath). Combinational.
module lc3_sext #(
  parameter int unsigned IN_W  = 5,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  assign out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};

endmodule
