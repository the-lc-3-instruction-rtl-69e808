// lc3_ben: the LC-3 branch enable register.
//
// In DECODE (ld_ben high) it loads BEN = nN + zZ + pP, where n, z, p are
// IR[11:9] of a BR instruction and N, Z, P the condition codes. The branch
// state then loads the PC with the branch target only if BEN is 1. Reset
// clears it (this design's choice).
module lc3_ben (
  input  logic       clk,
  input  logic       rst_n,      // synchronous, active low
  input  logic       ld_ben,     // LD.BEN
  input  logic [2:0] ir_nzp,     // IR[11:9] = {n, z, p}
  input  logic [2:0] cc_nzp,     // {N, Z, P}
  output logic       ben
);

  always_ff @(posedge clk) begin
    if (!rst_n)      ben <= 1'b0;
    else if (ld_ben) ben <= |(ir_nzp & cc_nzp);
  end

endmodule
