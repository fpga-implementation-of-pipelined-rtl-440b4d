// addsub -- W-bit two's-complement adder/subtractor.
//
// result = dataa + datab when add_sub is 1, dataa - datab when it is 0,
// modulo 2^W. It is the adder module of the filter's accumulation chain,
// where add_sub is tied to 1. Purely combinational.
// The port names and the 32-bit width follow the reference design's adder
// (add_sub = 1 adds, as its simulation shows); the reference module also has
// a clock input, which is left out here because the filter registers every
// adder output in a separate delay register.
module addsub
  import fir_pkg::*;
#(
  parameter int unsigned W = FIR_ACC_W
) (
  input  logic [W-1:0] dataa,
  input  logic [W-1:0] datab,
  input  logic         add_sub,  // 1: add, 0: subtract
  output logic [W-1:0] result
);

  always_comb begin
    if (add_sub) result = dataa + datab;
    else         result = dataa - datab;
  end

endmodule
