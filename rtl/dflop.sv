// dflop -- W-bit D flip-flop with clear: the z^-1 delay element and the
// pipeline latch of the filter.
//
// q takes d on every rising edge of clk; clr forces q to zero at once,
// independent of the clock, and holds it there while it stays high.
// Interface and timing: one clock of latency from d to q.
// The 32-bit width and the clear input follow the reference design's delay
// module (its ports C, CLR, D, Q are clk, clr, d, q here); making the clear
// asynchronous and active high is this design's choice.
module dflop
  import fir_pkg::*;
#(
  parameter int unsigned W = FIR_ACC_W
) (
  input  logic         clk,
  input  logic         clr,  // asynchronous clear, active high
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end

endmodule
