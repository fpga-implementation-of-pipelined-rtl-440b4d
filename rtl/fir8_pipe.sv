// fir8_pipe -- pipelined 8-tap FIR filter (transposed direct form).
//
// Every input sample x is broadcast to TAPS Booth multipliers at once, one per
// coefficient h[k]. The products are summed along a chain of adders, and each
// adder output is held in a delay register before it reaches the next adder:
//
//   q[0]   <= h[0] * x
//   q[k]   <= q[k-1] + h[k] * x          k = 1 .. TAPS-1
//   yn      = q[TAPS-1]
//
// The registers that in the direct form delay the input samples here delay the
// partial sums instead, so the longest path between two registers is one
// multiplication and one addition (T_M + T_A), whatever the number of taps;
// the direct form needs T_M + (TAPS-1) T_A.
//
// Timing: one sample per clock. A sample taken at a rising edge first shows
// in yn right after that edge, scaled by h[TAPS-1]; it contributes h[k] to yn
// TAPS-1-k edges later. So after edge n
//   yn(n) = sum_{j=0}^{TAPS-1} h[TAPS-1-j] * x(n-j),
// the FIR convolution with the coefficients taken from h[TAPS-1] down to
// h[0]; for the symmetric coefficients of a linear-phase design this is the
// same as using them from h[0] up. The impulse response on yn is h[TAPS-1],
// h[TAPS-2], ..., h[0]. The output is registered; the input is not.
// clr empties the pipeline asynchronously (all partial sums to zero).
//
// What follows the reference design: the transposed structure with h[0] at
// the start of the chain, a register after every adder including the last,
// the Booth multiplier, adder and clearable D flip-flop as the three building
// blocks, the 16-bit samples and the 32-bit products and sums. This design's
// own choices: coefficients as input ports (loadable at run time), the
// TAPS parameter, sums that wrap modulo 2^ACC_W (eight full-scale 32-bit
// products can exceed 32 bits; widen ACC_W to avoid it).
module fir8_pipe
  import fir_pkg::*;
#(
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned DATA_W = FIR_DATA_W,  // even, for radix-4 Booth
  parameter int unsigned ACC_W  = FIR_ACC_W    // at least 2*DATA_W
) (
  input  logic                     clk,
  input  logic                     clr,           // asynchronous clear, active high
  input  logic signed [DATA_W-1:0] x,             // input sample, one per clock
  input  logic signed [DATA_W-1:0] h [TAPS],      // coefficients h0 .. h(TAPS-1)
  output logic signed [ACC_W-1:0]  yn             // filter output, registered
);

  localparam int unsigned PW = 2 * DATA_W;

  logic signed [PW-1:0]  t   [TAPS];  // products h[k] * x
  logic        [ACC_W-1:0] t_ext [TAPS];  // products sign-extended to ACC_W
  logic        [ACC_W-1:0] s   [TAPS];  // adder outputs (s[0] is the bare product)
  logic        [ACC_W-1:0] q   [TAPS];  // delay registers

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_mult #(.W(DATA_W)) u_mult (
      .x (h[k]),
      .y (x),
      .p (t[k])
    );

    assign t_ext[k] = ACC_W'(t[k]);

    if (k == 0) begin : g_first
      assign s[k] = t_ext[k];
    end else begin : g_add
      addsub #(.W(ACC_W)) u_add (
        .dataa   (q[k-1]),
        .datab   (t_ext[k]),
        .add_sub (1'b1),
        .result  (s[k])
      );
    end

    dflop #(.W(ACC_W)) u_reg (
      .clk (clk),
      .clr (clr),
      .d   (s[k]),
      .q   (q[k])
    );
  end

  assign yn = q[TAPS-1];

  initial begin
    assert (TAPS >= 1) else $error("fir8_pipe: TAPS must be at least 1");
    assert (ACC_W >= PW) else $error("fir8_pipe: ACC_W must be at least 2*DATA_W");
  end

endmodule
