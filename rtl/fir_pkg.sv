// fir_pkg -- sizes and types shared by the pipelined FIR filter and its
// building blocks.
//
// The sizes are those of the reference design: 8 taps, 16-bit input samples
// and coefficients, 32-bit products and a 32-bit accumulation chain.
// booth_op_e names the five radix-4 Booth digits (0, +y, +2y, -y, -2y) that a
// three-bit group of the multiplier selects.
package fir_pkg;

  localparam int unsigned FIR_TAPS   = 8;   // filter length
  localparam int unsigned FIR_DATA_W = 16;  // sample and coefficient width
  localparam int unsigned FIR_ACC_W  = 32;  // adder chain / delay register width

  typedef enum logic [2:0] {
    BOOTH_ZERO = 3'd0,
    BOOTH_POS1 = 3'd1,
    BOOTH_POS2 = 3'd2,
    BOOTH_NEG1 = 3'd3,
    BOOTH_NEG2 = 3'd4
  } booth_op_e;

  // Radix-4 Booth recoding of one group {X(i), X(i-1), X(i-2)}.
  function automatic booth_op_e booth_decode(input logic [2:0] grp);
    unique case (grp)
      3'b000:  return BOOTH_ZERO;
      3'b001:  return BOOTH_POS1;
      3'b010:  return BOOTH_POS1;
      3'b011:  return BOOTH_POS2;
      3'b100:  return BOOTH_NEG2;
      3'b101:  return BOOTH_NEG1;
      3'b110:  return BOOTH_NEG1;
      default: return BOOTH_ZERO;  // 3'b111
    endcase
  endfunction

endpackage
