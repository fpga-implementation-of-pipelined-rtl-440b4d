// booth_pp -- radix-4 Booth encoder and partial-product selector.
//
// One group of three multiplier bits {X(i), X(i-1), X(i-2)} is recoded into a
// signed digit of {-2, -1, 0, +1, +2} following the radix-4 modified Booth
// table, and the matching multiple of the multiplicand y is produced:
//   000 -> +0   001 -> +y   010 -> +y   011 -> +2y
//   100 -> -2y  101 -> -y   110 -> -y   111 -> +0
// The result is W+2 bits wide, which holds every multiple of a W-bit signed
// y, including -2 * (-2^(W-1)). Purely combinational. The table is the
// reference design's; the negation by two's complement is this design's.
module booth_pp
  import fir_pkg::*;
#(
  parameter int unsigned W = FIR_DATA_W  // multiplicand width
) (
  input  logic [2:0]          grp,  // {X(i), X(i-1), X(i-2)}
  input  logic signed [W-1:0] y,    // multiplicand
  output booth_op_e           op,   // recoded digit
  output logic signed [W+1:0] pp    // selected partial product
);

  logic signed [W+1:0] y_ext;  // y sign-extended to the output width

  assign y_ext = (W+2)'(y);
  assign op    = booth_decode(grp);

  always_comb begin
    unique case (op)
      BOOTH_POS1: pp = y_ext;
      BOOTH_POS2: pp = y_ext <<< 1;
      BOOTH_NEG1: pp = -y_ext;
      BOOTH_NEG2: pp = -(y_ext <<< 1);
      default:    pp = '0;
    endcase
  end

endmodule
