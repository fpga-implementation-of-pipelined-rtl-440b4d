// booth_mult -- signed W x W radix-4 modified Booth multiplier.
//
// The multiplier x is scanned two bits at a time: group j is
// {x[2j+1], x[2j], x[2j-1]} with x[-1] = 0, so a 16-bit x gives 8 partial
// products instead of 16. Each group is recoded by booth_pp into one of
// 0, +-y, +-2y; the partial products are sign-extended, weighted by 4^j and
// summed into the 2W-bit two's-complement product p = x * y.
// Purely combinational, no latency: in the filter the register that follows
// the adder closes the one-multiply-plus-one-add pipeline stage.
// Port names x, y and p follow the reference design's multiplier; the
// reduction of the partial products as a plain adder tree (left to the
// synthesis tool) is this design's choice.
module booth_mult
  import fir_pkg::*;
#(
  parameter int unsigned W = FIR_DATA_W  // operand width, must be even
) (
  input  logic signed [W-1:0]   x,  // multiplier (recoded)
  input  logic signed [W-1:0]   y,  // multiplicand
  output logic signed [2*W-1:0] p   // product
);

  localparam int unsigned NPP = W / 2;  // number of partial products

  logic [W:0]          x_pad;            // x with the implicit x[-1] = 0
  logic signed [W+1:0] pp [NPP];

  assign x_pad = {x, 1'b0};

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    booth_op_e op_unused;
    booth_pp #(.W(W)) u_pp (
      .grp (x_pad[2*j +: 3]),
      .y   (y),
      .op  (op_unused),
      .pp  (pp[j])
    );
  end

  always_comb begin
    logic signed [2*W-1:0] acc;
    acc = '0;
    for (int j = 0; j < NPP; j++) begin
      acc = acc + ((2*W)'(pp[j]) <<< (2 * j));
    end
    p = acc;
  end

  initial begin
    assert (W % 2 == 0) else $error("booth_mult: W must be even");
  end

endmodule
