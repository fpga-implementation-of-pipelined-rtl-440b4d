// tb_booth_mult -- self-checking testbench for the 16 x 16 radix-4 Booth
// multiplier.
//
// Applies corner cases (0, +-1, the most positive and most negative values)
// in every combination, then random operands, and compares the product with
// a 64-bit integer multiplication.
module tb_booth_mult;

  localparam int unsigned W = 16;

  logic signed [W-1:0]   x, y;
  logic signed [2*W-1:0] p;

  int checks = 0;
  int failures = 0;

  booth_mult dut (.x(x), .y(y), .p(p));

  task automatic check_one(input logic signed [W-1:0] xv, input logic signed [W-1:0] yv);
    longint expected;
    x = xv;
    y = yv;
    #1;
    expected = longint'(xv) * longint'(yv);
    checks++;
    if (longint'(p) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d p=%0d expected=%0d", xv, yv, p, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] corners [7];
    corners = '{16'sh0000, 16'sh0001, 16'shFFFF, 16'sh7FFF, 16'sh8000, 16'sh5555, 16'shAAAA};
    foreach (corners[a]) foreach (corners[b]) check_one(corners[a], corners[b]);
    for (int r = 0; r < 20000; r++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
