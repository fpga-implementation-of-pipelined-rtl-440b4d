// tb_booth_pp -- self-checking testbench for the radix-4 Booth encoder and
// partial-product selector.
//
// Every one of the eight bit groups is applied with corner-case and random
// multiplicands. The expected partial product is digit * y, where the digit
// is computed arithmetically as -2*X(i) + X(i-1) + X(i-2), independently of
// the recoding table in the design.
module tb_booth_pp;
  import fir_pkg::*;

  localparam int unsigned W = 16;

  logic [2:0]          grp;
  logic signed [W-1:0] y;
  booth_op_e           op;
  logic signed [W+1:0] pp;

  int checks = 0;
  int failures = 0;

  booth_pp dut (.grp(grp), .y(y), .op(op), .pp(pp));

  task automatic check_one(input logic [2:0] g, input logic signed [W-1:0] yv);
    int digit;
    longint expected;
    grp = g;
    y   = yv;
    #1;
    digit    = -2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
    expected = longint'(digit) * longint'(yv);
    checks++;
    if (longint'(pp) != expected) begin
      failures++;
      $display("FAIL grp=%b y=%0d pp=%0d expected=%0d", g, yv, pp, expected);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] corners [5];
    corners = '{16'sh0000, 16'sh0001, 16'shFFFF, 16'sh7FFF, 16'sh8000};
    for (int g = 0; g < 8; g++) begin
      foreach (corners[c]) check_one(3'(g), corners[c]);
      for (int r = 0; r < 50; r++) check_one(3'(g), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
