// tb_dflop -- self-checking testbench for the 32-bit D flip-flop with clear.
//
// Checks that q follows d one clock later, that q holds between edges, and
// that clr forces q to zero at once, without a clock edge, and keeps it there.
module tb_dflop;

  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         clr;
  logic [W-1:0] d, q;

  int checks = 0;
  int failures = 0;

  dflop dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic [W-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected=%h", what, q, e);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    clr = 1'b0;
    d   = 32'h0000_006D;
    #1 clr = 1'b1;
    #1 expect_q('0, "clear without clock");
    @(posedge clk); #1 expect_q('0, "clear held over an edge");
    clr = 1'b0;
    @(posedge clk); #1 expect_q(32'h0000_006D, "first capture");
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      prev = q;
      d = $urandom;
      #1 expect_q(prev, "hold between edges");
      @(posedge clk); #1 expect_q(d, "capture");
      if (r % 37 == 36) begin
        #1 clr = 1'b1;
        #1 expect_q('0, "asynchronous clear");
        @(negedge clk) clr = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
