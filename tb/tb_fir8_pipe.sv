// tb_fir8_pipe -- end-to-end self-checking testbench for the pipelined FIR
// filter, at its default size (8 taps, 16-bit data, 32-bit sums).
//
// Phases:
//  1. Step response with x = 13 and h = {1, 2, 29, 13, 12, 11, 5, 3}: after
//     eight clocks the output must settle at 13 * 75 = 988.
//  2. Impulse response with random coefficients: a single 1 must come out as
//     h[7], h[6], ..., h[0] on the edges it is taken and the seven after,
//     then zeros (latency and ordering).
//  3. Streaming: a new random full-range sample on every clock, compared each
//     clock with the convolution sum computed from a history of the inputs,
//     modulo 2^32.
//  4. Asynchronous clear in the middle of a stream: the output must drop to
//     zero before the next edge and the filter must restart from empty.
// Each mechanism (pipelined one-sample-per-clock operation, impulse latency,
// clear) is counted; one that never happened counts as a failure.
module tb_fir8_pipe;
  import fir_pkg::*;

  localparam int unsigned T  = FIR_TAPS;
  localparam int unsigned DW = FIR_DATA_W;
  localparam int unsigned AW = FIR_ACC_W;

  logic                 clk = 1'b0;
  logic                 clr;
  logic signed [DW-1:0] x;
  logic signed [DW-1:0] h [T];
  logic signed [AW-1:0] yn;

  int checks = 0;
  int failures = 0;
  int n_stream = 0;    // samples checked at one per clock
  int n_impulse = 0;   // impulse responses checked
  int n_clear = 0;     // mid-stream clears checked
  int n_wrap = 0;      // samples whose exact sum did not fit in 32 bits

  longint xh [T];      // input history, xh[0] is the newest sample

  fir8_pipe dut (.clk(clk), .clr(clr), .x(x), .h(h), .yn(yn));


  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Empty the filter and the reference history.
  task automatic do_clear();
    @(negedge clk);
    clr = 1'b1;
    x = '0;
    foreach (xh[i]) xh[i] = 0;
    @(negedge clk);
    clr = 1'b0;
  endtask

  // Apply one sample at the falling edge, let a rising edge take it, and
  // compare the output with the reference convolution.
  task automatic step_and_check(input logic signed [DW-1:0] xv, input string what);
    longint exact;
    @(negedge clk);
    x = xv;
    @(posedge clk);
    for (int i = T - 1; i > 0; i--) xh[i] = xh[i-1];
    xh[0] = longint'(xv);
    exact = 0;
    for (int j = 0; j < T; j++) exact += longint'(h[T-1-j]) * xh[j];
    if (exact > 64'sd2147483647 || exact < -64'sd2147483648) n_wrap++;
    #1 check(longint'(yn), longint'(AW'(exact)), what);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b0;
    x   = '0;
    foreach (h[k]) h[k] = '0;
    foreach (xh[i]) xh[i] = 0;

    // 1. Step response with the reference design's example values.
    h = '{16'sd1, 16'sd2, 16'sd29, 16'sd13, 16'sd12, 16'sd11, 16'sd5, 16'sd3};
    do_clear();
    repeat (T) step_and_check(16'sd13, "step");
    check(longint'(yn), 988, "step output");

    // 2. Impulse responses: latency and coefficient order.
    for (int rep = 0; rep < 4; rep++) begin
      foreach (h[k]) h[k] = DW'($urandom);
      do_clear();
      for (int e = 0; e < T + 3; e++) begin
        @(negedge clk);
        x = (e == 0) ? 16'sd1 : 16'sd0;
        @(posedge clk);
        #1 check(longint'(yn), (e < T) ? longint'(h[T-1-e]) : 0, "impulse");
      end
      n_impulse++;
    end

    // 3. Streaming at one sample per clock, with clears in between.
    for (int seg = 0; seg < 6; seg++) begin
      foreach (h[k]) h[k] = DW'($urandom);
      do_clear();
      for (int s = 0; s < 300; s++) begin
        step_and_check(DW'($urandom), "stream");
        n_stream++;
      end
      // 4. Asynchronous clear between edges.
      @(negedge clk);
      #1 clr = 1'b1;
      x = '0;
      #1 check(longint'(yn), 0, "asynchronous clear");
      foreach (xh[i]) xh[i] = 0;
      @(negedge clk) clr = 1'b0;
      n_clear++;
      for (int s = 0; s < 20; s++) step_and_check(DW'($urandom), "after clear");
    end

    $display("mechanisms: stream=%0d impulse=%0d clear=%0d (32-bit wraps seen: %0d)",
             n_stream, n_impulse, n_clear, n_wrap);
    checks++; if (n_stream == 0)  failures++;
    checks++; if (n_impulse == 0) failures++;
    checks++; if (n_clear == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
