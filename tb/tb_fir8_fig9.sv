// tb_fir8_fig9 -- partial sums of the pipelined FIR filter for a worked
// example, and the filter at other lengths.
//
// The example holds the input at x = 13 with coefficients
// h0..h7 = 1, 2, 29, 13, 12, 11, 5, 3. Inside the 8-tap chain the register
// after tap k then settles at 13 * (h0 + ... + hk): 13, 39, 416, 585, 741,
// 884, 949 and, at the output, 988. Those inner registers are not ports, so
// the testbench builds the filter at every length TAPS = 1 .. 8 from the
// first TAPS coefficients; the output of the TAPS = k+1 filter is the k-th
// running sum. Every filter is also checked for its step response edge by
// edge: after edge e (e = 1, 2, ...) its output is 13 times the sum of its
// last e coefficients. The TAPS = 3 instance is the 3-tap filter.
module tb_fir8_fig9;
  import fir_pkg::*;

  localparam int unsigned T  = FIR_TAPS;
  localparam int unsigned DW = FIR_DATA_W;
  localparam int unsigned AW = FIR_ACC_W;

  logic                 clk = 1'b0;
  logic                 clr;
  logic signed [DW-1:0] x;
  logic signed [DW-1:0] h [T];
  logic signed [AW-1:0] yn_part [T];

  int checks = 0;
  int failures = 0;

  for (genvar k = 0; k < T; k++) begin : g_len
    logic signed [DW-1:0] hp [k+1];
    for (genvar i = 0; i <= k; i++) begin : g_h
      assign hp[i] = h[i];
    end
    fir8_pipe #(.TAPS(k + 1)) u_fir (.clk(clk), .clr(clr), .x(x), .h(hp), .yn(yn_part[k]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint fig_sums [T];
    longint expected;
    h = '{16'sd1, 16'sd2, 16'sd29, 16'sd13, 16'sd12, 16'sd11, 16'sd5, 16'sd3};
    fig_sums = '{13, 39, 416, 585, 741, 884, 949, 988};
    x   = '0;
    clr = 1'b0;
    @(negedge clk) clr = 1'b1;
    @(negedge clk) begin
      clr = 1'b0;
      x   = 16'sd13;
    end
    for (int e = 1; e <= T + 2; e++) begin
      @(posedge clk);
      #1;
      for (int k = 0; k < T; k++) begin
        // filter of length k+1: after e edges its last min(e, k+1)
        // coefficients have been applied
        expected = 0;
        for (int i = 0; i <= k; i++) if (k - i < e) expected += 13 * longint'(h[i]);
        checks++;
        if (longint'(yn_part[k]) != expected) begin
          failures++;
          $display("FAIL taps=%0d edge=%0d: got %0d expected %0d", k + 1, e, yn_part[k], expected);
        end
      end
    end
    for (int k = 0; k < T; k++) begin
      checks++;
      if (longint'(yn_part[k]) != fig_sums[k]) begin
        failures++;
        $display("FAIL running sum %0d: got %0d expected %0d", k, yn_part[k], fig_sums[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
