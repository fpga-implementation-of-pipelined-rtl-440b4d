// tb_fir8_lowpass -- the pipelined 8-tap filter as a Kaiser-window low-pass
// filter: sampling rate 5000 Hz, cut-off 1000 Hz, 16-bit input.
//
// The coefficients are designed here by the window method:
//   hd[n] = 2 fc/fs * sinc(2 fc/fs * (n - 3.5)),  n = 0 .. 7
//   w[n]  = I0(beta * sqrt(1 - (2n/7 - 1)^2)) / I0(beta),  beta = 2
//   h[n]  = round(32768 * hd[n] w[n] / sum(hd w))   (Q15, unity gain at DC)
// with I0 the modified Bessel function of order zero, summed as a power
// series. The set is symmetric, so the order in which the filter applies the
// coefficients does not matter.
// Sine waves of amplitude 16000 at 250, 500, 1000 and 2000 Hz are filtered.
// Every output sample is compared with the exact convolution (modulo 2^32),
// and the measured gain, peak output / (32768 * 16000) once the pipeline has
// filled, must show the low-pass shape: about 1 in the pass band, about 1/2
// at the cut-off and below 0.05 at 2000 Hz.
module tb_fir8_lowpass;
  import fir_pkg::*;

  localparam int unsigned T  = FIR_TAPS;
  localparam int unsigned DW = FIR_DATA_W;
  localparam int unsigned AW = FIR_ACC_W;
  localparam real FS   = 5000.0;
  localparam real FC   = 1000.0;
  localparam real BETA = 2.0;
  localparam real PI   = 3.14159265358979323846;
  localparam real AMP  = 16000.0;

  logic                 clk = 1'b0;
  logic                 clr;
  logic signed [DW-1:0] x;
  logic signed [DW-1:0] h [T];
  logic signed [AW-1:0] yn;

  int checks = 0;
  int failures = 0;
  longint xh [T];

  fir8_pipe dut (.clk(clk), .clr(clr), .x(x), .h(h), .yn(yn));

  always #5 clk = ~clk;

  function automatic real bessel_i0(input real v);
    real term, sum;
    term = 1.0;
    sum  = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (v / (2.0 * k)) * (v / (2.0 * k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic real sinc(input real v);
    if (v == 0.0) return 1.0;
    return $sin(PI * v) / (PI * v);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic design_coefficients();
    real hw [T];
    real total, r;
    int  qsum;
    total = 0.0;
    for (int n = 0; n < T; n++) begin
      r = 2.0 * n / (T - 1) - 1.0;
      hw[n] = 2.0 * FC / FS * sinc(2.0 * FC / FS * (n - (T - 1) / 2.0))
              * bessel_i0(BETA * $sqrt(1.0 - r * r)) / bessel_i0(BETA);
      total += hw[n];
    end
    qsum = 0;
    for (int n = 0; n < T; n++) begin
      h[n] = DW'($rtoi(32768.0 * hw[n] / total + ((hw[n] >= 0.0) ? 0.5 : -0.5)));
      qsum += int'(h[n]);
    end
    $display("coefficients (Q15): %0d %0d %0d %0d %0d %0d %0d %0d",
             h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]);
    check(qsum > 32700 && qsum < 32840, "coefficients do not give unity DC gain");
    for (int n = 0; n < T / 2; n++) check(h[n] == h[T-1-n], "coefficients not symmetric");
  endtask

  // Filter a sine at freq Hz, check each output, return the measured gain.
  task automatic run_tone(input real freq, output real gain);
    longint exact, peak;
    clr = 1'b1;
    x = '0;
    foreach (xh[i]) xh[i] = 0;
    @(negedge clk) clr = 1'b0;
    peak = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x = DW'($rtoi(AMP * $sin(2.0 * PI * freq * n / FS)));
      @(posedge clk);
      for (int i = T - 1; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = longint'(x);
      exact = 0;
      for (int j = 0; j < T; j++) exact += longint'(h[T-1-j]) * xh[j];
      #1;
      checks++;
      if (longint'(yn) != longint'(AW'(exact))) begin
        failures++;
        $display("FAIL %0.0f Hz sample %0d: got %0d expected %0d", freq, n, yn, exact);
      end
      if (n >= 2 * T && (yn > peak || -yn > peak)) peak = (yn < 0) ? -longint'(yn) : longint'(yn);
    end
    gain = real'(peak) / (32768.0 * AMP);
    $display("%6.0f Hz: gain %0.3f", freq, gain);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g;
    clr = 1'b0;
    x = '0;
    design_coefficients();
    run_tone(250.0, g);  check(g > 0.95 && g < 1.05, "250 Hz not in the pass band");
    run_tone(500.0, g);  check(g > 0.85 && g < 1.05, "500 Hz not in the pass band");
    run_tone(1000.0, g); check(g > 0.4 && g < 0.6, "1000 Hz not near the cut-off gain of 1/2");
    run_tone(2000.0, g); check(g < 0.05, "2000 Hz not attenuated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
