// Testbench for duc. Baseband I = 8191 cos, Q = 8191 sin of a 5 MHz tone at
// 80 Msps (d = +1), then the same with d = -1. Over 480 output samples
// (a whole number of periods of every tone involved) a DFT gives the
// amplitudes at 55, 60 and 65 MHz. Checks: the 65 MHz (upper sideband)
// amplitude is within 2% of 8191 * Hcic(5 MHz) * 8191 / 2^15, with Hcic
// the CIC interpolator response computed here; the lower sideband (55 MHz)
// is at least 27 dB below it and the carrier (60 MHz) at least 40 dB below;
// the d = -1 segment gives the negated 65 MHz phasor; the output changes
// every clock (240 Msps) while baseband samples arrive one clock in three;
// every output sample lies within 1% of the fitted 65 MHz tone.
module duc_tb;
  localparam real PI = 3.14159265358979;
  localparam int  N  = 480;
  logic clk = 0, rst_n = 0, ce_in = 0;
  logic signed [13:0] i_in = '0, q_in = '0;
  logic signed [15:0] if_out;
  int checks = 0, failures = 0;

  duc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // runs the tone with sign d; returns DFT bins at 55, 60 and 65 MHz
  int k = 0, t = 0;   // baseband sample count, clock count
  task automatic run(int d, output real re[3], output real im[3], output int nchange);
    real f[3] = '{55.0, 60.0, 65.0};
    real ys [$], ts [$], amp, er;
    logic signed [15:0] prev;
    int n = 0;
    re = '{0.0, 0.0, 0.0};
    im = '{0.0, 0.0, 0.0};
    nchange = 0;
    prev = if_out;
    for (int c = 0; c < 3 * 200 + N; c++) begin
      if (c % 3 == 0) begin
        ce_in <= 1;
        i_in  <= 14'(d * int'($floor(8191.0 * $cos(2.0 * PI * k / 16.0) + 0.5)));
        q_in  <= 14'(d * int'($floor(8191.0 * $sin(2.0 * PI * k / 16.0) + 0.5)));
        k++;
      end else ce_in <= 0;
      @(posedge clk);
      #1;
      t++;
      if (c >= 3 * 200) begin
        for (int b = 0; b < 3; b++) begin
          re[b] += real'(if_out) * $cos(2.0 * PI * f[b] * t / 240.0) * 2.0 / N;
          im[b] -= real'(if_out) * $sin(2.0 * PI * f[b] * t / 240.0) * 2.0 / N;
        end
        ys.push_back(real'(if_out));
        ts.push_back(real'(t));
        if (if_out != prev) nchange++;
        prev = if_out;
        n++;
      end
    end
    // every sample must match the fitted 65 MHz tone to within 1%
    amp = $sqrt(re[2] * re[2] + im[2] * im[2]);
    foreach (ys[m]) begin
      er = ys[m] - (re[2] * $cos(2.0 * PI * 65.0 * ts[m] / 240.0)
                  - im[2] * $sin(2.0 * PI * 65.0 * ts[m] / 240.0));
      checks++;
      if (er > 0.01 * amp || er < -0.01 * amp) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d off by %f", m, er);
      end
    end
  endtask

  initial begin
    real re1[3], im1[3], re2[3], im2[3], a[3], hc, expa;
    int nch;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    hc = $pow($sin(3.0 * PI * 5.0 / 240.0) / $sin(PI * 5.0 / 240.0), 3) / 3.0;
    expa = 8191.0 * hc * 8191.0 / 32768.0;
    run(1, re1, im1, nch);
    for (int b = 0; b < 3; b++) a[b] = $sqrt(re1[b] * re1[b] + im1[b] * im1[b]);
    $display("amplitudes 55/60/65 MHz: %f %f %f (expected 65 MHz: %f)", a[0], a[1], a[2], expa);
    check(a[2] > 0.98 * expa && a[2] < 1.02 * expa, "upper sideband amplitude");
    check(a[0] * 22.4 < a[2], "lower sideband not 27 dB down");
    check(a[1] * 100.0 < a[2], "carrier not 40 dB down");
    check(nch > N * 9 / 10, $sformatf("output changed on only %0d of %0d clocks", nch, N));
    run(-1, re2, im2, nch);
    check($sqrt((re1[2] + re2[2]) ** 2 + (im1[2] + im2[2]) ** 2) < 0.02 * a[2],
          "d = -1 does not negate the 65 MHz phasor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
