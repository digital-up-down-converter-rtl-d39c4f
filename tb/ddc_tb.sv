// Testbench for ddc. The IF input is A sin(2 pi 65/240 n), A = 18000, the
// upper-sideband signal the DUC produces. The 80 Msps outputs z = I + jQ
// are fitted to c * exp(j 2 pi 5/240 t) (t = clock of the output's ce_out);
// checks: |c| within 1% of A/2 * (8191/8192) * Hlpf(5 MHz) * Hcic(5 MHz)
// (responses computed here), a residual below 1% of |c| (image and lower
// sideband rejected, Q = +sin), outputs exactly three clocks apart, and a
// second run with a 55 MHz input (the lower sideband) must give a phasor
// turning the other way (near zero fit).
module ddc_tb;
  localparam real PI = 3.14159265358979;
  localparam real A  = 18000.0;
  logic clk = 0, rst_n = 0, ce_out = 0, out_valid;
  logic signed [15:0] if_in = '0;
  logic signed [20:0] i_out, q_out;
  int checks = 0, failures = 0;

  ddc dut (.*);

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

  int c = 0;
  task automatic run(real fin, output real mag, output real resid, output int bad_spacing);
    real cre = 0, cim = 0, ph, zr [$], zi [$], rr [$], ri [$], e = 0, p = 0;
    int last = -1;
    bad_spacing = 0;
    for (int n = 0; n < 3000; n++) begin
      if_in  <= 16'(int'($floor(A * $sin(2.0 * PI * fin * c / 240.0) + 0.5)));
      ce_out <= (c % 3 == 0);
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (last >= 0 && c - last != 3) bad_spacing++;
        last = c;
        if (n > 60) begin
          ph = 2.0 * PI * 5.0 * c / 240.0;
          zr.push_back(real'(i_out)); zi.push_back(real'(q_out));
          rr.push_back($cos(ph));     ri.push_back($sin(ph));
        end
      end
      c++;
    end
    foreach (zr[m]) begin
      cre += (zr[m] * rr[m] + zi[m] * ri[m]) / zr.size();
      cim += (zi[m] * rr[m] - zr[m] * ri[m]) / zr.size();
    end
    foreach (zr[m]) begin
      e += (zr[m] - (cre * rr[m] - cim * ri[m])) ** 2 + (zi[m] - (cre * ri[m] + cim * rr[m])) ** 2;
      p += zr[m] ** 2 + zi[m] ** 2;
    end
    mag = $sqrt(cre * cre + cim * cim);
    resid = $sqrt(e / zr.size());
    // per-sample check of the upper-sideband run against the fitted phasor
    if (fin > 60.0)
      foreach (zr[m]) begin
        real er, ei;
        er = zr[m] - (cre * rr[m] - cim * ri[m]);
        ei = zi[m] - (cre * ri[m] + cim * rr[m]);
        checks++;
        if ($sqrt(er * er + ei * ei) > 0.01 * mag) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d off by %f", m, $sqrt(er * er + ei * ei));
        end
      end
  endtask

  initial begin
    real mag, resid, expm;
    int bad;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    expm = A / 2.0 * 8191.0 / 8192.0 * ($cos(PI * 5.0 / 240.0) ** 2)
         * $pow($sin(3.0 * PI * 5.0 / 240.0) / $sin(PI * 5.0 / 240.0), 3);
    run(65.0, mag, resid, bad);
    $display("65 MHz in: |c| = %f (expected %f), residual rms %f", mag, expm, resid);
    check(mag > 0.99 * expm && mag < 1.01 * expm, "baseband amplitude");
    check(resid < 0.01 * expm, "residual too large");
    check(bad == 0, "output spacing not 3 clocks");
    run(55.0, mag, resid, bad);
    $display("55 MHz in: |c| = %f", mag);
    check(mag < 0.01 * expm, "lower sideband input seen as upper");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
