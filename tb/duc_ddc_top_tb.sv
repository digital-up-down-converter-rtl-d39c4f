// End-to-end testbench for duc_ddc_top at its default parameters (320
// samples per bit, 60 MHz NCO), so it also serves as the full-size run.
//
// Phase 1, loopback: the PRBS/BPSK baseband goes through DUC and DDC. The
// 80 Msps receive phasor z = ddc_i + j ddc_q is fitted to c * r(m - D),
// r = bb_i + j bb_q, over integer delays D; for the best D the gain |c|
// must be within 2% of the product of the DUC and DDC gains at 5 MHz
// (computed here), its angle within 20 degrees (the two NCOs line up, only
// a fraction of a sample of delay is left), and the residual below 5% of
// the signal (bit transitions included).
// Phase 2, ADC input: a 65 MHz tone is driven on adc_data; the DDC output
// must be a 5 MHz phasor of the expected amplitude.
// Rates: a new bit every 960 clocks (250 kbps at 240 MHz), DDC outputs
// every 3 clocks (80 Msps). Mechanisms counted, each must occur: PRBS bit
// changes (BPSK phase flips), DDC outputs, loopback mode, ADC mode.
module duc_ddc_top_tb;
  localparam real PI = 3.14159265358979;
  localparam int  NBITS = 24;
  logic clk = 0, rst_n = 0, loopback = 1;
  logic signed [15:0] adc_data = '0, dac_data;
  logic data_bit, data_stb, ddc_valid;
  logic signed [13:0] bb_i, bb_q;
  logic signed [20:0] ddc_i, ddc_q;
  int checks = 0, failures = 0;

  duc_ddc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // baseband (sampled on the clock after the modulator register changes)
  real ri [$], rq [$], zi [$], zq [$];
  int  cyc = 0, last_stb = -1, last_valid = -1;
  int  n_flip = 0, n_valid = 0, n_loop = 0, n_adc = 0, bad_bit = 0, bad_valid = 0;
  bit  prev_bit = 1, collect_bb = 0, collect_rx = 0;
  logic [1:0] div_model = 0;

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      if (loopback) n_loop++; else n_adc++;
      if (data_stb) begin
        if (last_stb >= 0 && cyc - last_stb != 960) bad_bit++;
        last_stb = cyc;
        if (data_bit != prev_bit) n_flip++;
        prev_bit = data_bit;
      end
      if (ddc_valid) begin
        n_valid++;
        if (last_valid >= 0 && cyc - last_valid != 3) bad_valid++;
        last_valid = cyc;
        if (collect_rx) begin zi.push_back(real'(ddc_i)); zq.push_back(real'(ddc_q)); end
      end
      // one baseband sample per 80 MHz period, taken in step with ddc_valid
      if (ddc_valid && collect_bb) begin ri.push_back(real'(bb_i)); rq.push_back(real'(bb_q)); end
    end
  end

  // complex least-squares gain of z against r delayed by d samples
  task automatic fit(int d, int skip, output real cre, output real cim, output real rel);
    real num_r = 0, num_i = 0, den = 0, e = 0, p = 0, er, ei;
    for (int m = skip; m < zi.size() && m - d < ri.size(); m++) begin
      num_r += zi[m] * ri[m-d] + zq[m] * rq[m-d];
      num_i += zq[m] * ri[m-d] - zi[m] * rq[m-d];
      den   += ri[m-d] ** 2 + rq[m-d] ** 2;
    end
    cre = num_r / den;
    cim = num_i / den;
    for (int m = skip; m < zi.size() && m - d < ri.size(); m++) begin
      er = zi[m] - (cre * ri[m-d] - cim * rq[m-d]);
      ei = zq[m] - (cre * rq[m-d] + cim * ri[m-d]);
      e += er ** 2 + ei ** 2;
      p += zi[m] ** 2 + zq[m] ** 2;
    end
    rel = $sqrt(e / p);
  endtask

  initial begin
    real hcic, g_duc, g_ddc, expg, best_mag, best_re, best_im, best_rel, cre, cim, rel, ang;
    int best_d;
    hcic  = $pow($sin(3.0 * PI * 5.0 / 240.0) / $sin(PI * 5.0 / 240.0), 3);
    g_duc = hcic / 3.0 * 8191.0 / 32768.0;
    g_ddc = 0.5 * 8191.0 / 8192.0 * ($cos(PI * 5.0 / 240.0) ** 2) * hcic;
    expg  = g_duc * g_ddc;

    repeat (5) @(posedge clk);
    rst_n <= 1;
    collect_bb = 1;
    collect_rx = 1;
    repeat (NBITS * 960) @(posedge clk);
    collect_bb = 0;
    collect_rx = 0;

    best_mag = -1;
    for (int d = 0; d < 12; d++) begin
      fit(d, 40, cre, cim, rel);
      if ($sqrt(cre * cre + cim * cim) > best_mag) begin
        best_mag = $sqrt(cre * cre + cim * cim);
        best_d = d; best_re = cre; best_im = cim; best_rel = rel;
      end
    end
    ang = $atan2(best_im, best_re) * 180.0 / PI;
    $display("loopback: delay %0d samples, gain %f (expected %f), angle %f deg, residual %f",
             best_d, best_mag, expg, ang, best_rel);
    check(best_mag > 0.98 * expg && best_mag < 1.02 * expg, "loopback gain");
    check(ang < 20.0 && ang > -20.0, "loopback carrier phase");
    check(best_rel < 0.05, "loopback residual");

    // ADC input: 65 MHz tone
    loopback <= 0;
    zi.delete(); zq.delete();
    for (int n = 0; n < 3000; n++) begin
      adc_data <= 16'(int'($floor(16000.0 * $sin(2.0 * PI * 65.0 * n / 240.0) + 0.5)));
      if (n == 300) collect_rx = 1;
      @(posedge clk);
    end
    collect_rx = 0;
    begin
      real pk = 0;
      foreach (zi[m]) if ($sqrt(zi[m] ** 2 + zq[m] ** 2) > pk) pk = $sqrt(zi[m] ** 2 + zq[m] ** 2);
      $display("adc mode: peak |z| %f (expected %f)", pk, 16000.0 * g_ddc);
      check(pk > 0.98 * 16000.0 * g_ddc && pk < 1.02 * 16000.0 * g_ddc, "adc-mode amplitude");
    end

    $display("bit flips %0d, ddc outputs %0d, loopback clocks %0d, adc clocks %0d",
             n_flip, n_valid, n_loop, n_adc);
    check(n_flip > 0, "no PRBS bit change");
    check(n_valid > 0, "no DDC output");
    check(n_loop > 0, "loopback mode never used");
    check(n_adc > 0, "ADC mode never used");
    check(bad_bit == 0, "bit period not 960 clocks");
    check(bad_valid == 0, "DDC output spacing not 3 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
