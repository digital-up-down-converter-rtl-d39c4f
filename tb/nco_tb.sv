// Testbench for nco. Three instances:
//  - defaults (60 MHz word 2^18, dither on): the outputs must repeat
//    sin = 0, 8191, 0, -8191 and cos = 8191, 0, -8191, 0 exactly;
//  - dither off, random frequency words: each output must be within 2 LSB
//    of 8191*sin/cos(2*pi*angle/2^14) computed here from the accumulator,
//    three clocks after the accumulator value;
//  - dither on, random words: within 6 LSB (the dither moves the angle by up
//    to one angle step), and the dithered outputs must differ from the
//    undithered ones at least sometimes.
module nco_tb;
  logic clk = 0, rst_n = 0;
  logic [19:0] inc = '0;
  logic signed [13:0] s0, c0, s1, c1, s2, c2;
  int checks = 0, failures = 0;
  longint acc_hist [$];
  int ndiff = 0;

  nco u_def (.clk, .rst_n, .phase_inc(20'd262144), .sin_o(s0), .cos_o(c0));
  nco #(.DITHER(1'b0)) u_nd (.clk, .rst_n, .phase_inc(inc), .sin_o(s1), .cos_o(c1));
  nco u_d (.clk, .rst_n, .phase_inc(inc), .sin_o(s2), .cos_o(c2));

  always #5 clk = ~clk;

  function automatic bit near(int got, real expv, int tol);
    real d = real'(got) - expv;
    return (d <= tol) && (d >= -tol);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int PS[4] = '{0, 8191, 0, -8191};
    localparam int PC[4] = '{8191, 0, -8191, 0};
    longint acc;
    real ang, es, ec;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    acc = 0;
    for (int e = 0; e < 6000; e++) begin
      if (e % 500 == 0) inc <= 20'($urandom);
      acc_hist.push_back(acc);          // accumulator value during this clock
      @(posedge clk);
      acc = (acc + inc) % (1 << 20);
      #1;
      if (e >= 3) begin
        checks += 2;
        if (s0 !== PS[(e - 2) % 4] || c0 !== PC[(e - 2) % 4]) begin
          failures++;
          if (failures < 10) $display("FAIL 60MHz e=%0d s=%0d c=%0d", e, s0, c0);
        end
        // outputs after this edge belong to the accumulator of clock e-2
        ang = 2.0 * 3.14159265358979 * real'(acc_hist[e-2] >> 6) / 16384.0;
        es = 8191.0 * $sin(ang);
        ec = 8191.0 * $cos(ang);
        checks += 2;
        if (!near(s1, es, 2) || !near(c1, ec, 2)) begin
          failures++;
          if (failures < 10) $display("FAIL nodither e=%0d s=%0d (%f) c=%0d (%f)", e, s1, es, c1, ec);
        end
        if (!near(s2, es, 6) || !near(c2, ec, 6)) begin
          failures++;
          if (failures < 10) $display("FAIL dither e=%0d s=%0d (%f) c=%0d (%f)", e, s2, es, c2, ec);
        end
        if (s2 != s1) ndiff++;
      end
    end
    checks++;
    if (ndiff == 0) begin failures++; $display("FAIL dither has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
