// Testbench for cic_interpolator, with the default N = 3 and with N = 2 and
// N = 4. Random full-scale samples, then runs of the most negative and most
// positive value, enter on a one-in-three enable. The expected 240 Msps
// output is computed here as the zero-stuffed input convolved with h_N, the
// N-fold convolution of [1 1 1] (for N = 3: [1 3 6 7 6 3 1]), which is the
// impulse response of the textbook N-comb / zero-stuffer / N-integrator
// CIC interpolator (R = 3, M = 1). So the hold-interpolator structure is
// checked against the standard one, on every output clock, with the latency
// of 2N-2 clock edges from the edge that takes x(k) to the first of its
// three outputs. The DC gain 3^(N-1) is checked on the constant runs.
module cic_interpolator_tb;
  localparam int IN_W = 14, NSAMP = 600;
  localparam int NS[3]   = '{3, 2, 4};
  localparam int OUTW[3] = '{18, 16, 19};
  logic clk = 0, rst_n = 0, ce_in = 0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [17:0] y3;
  logic signed [15:0] y2;
  logic signed [18:0] y4;
  int checks = 0, failures = 0;
  int u [$];   // zero-stuffed input, one entry per edge after reset
  int h [3][$];

  cic_interpolator #(.IN_W(IN_W), .OUT_W(18)) dut3 (.clk, .rst_n, .ce_in, .x, .y(y3));
  cic_interpolator #(.IN_W(IN_W), .OUT_W(16), .N(2)) dut2 (.clk, .rst_n, .ce_in, .x, .y(y2));
  cic_interpolator #(.IN_W(IN_W), .OUT_W(19), .N(4)) dut4 (.clk, .rst_n, .ce_in, .x, .y(y4));

  always #5 clk = ~clk;

  function automatic int yref(int d, int n);
    int s = 0;
    for (int i = 0; i < h[d].size(); i++) if (n - i >= 0) s += h[d][i] * u[n-i];
    return s;
  endfunction

  function automatic longint dut_y(int d);
    case (d)
      0: return longint'(y3);
      1: return longint'(y2);
      default: return longint'(y4);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, e, g;
    // h_N = [1 1 1] convolved N times
    for (int d = 0; d < 3; d++) begin
      int t [$];
      h[d] = '{1};
      for (int s = 0; s < NS[d]; s++) begin
        t = {};
        for (int i = 0; i < h[d].size() + 2; i++) begin
          int a;
          a = 0;
          for (int j = 0; j < 3; j++) if (i - j >= 0 && i - j < h[d].size()) a += h[d][i-j];
          t.push_back(a);
        end
        h[d] = t;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    e = 0;
    for (int k = 0; k < NSAMP; k++) begin
      if (k >= 400 && k < 450)      v = -(1 << (IN_W-1));
      else if (k >= 450 && k < 500) v = (1 << (IN_W-1)) - 1;
      else                          v = int'($signed(IN_W'($urandom)));
      for (int j = 0; j < 3; j++) begin
        ce_in <= (j == 0);
        x     <= (j == 0) ? IN_W'(v) : IN_W'($urandom);
        u.push_back(j == 0 ? v : 0);
        @(posedge clk);
        #1;
        for (int d = 0; d < 3; d++) begin
          int lat;
          lat = 2 * NS[d] - 2;
          if (e >= lat) begin
            checks++;
            if (dut_y(d) !== longint'(yref(d, e - lat))) begin
              failures++;
              if (failures < 10) $display("FAIL N=%0d edge %0d y=%0d exp=%0d", NS[d], e, dut_y(d), yref(d, e - lat));
            end
          end
          if (k == 449 && j == 0) begin
            g = 1;
            for (int s = 1; s < NS[d]; s++) g *= 3;
            checks++;
            if (dut_y(d) !== -longint'(g) * (1 << (IN_W-1))) begin
              failures++; $display("FAIL N=%0d DC gain %0d", NS[d], dut_y(d));
            end
          end
        end
        e++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
