// Testbench for cic_decimator, with the default N = 3 and with N = 2 and
// N = 4. Random full-scale 16-bit inputs, then runs of the extreme values,
// one per clock; ce_out is high one clock in three. At the edge t that
// samples ce_out, the expected output is sum_k h_N(k) x(t-(N-1)-k), with h_N
// the N-fold convolution of [1 1 1] (for N = 3: [1 3 6 7 6 3 1]), the
// response of the textbook N-integrator / down-sampler / N-comb decimator.
// The output and y_valid must appear N-1 edges after t, valid strobes must
// be three clocks apart, and the DC gain 3^N is checked on a constant run.
module cic_decimator_tb;
  localparam int IN_W = 16, NCLK = 2400;
  localparam int NS[3] = '{3, 2, 4};
  logic clk = 0, rst_n = 0, ce_out = 0;
  logic v3, v2, v4;
  logic signed [IN_W-1:0] x = '0;
  logic signed [20:0] y3;
  logic signed [19:0] y2;
  logic signed [22:0] y4;
  int checks = 0, failures = 0;
  int xs [$];
  int h [3][$];

  cic_decimator #(.IN_W(IN_W), .OUT_W(21)) dut3 (.clk, .rst_n, .ce_out, .x, .y(y3), .y_valid(v3));
  cic_decimator #(.IN_W(IN_W), .OUT_W(20), .N(2)) dut2 (.clk, .rst_n, .ce_out, .x, .y(y2), .y_valid(v2));
  cic_decimator #(.IN_W(IN_W), .OUT_W(23), .N(4)) dut4 (.clk, .rst_n, .ce_out, .x, .y(y4), .y_valid(v4));

  always #5 clk = ~clk;

  function automatic longint yref(int d, int t);
    longint s = 0;
    for (int k = 0; k < h[d].size(); k++)
      if (t - (NS[d] - 1) - k >= 0) s += h[d][k] * xs[t-(NS[d]-1)-k];
    return s;
  endfunction

  function automatic longint dut_y(int d);
    case (d)
      0: return longint'(y3);
      1: return longint'(y2);
      default: return longint'(y4);
    endcase
  endfunction

  function automatic logic dut_v(int d);
    case (d)
      0: return v3;
      1: return v2;
      default: return v4;
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
    int v, g;
    int last_valid[3] = '{-1, -1, -1};
    int nvalid[3] = '{0, 0, 0};
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
    for (int e = 0; e < NCLK; e++) begin
      if (e >= 1500 && e < 1800)      v = -(1 << (IN_W-1));
      else if (e >= 1800 && e < 2100) v = (1 << (IN_W-1)) - 1;
      else                            v = int'($signed(IN_W'($urandom)));
      x      <= IN_W'(v);
      ce_out <= (e % 3 == 0);
      xs.push_back(v);
      @(posedge clk);
      #1;
      for (int d = 0; d < 3; d++) begin
        int lat;
        lat = NS[d] - 1;
        if (dut_v(d)) begin
          nvalid[d]++;
          checks += 2;
          if ((e - lat) % 3 != 0) begin failures++; $display("FAIL N=%0d valid at edge %0d", NS[d], e); end
          if (last_valid[d] >= 0 && e - last_valid[d] != 3) begin
            failures++; $display("FAIL N=%0d valid spacing %0d", NS[d], e - last_valid[d]);
          end
          last_valid[d] = e;
          if (dut_y(d) !== yref(d, e - lat)) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d edge %0d y=%0d exp=%0d", NS[d], e, dut_y(d), yref(d, e - lat));
          end
          if (e - lat == 1791) begin
            g = 1;
            for (int s = 0; s < NS[d]; s++) g *= 3;
            checks++;
            if (dut_y(d) !== -longint'(g) * (1 << (IN_W-1))) begin
              failures++; $display("FAIL N=%0d DC gain %0d", NS[d], dut_y(d));
            end
          end
        end
      end
    end
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (nvalid[d] < NCLK / 3 - 4) begin failures++; $display("FAIL N=%0d only %0d outputs", NS[d], nvalid[d]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
