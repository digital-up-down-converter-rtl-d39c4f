// Testbench for lpf. Random inputs (every output checked against
// (x(n) + 2x(n-1) + x(n-2) + 2) >> 2, one clock later), then a 115 MHz tone
// at 240 Msps (the DDC image), whose output amplitude must be below 1% of
// the input's, and a 5 MHz tone, which must pass with more than 99%.
module lpf_tb;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;

  lpf #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tone(real f, output int peak);
    peak = 0;
    for (int n = 0; n < 960; n++) begin
      x <= W'(int'($floor(20000.0 * $sin(2.0 * 3.14159265358979 * f * n / 240.0) + 0.5)));
      @(posedge clk);
      #1;
      if (n > 10 && (y > peak)) peak = y;
    end
  endtask

  initial begin
    int x0, x1, x2, e, pk;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    x1 = 0; x2 = 0;
    for (int n = 0; n < 3000; n++) begin
      x0 = int'($signed(W'($urandom)));
      x <= W'(x0);
      @(posedge clk);
      #1;
      e = (x0 + 2 * x1 + x2 + 2) >>> 2;
      checks++;
      if (y !== W'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d", n, y, e);
      end
      x2 = x1; x1 = x0;
    end
    tone(115.0, pk);
    checks++;
    if (pk > 200) begin failures++; $display("FAIL 115 MHz peak %0d", pk); end
    tone(5.0, pk);
    checks++;
    if (pk < 19800) begin failures++; $display("FAIL 5 MHz peak %0d", pk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
