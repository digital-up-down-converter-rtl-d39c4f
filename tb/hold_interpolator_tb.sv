// Testbench for hold_interpolator: a new random sample every third clock;
// the output must show each sample on the three clocks that follow its
// strobe, and must not change in between.
module hold_interpolator_tb;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, ce_in = 0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;

  hold_interpolator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 500; k++) begin
      s = W'($urandom);
      x <= s;
      ce_in <= 1;
      @(posedge clk);
      ce_in <= 0;
      x <= W'($urandom);   // must be ignored without a strobe
      for (int j = 0; j < 3; j++) begin
        #1;
        checks++;
        if (y !== s) begin
          failures++;
          $display("FAIL k=%0d phase %0d y=%0d exp=%0d", k, j, y, s);
        end
        if (j < 2) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
