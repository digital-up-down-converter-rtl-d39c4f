// Testbench for cic_comb: one instance with the default M = 1 and one with
// M = 2. Random inputs on a one-in-three enable; each output must equal
// x(k) - x(k-M) of the enabled samples (zero history after reset).
module cic_comb_tb;
  localparam int W = 15;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [W-1:0] x = '0, y1, y2;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  cic_comb #(.W(W))        dut1 (.clk, .rst_n, .ce, .x, .y(y1));
  cic_comb #(.W(W), .M(2)) dut2 (.clk, .rst_n, .ce, .x, .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e1, e2;
    hist = '{W'(0), W'(0)};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 600; k++) begin
      x  <= W'($urandom);
      ce <= 1;
      @(posedge clk);
      ce <= 0;
      hist.push_back(x);
      e1 = hist[$] - hist[$-1];
      e2 = hist[$] - hist[$-2];
      #1;
      checks += 2;
      if (y1 !== e1) begin failures++; $display("FAIL M=1 k=%0d", k); end
      if (y2 !== e2) begin failures++; $display("FAIL M=2 k=%0d", k); end
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (y1 !== e1) begin failures++; $display("FAIL hold k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
