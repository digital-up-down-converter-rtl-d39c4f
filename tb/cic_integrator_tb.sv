// Testbench for cic_integrator: random inputs and a random clock enable; the
// output must equal the wrap-around sum of the inputs taken on enabled
// clocks, one clock later.
module cic_integrator_tb;
  localparam int W = 18;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [W-1:0] x = '0, y;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  cic_integrator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      ce <= 1'($urandom_range(0, 3) != 0);
      x  <= W'($urandom);
      @(posedge clk);
      if (ce) model = model + W'(x);
      #1;
      checks++;
      if (y !== W'(model)) begin
        failures++;
        $display("FAIL n=%0d y=%0d exp=%0d", n, y, $signed(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
