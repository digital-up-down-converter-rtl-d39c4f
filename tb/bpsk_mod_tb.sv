// Testbench for bpsk_mod: random data bits; every output sample is compared
// with d*round(8191*cos(2*pi*k/16)) (I) and d*round(8191*sin(2*pi*k/16)) (Q),
// k being the sample count since reset, computed here with real arithmetic.
module bpsk_mod_tb;
  logic clk = 0, rst_n = 0, ce = 0, data_bit = 0;
  logic signed [13:0] i_o, q_o;
  int checks = 0, failures = 0;

  bpsk_mod dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_val(int k, bit cosine, bit d);
    real a, v;
    a = 2.0 * 3.14159265358979 * k / 16.0;
    v = cosine ? $cos(a) : $sin(a);
    return (d ? 1 : -1) * int'($floor(8191.0 * v + 0.5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk);
      ce <= 1;
      data_bit <= 1'($urandom);
      @(posedge clk);
      ce <= 0;
      #1;
      checks++;
      if (i_o !== ref_val(k, 1, data_bit) || q_o !== ref_val(k, 0, data_bit)) begin
        failures++;
        $display("FAIL k=%0d d=%0d i=%0d q=%0d exp %0d %0d", k, data_bit, i_o, q_o,
                 ref_val(k, 1, data_bit), ref_val(k, 0, data_bit));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
