// Testbench for prbs_gen: checks the bit period (in samples), that the bit
// only changes at a bit strobe, the sequence against the recurrence
// b(n) = b(n-6) xor b(n-7) of x^7 + x^6 + 1 with seven leading ones, and the
// 64 ones per 127-bit period of a maximal-length sequence.
module prbs_gen_tb;
  localparam int SPB = 5;
  logic clk = 0, rst_n = 0, ce = 0, bit_o, bit_stb;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit seq [$];
  int since_stb;

  prbs_gen #(.SAMPLES_PER_BIT(SPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample strobe one clock in three
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ce  <= (cyc % 3 == 2);
  end

  initial begin
    bit prev;
    int ones;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    since_stb = 0;
    while (seq.size() < 260) begin
      @(posedge clk);
      #1;
      if (ce) begin
        if (bit_stb) begin
          if (seq.size() > 0)
            check(since_stb == SPB, $sformatf("bit lasted %0d samples", since_stb));
          seq.push_back(bit_o);
          since_stb = 1;
        end else begin
          check(bit_o == prev, "bit changed without a strobe");
          since_stb++;
        end
        prev = bit_o;
      end
    end
    for (int n = 0; n < 7; n++) check(seq[n] == 1'b1, "seed bits");
    for (int n = 7; n < seq.size(); n++)
      check(seq[n] == (seq[n-6] ^ seq[n-7]), $sformatf("recurrence at bit %0d", n));
    ones = 0;
    for (int n = 0; n < 127; n++) ones += seq[n];
    check(ones == 64, $sformatf("%0d ones in a period", ones));
    for (int n = 0; n < 127; n++) check(seq[n] == seq[n+127], "period 127");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
