// Testbench for mixer. Two instances: the default (18 x 14 bits, shift 13,
// 19-bit output, never saturates) and the DUC setting (shift 15, 16-bit
// output, saturates only for the two most negative inputs). Random and
// extreme operands; each product is checked one clock later against
// round-half-up(a*b / 2^SHIFT) clamped to +/-(2^(P_W-1)-1).
module mixer_tb;
  logic clk = 0, rst_n = 0;
  logic signed [17:0] a = '0;
  logic signed [13:0] b = '0;
  logic signed [18:0] p0;
  logic signed [15:0] p1;
  int checks = 0, failures = 0, nsat = 0;

  mixer u0 (.clk, .rst_n, .a, .b, .p(p0));
  mixer #(.SHIFT(15), .P_W(16)) u1 (.clk, .rst_n, .a, .b, .p(p1));

  always #5 clk = ~clk;

  function automatic longint expect_p(longint av, longint bv, int sh, int pw);
    longint r, m;
    r = (av * bv + (64'sd1 <<< (sh - 1))) >>> sh;
    m = (64'sd1 <<< (pw - 1)) - 1;
    if (r > m) return m;
    if (r < -m) return -m;
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, bv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      case (n % 10)
        0: begin av = -131072; bv = -8192; end
        1: begin av = 131071;  bv = -8192; end
        2: begin av = -131072; bv = 8191; end
        default: begin av = $signed(18'($urandom)); bv = $signed(14'($urandom)); end
      endcase
      a <= 18'(av);
      b <= 14'(bv);
      @(posedge clk);
      #1;
      checks += 2;
      if (p0 !== expect_p(av, bv, 13, 19)) begin
        failures++;
        if (failures < 10) $display("FAIL p0 %0d*%0d -> %0d", av, bv, p0);
      end
      if (p1 !== expect_p(av, bv, 15, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL p1 %0d*%0d -> %0d", av, bv, p1);
      end
      if (p1 == 16'sd32767) nsat++;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
