// Low-pass filter after a DDC mixer: y(n) = (x(n) + 2 x(n-1) + x(n-2)) / 4.
//
// The mixer output holds the wanted 5 MHz baseband and an image at the sum
// frequency (65 + 60 = 125 MHz, seen at 115 MHz at 240 Msps). This 3-tap
// binomial FIR has a double zero at 120 MHz and attenuates 115 MHz by about
// 47 dB, while passing 5 MHz with 0.04 dB loss. The filter position follows
// the design; its taps are this implementation's choice (the simplest
// multiplier-free low-pass). The sum is rounded (half added) and divided by 4
// by shifting; it cannot overflow W bits. Latency: the output register shows
// the result for x(n) one clock after x(n) is presented.
module lpf #(
  parameter int unsigned W = duc_ddc_pkg::IF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] x1, x2;
  logic signed [W+1:0] sum;

  assign sum = (W+2)'(x) + ((W+2)'(x1) <<< 1) + (W+2)'(x2) + (W+2)'(2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      y  <= '0;
    end else begin
      x1 <= x;
      x2 <= x1;
      y  <= W'(sum >>> 2);
    end
  end
endmodule
