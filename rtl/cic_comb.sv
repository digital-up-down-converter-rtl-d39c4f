// One CIC comb slice: y(n) = x(n) - x(n-M), run at the low sample rate.
//
// M is the differential delay (1 in this design). A delay line of M
// registers holds past inputs; on each `ce` cycle the output register takes
// the difference between the new input and the oldest stored one, and the
// line shifts. The difference form (1 - z^-M) follows the design's comb
// transfer function; the registered output and reset to zero are this
// implementation's choices. Latency: one `ce`-qualified clock.
module cic_comb #(
  parameter int unsigned W = duc_ddc_pkg::BB_W + 1,
  parameter int unsigned M = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] dly [M];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
      for (int i = 0; i < M; i++) dly[i] <= '0;
    end else if (ce) begin
      y      <= x - dly[M-1];
      dly[0] <= x;
      for (int i = 1; i < M; i++) dly[i] <= dly[i-1];
    end
  end
endmodule
