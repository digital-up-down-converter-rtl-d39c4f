// Integrate-and-dump: sum of R consecutive high-rate samples, once per R.
//
// This is the innermost integrator / down-sampler / comb triple of a CIC
// decimator collapsed into one accumulator, the counterpart of the hold
// interpolator on the interpolation side. On a `ce_out` clock the register
// `y` takes the accumulated sum plus the current input and the accumulator
// restarts from zero; on other clocks the accumulator adds the input. With
// `ce_out` high one clock in three, y holds x(n) + x(n-1) + x(n-2) taken at
// the `ce_out` clock n, visible from the next clock. Wrap-around arithmetic.
module integrate_dump #(
  parameter int unsigned W = duc_ddc_pkg::DECIM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce_out,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      y   <= '0;
    end else if (ce_out) begin
      y   <= acc + x;
      acc <= '0;
    end else begin
      acc <= acc + x;
    end
  end
endmodule
