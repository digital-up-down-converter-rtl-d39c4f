// Hold interpolator: the innermost stage of the optimised CIC interpolator.
//
// A one-stage CIC interpolator (comb, zero-stuffing by R, integrator) gives
// each low-rate sample R times at the high rate. This block produces the same
// sequence with one register and no adder: it loads the low-rate sample on
// each `ce_in` cycle and holds it until the next. R is set by the spacing of
// `ce_in` (one cycle in 3 in this design). This is the design's own
// optimisation; the single-register form is this implementation's.
// Timing: y changes one clock after a `ce_in` cycle.
module hold_interpolator #(
  parameter int unsigned W = duc_ddc_pkg::BB_W + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce_in,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  always_ff @(posedge clk) begin
    if (!rst_n)     y <= '0;
    else if (ce_in) y <= x;
  end
endmodule
