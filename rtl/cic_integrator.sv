// One CIC integrator slice: y(n) = y(n-1) + x(n).
//
// A single-pole IIR with unity feedback, built as an adder and a register.
// The sum wraps around in two's complement; in a CIC chain this is harmless
// as long as W holds the final output range (Hogenauer). The output is the
// register, so a sample entering on a `ce` cycle shows on `y` one cycle later.
// The structure follows the design's integrator; the output register
// placement and the synchronous reset to zero are this implementation's.
module cic_integrator #(
  parameter int unsigned W = duc_ddc_pkg::INTERP_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (ce) y <= y + x;
  end
endmodule
