// Mixer: signed multiply of a signal sample by an NCO sample.
//
// p = saturate(round(a * b / 2^SHIFT)) to P_W bits, registered (latency one
// clock). Rounding adds half an LSB before the arithmetic shift; saturation
// clamps to the symmetric range +/-(2^(P_W-1) - 1). The multiplication itself
// is the design's mixer; the scaling, rounding and saturation are this
// implementation's choices.
module mixer #(
  parameter int unsigned A_W   = duc_ddc_pkg::INTERP_W,
  parameter int unsigned B_W   = duc_ddc_pkg::NCO_MAG_W,
  parameter int unsigned SHIFT = 13,
  parameter int unsigned P_W   = duc_ddc_pkg::INTERP_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic signed [P_W-1:0] p
);
  localparam int unsigned M_W = A_W + B_W;
  localparam logic signed [M_W-1:0] PMAX = M_W'((64'sd1 <<< (P_W - 1)) - 1);

  logic signed [M_W-1:0] prod, rnd;

  assign prod = M_W'(a) * M_W'(b);
  assign rnd  = (prod + M_W'(64'sd1 <<< (SHIFT - 1))) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n)          p <= '0;
    else if (rnd > PMAX) p <= P_W'(PMAX);
    else if (rnd < -PMAX) p <= P_W'(-PMAX);
    else                 p <= P_W'(rnd);
  end
endmodule
