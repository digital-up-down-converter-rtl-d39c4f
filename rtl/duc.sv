// Complex digital up-converter: 80 Msps baseband I/Q to a real 240 Msps IF.
//
// Two identical paths interpolate I and Q by 3 with the optimised CIC
// interpolator. A local NCO (60 MHz by default) supplies sine and cosine;
// I is multiplied by the sine, Q by the cosine, and the two products are
// added. With I = d cos(wb t) and Q = d sin(wb t) the sum is
//   d [cos(wb t) sin(wc t) + sin(wb t) cos(wc t)] = d sin((wc + wb) t),
// a single sideband at 60 + 5 = 65 MHz with the carrier and the lower
// sideband (55 MHz) cancelled. The chain, the rates and the mixer wiring
// follow the design. This implementation's choices: the scaling (each
// product divided by 2^15, the sum saturated to OUT_W = 16 bits, a peak of
// about 18400 for full-scale baseband), and an NCO inside the block.
//
// Timing: `ce_in` is high one clock in three, marking the clocks in which
// i_in/q_in are taken. The NCO value of clock t meets the interpolator
// output of clock t in the mixers (registered, t+1); the sum is registered
// and is on `if_out` in clock t+2.
module duc #(
  parameter int unsigned IN_W      = duc_ddc_pkg::BB_W,
  parameter int unsigned OUT_W     = duc_ddc_pkg::IF_W,
  parameter int unsigned PHASE_INC = duc_ddc_pkg::NCO_PHASE_INC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_in,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic signed [OUT_W-1:0] if_out
);
  import duc_ddc_pkg::*;

  localparam int unsigned UP_W = IN_W + 4;
  localparam int unsigned P_W  = OUT_W;

  logic signed [UP_W-1:0]      i_up, q_up;
  logic signed [NCO_MAG_W-1:0] nco_sin, nco_cos;
  logic signed [P_W-1:0]       p_i, p_q;
  logic signed [P_W:0]         sum;

  cic_interpolator #(.IN_W(IN_W), .OUT_W(UP_W)) u_cic_i (
    .clk, .rst_n, .ce_in, .x(i_in), .y(i_up));
  cic_interpolator #(.IN_W(IN_W), .OUT_W(UP_W)) u_cic_q (
    .clk, .rst_n, .ce_in, .x(q_in), .y(q_up));

  nco u_nco (
    .clk, .rst_n, .phase_inc(NCO_ACC_W'(PHASE_INC)),
    .sin_o(nco_sin), .cos_o(nco_cos));

  mixer #(.A_W(UP_W), .B_W(NCO_MAG_W), .SHIFT(15), .P_W(P_W)) u_mix_i (
    .clk, .rst_n, .a(i_up), .b(nco_sin), .p(p_i));
  mixer #(.A_W(UP_W), .B_W(NCO_MAG_W), .SHIFT(15), .P_W(P_W)) u_mix_q (
    .clk, .rst_n, .a(q_up), .b(nco_cos), .p(p_q));

  // single-sideband adder with saturation
  localparam logic signed [P_W:0] SMAX = (P_W+1)'((1 << (OUT_W - 1)) - 1);
  assign sum = (P_W+1)'(p_i) + (P_W+1)'(p_q);

  always_ff @(posedge clk) begin
    if (!rst_n)          if_out <= '0;
    else if (sum > SMAX)  if_out <= OUT_W'(SMAX);
    else if (sum < -SMAX) if_out <= OUT_W'(-SMAX);
    else                 if_out <= OUT_W'(sum);
  end
endmodule
