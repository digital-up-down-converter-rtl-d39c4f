// Digital down-converter: real 240 Msps IF to 80 Msps baseband I/Q.
//
// The IF sample is multiplied by the sine (I path) and cosine (Q path) of a
// local NCO at 60 MHz. For an input s = A sin((wc + wb) t) the products are
//   s sin(wc t) = A/2 [cos(wb t) - cos((2wc + wb) t)]
//   s cos(wc t) = A/2 [sin(wb t) + sin((2wc + wb) t)]
// so I and Q return to the 5 MHz cosine and sine. A low-pass filter removes
// the sum-frequency image and the CIC decimator brings the rate down by 3.
// The order mixer -> LPF -> CIC (integrators, rate change, combs) follows
// the design. This implementation's choices: the LPF taps, the mixer scaling
// (product divided by 2^13, 16 bits) and keeping the CIC gain of 27 in the
// 21-bit outputs (baseband amplitude about 27/2 times the IF amplitude).
//
// Timing: `ce_out` is high one clock in three and sets the decimation
// phase; `out_valid` is high for one clock whenever i_out/q_out change.
// Latency: mixer 1 clock, LPF 1 clock, CIC as described in cic_decimator.
// The DDC NCO runs in step with the DUC NCO when both leave reset together,
// so in a loopback the path delay from the DUC NCO to the DDC mixers decides
// the carrier phase seen by the receiver (a multiple of 4 clocks gives zero).
module ddc #(
  parameter int unsigned IN_W      = duc_ddc_pkg::IF_W,
  parameter int unsigned OUT_W     = duc_ddc_pkg::DECIM_W,
  parameter int unsigned PHASE_INC = duc_ddc_pkg::NCO_PHASE_INC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_out,
  input  logic signed [IN_W-1:0]  if_in,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out,
  output logic                    out_valid
);
  import duc_ddc_pkg::*;

  logic signed [NCO_MAG_W-1:0] nco_sin, nco_cos;
  logic signed [IN_W-1:0]      m_i, m_q, f_i, f_q;
  logic                        q_valid;

  nco u_nco (
    .clk, .rst_n, .phase_inc(NCO_ACC_W'(PHASE_INC)),
    .sin_o(nco_sin), .cos_o(nco_cos));

  mixer #(.A_W(IN_W), .B_W(NCO_MAG_W), .SHIFT(13), .P_W(IN_W)) u_mix_i (
    .clk, .rst_n, .a(if_in), .b(nco_sin), .p(m_i));
  mixer #(.A_W(IN_W), .B_W(NCO_MAG_W), .SHIFT(13), .P_W(IN_W)) u_mix_q (
    .clk, .rst_n, .a(if_in), .b(nco_cos), .p(m_q));

  lpf #(.W(IN_W)) u_lpf_i (.clk, .rst_n, .x(m_i), .y(f_i));
  lpf #(.W(IN_W)) u_lpf_q (.clk, .rst_n, .x(m_q), .y(f_q));

  cic_decimator #(.IN_W(IN_W), .OUT_W(OUT_W)) u_cic_i (
    .clk, .rst_n, .ce_out, .x(f_i), .y(i_out), .y_valid(out_valid));
  cic_decimator #(.IN_W(IN_W), .OUT_W(OUT_W)) u_cic_q (
    .clk, .rst_n, .ce_out, .x(f_q), .y(q_out), .y_valid(q_valid));

  // both paths share ce_out, so their valid strobes are identical
  always_ff @(posedge clk) begin
    if (rst_n) assert (q_valid == out_valid) else $error("I/Q valid mismatch");
  end
endmodule
