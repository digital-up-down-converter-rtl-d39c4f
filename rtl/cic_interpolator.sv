// N-stage CIC interpolator by 3 with a hold interpolator core (N = 3).
//
// A standard N-stage, R = 3, M = 1 CIC interpolator is N combs at the low
// rate, a zero-stuffer and N integrators at the high rate. Its innermost
// comb / zero-stuffer / integrator triple only repeats each low-rate sample R
// times, so it is replaced by a hold register: N-1 combs (80 Msps), the hold
// interpolator, N-1 integrators (240 Msps). For N = 3 the impulse response
// at the high rate is [1 3 6 7 6 3 1], DC gain (RM)^N / R = 9; the gain is
// not removed. The structure, N = 3 and R = 3 follow the design; widths are
// this implementation's: the combs work at IN_W + N - 1 bits (enough for
// their growth of one bit each), the integrators at OUT_W with two's
// complement wrap-around, which is exact because the final output always
// fits OUT_W = IN_W + ceil(log2(3^(N-1))).
//
// Timing: one clock domain. `ce_in` is high one clock in three and marks the
// clock in which `x` is taken. Comb j registers on `ce_in` delayed by j
// clocks, the hold register on `ce_in` delayed by N-1, the integrators on
// every clock. If x(k) is taken in clock t, the high-rate outputs y(3k),
// y(3k+1), y(3k+2) are on `y` in clocks t+2N-1, t+2N, t+2N+1 (t+5..t+7 for
// N = 3).
module cic_interpolator #(
  parameter int unsigned IN_W  = duc_ddc_pkg::BB_W,
  parameter int unsigned OUT_W = duc_ddc_pkg::INTERP_W,
  parameter int unsigned N     = duc_ddc_pkg::CIC_STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_in,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int unsigned CW = IN_W + N - 1;   // comb and hold width

  logic signed [CW-1:0]    c [N];     // c[0] input, c[j] output of comb j-1
  logic signed [OUT_W-1:0] s [N];     // s[0] hold output, s[j] integrator j-1
  logic signed [CW-1:0]    held;
  logic        [N-1:0]     ce_pipe;   // ce_pipe[j]: ce_in delayed by j clocks

  assign c[0]       = CW'(x);
  assign ce_pipe[0] = ce_in;

  for (genvar j = 1; j < N; j++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) ce_pipe[j] <= 1'b0;
      else        ce_pipe[j] <= ce_pipe[j-1];
    end

    cic_comb #(.W(CW), .M(1)) u_comb (
      .clk, .rst_n, .ce(ce_pipe[j-1]), .x(c[j-1]), .y(c[j]));

    cic_integrator #(.W(OUT_W)) u_int (
      .clk, .rst_n, .ce(1'b1), .x(s[j-1]), .y(s[j]));
  end

  hold_interpolator #(.W(CW)) u_hold (
    .clk, .rst_n, .ce_in(ce_pipe[N-1]), .x(c[N-1]), .y(held));

  assign s[0] = OUT_W'(held);
  assign y    = s[N-1];
endmodule
