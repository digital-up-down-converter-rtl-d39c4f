// N-stage CIC decimator by 3 (N = 3, R = 3, M = 1).
//
// N-1 integrators at 240 Msps, an integrate-and-dump that forms the sum of
// three consecutive samples once per output (it replaces the innermost
// integrator, the rate change and the innermost comb), and N-1 combs at
// 80 Msps. The transfer function is that of the textbook decimator: for
// N = 3 the FIR [1 3 6 7 6 3 1] sampled once in three, DC gain R^N = 27,
// kept in the output. The integrator / rate change / comb order, N = 3 and
// R = 3 follow the design; collapsing the innermost stage, the widths and
// the pipelining are this implementation's choices. All stages work at
// OUT_W = IN_W + ceil(log2(3^N)) bits with wrap-around arithmetic, which is
// exact since the output fits.
//
// Timing: `ce_out` is high one clock in three. If it is high in clock t, the
// output formed then is y = sum_k h(k) x(t-(N-1)-k), where x(c) is the input
// in clock c (each integrator adds one clock). The dump registers at the
// end of clock t, comb j at the end of clock t+1+j; the value is on `y` from
// clock t+N, where `y_valid` is high for that one clock (t+3 for N = 3).
module cic_decimator #(
  parameter int unsigned IN_W  = duc_ddc_pkg::IF_W,
  parameter int unsigned OUT_W = duc_ddc_pkg::DECIM_W,
  parameter int unsigned N     = duc_ddc_pkg::CIC_STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_out,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);
  logic signed [OUT_W-1:0] s [N];     // s[0] input, s[j] integrator j-1
  logic signed [OUT_W-1:0] c [N];     // c[0] dump output, c[j] comb j-1
  logic        [N-1:0]     ce_pipe;   // ce_pipe[j]: ce_out delayed by j clocks

  assign s[0]       = OUT_W'(x);
  assign ce_pipe[0] = ce_out;

  for (genvar j = 1; j < N; j++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) ce_pipe[j] <= 1'b0;
      else        ce_pipe[j] <= ce_pipe[j-1];
    end

    cic_integrator #(.W(OUT_W)) u_int (
      .clk, .rst_n, .ce(1'b1), .x(s[j-1]), .y(s[j]));

    // comb j-1 runs j clocks after the dump, once its input has settled
    cic_comb #(.W(OUT_W), .M(1)) u_comb (
      .clk, .rst_n, .ce(ce_pipe[j]), .x(c[j-1]), .y(c[j]));
  end

  integrate_dump #(.W(OUT_W)) u_dump (
    .clk, .rst_n, .ce_out, .x(s[N-1]), .y(c[0]));

  assign y = c[N-1];

  // y changes at the end of the clock in which ce_pipe[N-1] is high
  always_ff @(posedge clk) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= ce_pipe[N-1];
  end
endmodule
