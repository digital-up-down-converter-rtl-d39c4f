// BPSK transmit/receive digital front end: DUC and DDC side by side.
//
// Transmit: a PRBS source (250 kbps) drives a table-based BPSK modulator
// that produces I = d cos and Q = d sin of a 5 MHz carrier at 80 Msps. The
// DUC interpolates both by 3 to 240 Msps and shifts them to a single
// sideband at 65 MHz, sent out on `dac_data`. Receive: the DDC takes 240 Msps
// samples, either from `adc_data` or, with `loopback` high, from the
// transmit output, and returns 80 Msps baseband I/Q (5 MHz) on
// `ddc_i`/`ddc_q`. Demodulation of that baseband is left to the user.
//
// Clocking: one 240 MHz clock; a modulo-3 counter gives the 80 MHz sample
// strobe `ce80`, high one clock in three, which paces PRBS, modulator, DUC
// input and DDC output. Reset is synchronous and active low.
// The chain follows the design. This implementation's choices: the loopback
// select, registered DAC and ADC ports (one clock each), which make the
// loopback delay from the transmit mixers to the receive mixers four clocks
// so the two NCOs line up in phase, and the output widths.
// Ports: `bb_i`, `bb_q`, `data_bit` (with `data_stb` marking a new bit) show the modulator output for
// monitoring; `ddc_valid` is high for one clock when ddc_i/ddc_q change.
module duc_ddc_top #(
  parameter int unsigned SAMPLES_PER_BIT = duc_ddc_pkg::SAMPLES_PER_BIT
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    loopback,
  input  logic signed [duc_ddc_pkg::IF_W-1:0]     adc_data,
  output logic signed [duc_ddc_pkg::IF_W-1:0]     dac_data,
  output logic                                    data_bit,
  output logic                                    data_stb,
  output logic signed [duc_ddc_pkg::BB_W-1:0]     bb_i,
  output logic signed [duc_ddc_pkg::BB_W-1:0]     bb_q,
  output logic signed [duc_ddc_pkg::DECIM_W-1:0]  ddc_i,
  output logic signed [duc_ddc_pkg::DECIM_W-1:0]  ddc_q,
  output logic                                    ddc_valid
);
  import duc_ddc_pkg::*;

  // 80 MHz sample strobe
  logic [1:0] div;
  logic       ce80;

  always_ff @(posedge clk) begin
    if (!rst_n)                      div <= '0;
    else if (div == 2'(RATE - 1))    div <= '0;
    else                             div <= div + 1'b1;
  end
  assign ce80 = (div == '0);

  // transmit
  logic signed [IF_W-1:0] duc_out;

  prbs_gen #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_prbs (
    .clk, .rst_n, .ce(ce80), .bit_o(data_bit), .bit_stb(data_stb));

  bpsk_mod u_mod (
    .clk, .rst_n, .ce(ce80), .data_bit, .i_o(bb_i), .q_o(bb_q));

  duc u_duc (
    .clk, .rst_n, .ce_in(ce80), .i_in(bb_i), .q_in(bb_q), .if_out(duc_out));

  // converter ports, registered
  logic signed [IF_W-1:0] rx_sample;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac_data  <= '0;
      rx_sample <= '0;
    end else begin
      dac_data  <= duc_out;
      rx_sample <= loopback ? dac_data : adc_data;
    end
  end

  // receive
  ddc u_ddc (
    .clk, .rst_n, .ce_out(ce80), .if_in(rx_sample),
    .i_out(ddc_i), .q_out(ddc_q), .out_valid(ddc_valid));
endmodule
