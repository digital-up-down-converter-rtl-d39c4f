// BPSK modulator by table look-up.
//
// The carrier is 5 MHz at 80 Msps, exactly 16 samples per period, so a
// 16-entry sine table indexed by a 4-bit sample counter generates it. I is
// the cosine (table read a quarter period ahead) and Q the sine, both
// multiplied by d = +1 for data bit 1 and -1 for bit 0. The table is filled at
// elaboration with round(AMP * sin(2*pi*k/16)).
// Following the design: table-based BPSK, 5 MHz carrier, 80 Msps. This
// implementation's choices: which of I/Q carries the cosine (cosine on I,
// which puts the DUC output in the upper sideband), 14-bit samples, full-scale
// amplitude 2^13-1, and the bit mapping.
//
// Timing: on a `ce` cycle the outputs register the sample for the current
// carrier phase and `data_bit`; the phase counter then advances. The phase
// counter runs freely from reset, so bit changes are carrier-phase aligned
// only if the bit period is a multiple of 16 samples (320 is).
module bpsk_mod #(
  parameter int unsigned DATA_W  = duc_ddc_pkg::BB_W,
  parameter int unsigned ROM_LEN = duc_ddc_pkg::CARRIER_LEN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     data_bit,
  output logic signed [DATA_W-1:0] i_o,
  output logic signed [DATA_W-1:0] q_o
);
  localparam int unsigned IDX_W = $clog2(ROM_LEN);
  localparam int          AMP   = (1 << (DATA_W - 1)) - 1;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef sample_t rom_t [ROM_LEN];

  function automatic rom_t fill_rom();
    rom_t r;
    for (int k = 0; k < ROM_LEN; k++)
      r[k] = sample_t'(duc_ddc_pkg::sin_val(k, ROM_LEN, AMP));
    return r;
  endfunction

  localparam rom_t SIN_ROM = fill_rom();

  logic [IDX_W-1:0] phase;
  logic [IDX_W-1:0] cos_idx;
  sample_t          sin_s, cos_s;

  assign cos_idx = phase + IDX_W'(ROM_LEN / 4);
  assign sin_s   = SIN_ROM[phase];
  assign cos_s   = SIN_ROM[cos_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      i_o   <= '0;
      q_o   <= '0;
    end else if (ce) begin
      phase <= phase + 1'b1;
      i_o   <= data_bit ? cos_s : -cos_s;
      q_o   <= data_bit ? sin_s : -sin_s;
    end
  end
endmodule
