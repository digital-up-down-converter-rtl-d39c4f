// PRBS data source for the BPSK modulator.
//
// A 7-bit Fibonacci LFSR (polynomial x^7 + x^6 + 1, period 127, seeded with
// all ones at reset) steps once per data bit. A bit lasts SAMPLES_PER_BIT
// baseband samples: 320 samples at 80 Msps give the 250 kbps data rate. The
// PRBS block and the data rate follow the design; the polynomial, seed and
// bit-to-level mapping are this implementation's choices.
//
// Interface: `ce` marks a baseband sample cycle. `bit_o` is the current bit
// (registered, MSB of the LFSR). `bit_stb` is high for the one sample cycle
// in which a new bit appears on `bit_o` (including the first bit after reset).
module prbs_gen #(
  parameter int unsigned SAMPLES_PER_BIT = duc_ddc_pkg::SAMPLES_PER_BIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  output logic bit_o,
  output logic bit_stb
);
  localparam int unsigned CNT_W = $clog2(SAMPLES_PER_BIT);

  logic [6:0]       lfsr;
  logic [CNT_W-1:0] cnt;
  logic             step;

  // advance the LFSR on the last sample of a bit
  assign step = ce && (cnt == CNT_W'(SAMPLES_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr <= '1;
      cnt  <= '0;
    end else if (ce) begin
      cnt <= step ? '0 : cnt + 1'b1;
      if (step) lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
  end

  assign bit_o   = lfsr[6];
  assign bit_stb = ce && (cnt == '0);
endmodule
