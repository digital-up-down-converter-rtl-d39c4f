// Shared constants and helpers of the BPSK digital up/down converter.
//
// The whole datapath runs from one 240 MHz clock. The 80 Msps baseband side
// advances on a clock enable that is high one cycle in RATE (3). Rates, widths
// and the NCO settings below are the design's defaults: the 80/240 Msps rates,
// the interpolation/decimation factor of 3, the 5 MHz BPSK carrier, the
// 250 kbps bit rate and the 20/14/14-bit NCO with a 60 MHz output are the
// design targets; the baseband sample width of 14 bits and the IF width of
// 16 bits are this implementation's choices.
package duc_ddc_pkg;

  // number of CIC stages (integrator/comb pairs) in both rate changers
  localparam int unsigned CIC_STAGES = 3;
  // rate change between the baseband (80 Msps) and IF (240 Msps) sides
  localparam int unsigned RATE = 3;
  // baseband samples per 5 MHz carrier period (80 / 5)
  localparam int unsigned CARRIER_LEN = 16;
  // baseband samples per data bit (80 Msps / 250 kbps)
  localparam int unsigned SAMPLES_PER_BIT = 320;

  // NCO settings: 20-bit phase accumulator, 14-bit angle, 14-bit magnitude,
  // phase increment 2^18 -> 240 MHz * 2^18 / 2^20 = 60 MHz
  localparam int unsigned NCO_ACC_W     = 20;
  localparam int unsigned NCO_ANG_W     = 14;
  localparam int unsigned NCO_MAG_W     = 14;
  localparam int unsigned NCO_PHASE_INC = 262144;

  // sample widths of the signal chain
  localparam int unsigned BB_W     = 14;  // BPSK I/Q
  localparam int unsigned INTERP_W = 18;  // CIC interpolator output (gain 9)
  localparam int unsigned IF_W     = 16;  // DUC output / DDC input
  localparam int unsigned DECIM_W  = 21;  // CIC decimator output (gain 27)

  // Signed integer round(amp * sin(2*pi*k/n)), evaluated at elaboration to
  // fill the sine tables.
  function automatic int sin_val(int k, int n, int amp);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return int'($floor(real'(amp) * $sin(ang) + 0.5));
  endfunction

  function automatic int cos_val(int k, int n, int amp);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return int'($floor(real'(amp) * $cos(ang) + 0.5));
  endfunction

endpackage
