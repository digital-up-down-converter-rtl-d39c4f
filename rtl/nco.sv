// Multiplier-based numerically controlled oscillator (sine and cosine).
//
// A 20-bit phase accumulator adds `phase_inc` every clock; with the default
// increment 262144 = 2^18 and a 240 MHz clock the output is 60 MHz. Optional
// phase dither (the 6 low bits of a 15-bit LFSR, added below the truncation
// point) breaks up the periodic phase-truncation error. The 14-bit angle is
// split into a coarse part A (7 MSBs) and a fine part B (7 LSBs), and
//   sin(A+B) = sinA*cosB + cosA*sinB,   cos(A+B) = cosA*cosB - sinA*sinB
// are formed with four multipliers. Three 128 x 14-bit tables are used: one
// coarse sine table, read at A and at A + 32 (a quarter turn on, for cosA),
// and fine sine and fine cosine tables. The tables are filled at elaboration:
//   coarse[a] = round(8191 * sin(2*pi*a/128))
//   fsin[b]   = round(8192 * sin(2*pi*b/16384)),
//   fcos[b]   = round(8192 * cos(2*pi*b/16384))   (unsigned, <= 8192)
// Following the design: multiplier-based architecture, 20-bit accumulator,
// 14-bit angle, 14-bit magnitude, 60 MHz at 240 MHz, dithering on. This
// implementation's choices: the coarse/fine split and table layout (which
// comes to the 5376 table bits quoted for the original core), the dither
// source, rounding and saturation to +/-8191, and the pipeline.
//
// Timing: 3-stage pipeline. The accumulator value phi present in clock t
// (a register, zero after reset) produces sin_o/cos_o in clock t+3:
// tables at t+1, products at t+2, sums at t+3.
module nco #(
  parameter int unsigned ACC_W     = duc_ddc_pkg::NCO_ACC_W,
  parameter int unsigned ANG_W     = duc_ddc_pkg::NCO_ANG_W,
  parameter int unsigned MAG_W     = duc_ddc_pkg::NCO_MAG_W,
  parameter bit          DITHER    = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ACC_W-1:0]        phase_inc,
  output logic signed [MAG_W-1:0] sin_o,
  output logic signed [MAG_W-1:0] cos_o
);
  localparam int unsigned CRS_W = (ANG_W + 1) / 2;   // coarse angle bits
  localparam int unsigned FIN_W = ANG_W - CRS_W;     // fine angle bits
  localparam int unsigned DTH_W = ACC_W - ANG_W;     // bits below the angle
  localparam int          AMP   = (1 << (MAG_W - 1)) - 1;
  localparam int          ONE   = 1 << (MAG_W - 1);  // fine-table unity
  localparam int unsigned PROD_W = 2 * MAG_W + 1;

  typedef logic signed [MAG_W-1:0] mag_t;
  typedef logic        [MAG_W-1:0] umag_t;
  typedef mag_t  crs_rom_t [1 << CRS_W];
  typedef umag_t fin_rom_t [1 << FIN_W];

  function automatic crs_rom_t fill_coarse();
    crs_rom_t r;
    for (int a = 0; a < (1 << CRS_W); a++)
      r[a] = mag_t'(duc_ddc_pkg::sin_val(a, 1 << CRS_W, AMP));
    return r;
  endfunction

  function automatic fin_rom_t fill_fine(bit cosine);
    fin_rom_t r;
    for (int b = 0; b < (1 << FIN_W); b++)
      r[b] = cosine ? umag_t'(duc_ddc_pkg::cos_val(b, 1 << ANG_W, ONE))
                    : umag_t'(duc_ddc_pkg::sin_val(b, 1 << ANG_W, ONE));
    return r;
  endfunction

  localparam crs_rom_t COARSE = fill_coarse();
  localparam fin_rom_t FSIN   = fill_fine(1'b0);
  localparam fin_rom_t FCOS   = fill_fine(1'b1);

  // ---- phase accumulator and dither ----
  // only the top ANG_W bits of the dithered phase are used; the bits below
  // the truncation point only carry the dither into the angle
  logic [ACC_W-1:0] acc, phase;
  logic [14:0]      lfsr;
  logic [ANG_W-1:0] angle;
  logic [CRS_W-1:0] a_idx, a_cos_idx;
  logic [FIN_W-1:0] b_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      lfsr <= 15'h7fff;
    end else begin
      acc  <= acc + phase_inc;
      lfsr <= {lfsr[13:0], lfsr[14] ^ lfsr[13]};
    end
  end

  if (DTH_W > 0) begin : g_dither
    assign phase = DITHER ? acc + ACC_W'(lfsr[DTH_W-1:0]) : acc;
  end else begin : g_nodither
    assign phase = acc;
  end

  assign angle     = phase[ACC_W-1 -: ANG_W];
  assign a_idx     = angle[ANG_W-1 -: CRS_W];
  assign a_cos_idx = a_idx + CRS_W'(1 << (CRS_W - 2));
  assign b_idx     = angle[FIN_W-1:0];

  // ---- stage 1: table reads ----
  mag_t                  sin_a, cos_a;
  logic signed [MAG_W:0] sin_b, cos_b;   // unsigned table values, sign bit 0

  always_ff @(posedge clk) begin
    sin_a <= COARSE[a_idx];
    cos_a <= COARSE[a_cos_idx];
    sin_b <= {1'b0, FSIN[b_idx]};
    cos_b <= {1'b0, FCOS[b_idx]};
  end

  // ---- stage 2: four products ----
  logic signed [PROD_W-1:0] p_sc, p_cs, p_cc, p_ss;

  always_ff @(posedge clk) begin
    p_sc <= PROD_W'(sin_a * cos_b);
    p_cs <= PROD_W'(cos_a * sin_b);
    p_cc <= PROD_W'(cos_a * cos_b);
    p_ss <= PROD_W'(sin_a * sin_b);
  end

  // ---- stage 3: sum, round, saturate ----
  localparam logic signed [PROD_W:0] AMP_W = (PROD_W+1)'(AMP);

  function automatic mag_t round_sat(logic signed [PROD_W:0] v);
    logic signed [PROD_W:0] r;
    r = (v + (PROD_W+1)'(ONE / 2)) >>> (MAG_W - 1);
    if (r > AMP_W)       return mag_t'(AMP);
    else if (r < -AMP_W) return mag_t'(-AMP);
    else               return mag_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    sin_o <= round_sat((PROD_W+1)'(p_sc) + (PROD_W+1)'(p_cs));
    cos_o <= round_sat((PROD_W+1)'(p_cc) - (PROD_W+1)'(p_ss));
  end
endmodule
