// dfe_pkg - shared types, sizes and filter coefficients of the GSM/DECT
// digital front-end.
//
// The receiver runs one of two air interfaces, selected by a mode_e value.
// The decimation chain is the same for both: comb by M, then two FIR stages
// that each decimate by 2, so the overall rate reduction is 4*M (64 for GSM,
// 32 for DECT) and the final output lands on the standard's symbol rate.
//
// Filter lengths follow the published design (inverse sinc: order 23 GSM /
// 15 DECT, generic FIR: order 47 GSM / 31 DECT, i.e. 24/16 and 48/32 taps).
// The coefficient values are this design's own. Both stages are constrained
// minimax (equiripple) linear-phase designs: each minimises the peak
// passband deviation of the whole chain up to and including it (comb, then
// comb plus inverse sinc) from unity over 0..82 % of the channel bandwidth,
// subject to stopband bounds:
//   inverse sinc, on the filter alone: the band that folds onto the channel
//     after its decimate-by-2 (half its input rate minus the channel
//     bandwidth, up to half its input rate) below -60 dB (GSM) / -20 dB
//     (DECT); the rest of the upper half band below -50 dB (GSM) / -20 dB
//     (DECT); gain at most 1 between 1.05x the passband edge and a quarter
//     of its input rate;
//   generic FIR, on the whole chain: from the channel bandwidth (100 kHz /
//     700 kHz) to half its input rate below -23 dB (GSM) / -35 dB (DECT).
// The chain response is then flat to 0.045 dB (GSM) and 0.11 dB (DECT) peak
// to peak over the passband. All values are Q1.15 (integer / 32768) and
// symmetric.
package dfe_pkg;

  typedef enum logic {
    MODE_GSM  = 1'b0,
    MODE_DECT = 1'b1
  } mode_e;

  // Which of the two MAC FIR stages a mac_fir_decimator instance is.
  typedef enum logic {
    STAGE_INVSINC = 1'b0,
    STAGE_GENERIC = 1'b1
  } fir_stage_e;

  // Comb filter settings per mode (published values).
  localparam int unsigned CIC_ORDER   = 5;
  localparam int unsigned CIC_M_GSM   = 16;
  localparam int unsigned CIC_D_GSM   = 1;
  localparam int unsigned CIC_M_DECT  = 8;
  localparam int unsigned CIC_D_DECT  = 2;

  // FIR lengths (taps = order + 1).
  localparam int unsigned INVSINC_TAPS_GSM  = 24;
  localparam int unsigned INVSINC_TAPS_DECT = 16;
  localparam int unsigned GENERIC_TAPS_GSM  = 48;
  localparam int unsigned GENERIC_TAPS_DECT = 32;
  localparam int unsigned MAX_TAPS          = 48;

  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 15;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t INVSINC_GSM [INVSINC_TAPS_GSM] = '{
    157, 731, 1219, 583, -1533, -3659, -3233, 632, 5458, 7508, 5744, 3086,
    3086, 5744, 7508, 5458, 632, -3233, -3659, -1533, 583, 1219, 731, 157};

  localparam coef_t INVSINC_DECT [INVSINC_TAPS_DECT] = '{
    1601, -1889, -5205, -5545, -1018, 5166, 8785, 9501, 9501, 8785, 5166, -1018,
    -5545, -5205, -1889, 1601};

  localparam coef_t GENERIC_GSM [GENERIC_TAPS_GSM] = '{
    -934, 3486, -5279, 5667, -7865, 10978, -11317, 11765, -14376, 15010, -14428, 15555,
    -15429, 14613, -15125, 13298, -11660, 12732, -10183, 5823, -8733, 6671, 4243, 11608,
    11608, 4243, 6671, -8733, 5823, -10183, 12732, -11660, 13298, -15125, 14613, -15429,
    15555, -14428, 15010, -14376, 11765, -11317, 10978, -7865, 5667, -5279, 3486, -934};

  localparam coef_t GENERIC_DECT [GENERIC_TAPS_DECT] = '{
    -536, 854, -42, -1681, 2118, -183, -1406, -176, 3457, -2323, -1548, 3783,
    3978, -3273, 2914, 17468, 17468, 2914, -3273, 3978, 3783, -1548, -2323, 3457,
    -176, -1406, -183, 2118, -1681, -42, 854, -536};

  // Number of taps of a stage in a mode.
  function automatic int unsigned fir_taps(fir_stage_e stage, mode_e mode);
    if (stage == STAGE_INVSINC)
      return (mode == MODE_GSM) ? INVSINC_TAPS_GSM : INVSINC_TAPS_DECT;
    else
      return (mode == MODE_GSM) ? GENERIC_TAPS_GSM : GENERIC_TAPS_DECT;
  endfunction

  // Coefficient k of a stage in a mode; zero beyond the filter length.
  function automatic coef_t fir_coef(fir_stage_e stage, mode_e mode, int unsigned k);
    coef_t c;
    c = '0;
    if (stage == STAGE_INVSINC) begin
      if (mode == MODE_GSM) begin
        if (k < INVSINC_TAPS_GSM) c = INVSINC_GSM[k];
      end else begin
        if (k < INVSINC_TAPS_DECT) c = INVSINC_DECT[k];
      end
    end else begin
      if (mode == MODE_GSM) begin
        if (k < GENERIC_TAPS_GSM) c = GENERIC_GSM[k];
      end else begin
        if (k < GENERIC_TAPS_DECT) c = GENERIC_DECT[k];
      end
    end
    return c;
  endfunction

endpackage
