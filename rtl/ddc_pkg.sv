// Shared sizes and filter coefficients of the digital receiver (DDC + pulse compression).
//
// The receiver samples a 14-bit IF at 40 MSps, mixes it to baseband with a 10 MHz NCO and
// decimates by 8 in three stages (CIC by 2, compensating FIR by 2, post FIR by 2) to a 5 MSps
// complex signal, which a four-FIR complex matched filter compresses in time.
//
// From the source design: the 14-bit ADC word, the 16-bit NCO phase, the 28-bit mixer product,
// the 40 MSps rate, the overall decimation by 8, the 41-tap equiripple post FIR and the eight
// integrator/eight comb CIC. This design's own choices: the split of the decimation into 2x2x2,
// the 16-bit data path after the CIC, the 1024-entry sine table, the 21-tap compensator and all
// coefficient values.
//
// Coefficients are Q1.15 (unity = 32768), symmetric, linear phase:
//   CFIR: least-squares fit (21 taps) to 1/|H_cic(f)| over 0..1.5 MHz and zero over 7.5..10 MHz
//         at 20 MSps, where |H_cic(f)| = |sin(pi*R*M*f/fs_in) / (R*M*sin(pi*f/fs_in))|^N with
//         N = 8, R = 2, M = 1, fs_in = 40 MSps.
//   PFIR: Parks-McClellan equiripple low pass, 41 taps at 10 MSps, pass 0..1.5 MHz, stop from
//         2.5 MHz (about 69 dB attenuation before quantisation).
package ddc_pkg;

  localparam int unsigned ADC_W       = 14;  // ADC sample width
  localparam int unsigned PHASE_W     = 16;  // NCO phase accumulator width (N)
  localparam int unsigned LUT_AW      = 10;  // truncated phase used as ROM address
  localparam int unsigned NCO_W       = 14;  // NCO sine/cosine amplitude width
  localparam int unsigned MIX_W       = ADC_W + NCO_W;  // full mixer product (28 bits)
  localparam int unsigned DATA_W      = 16;  // baseband sample width after the CIC
  localparam int unsigned COEF_W      = 16;  // FIR coefficient width, Q1.15

  localparam int unsigned CIC_N       = 8;   // integrator / comb stages
  localparam int unsigned CIC_R       = 2;   // CIC decimation
  localparam int unsigned CIC_M       = 1;   // differential delay
  localparam int unsigned CFIR_TAPS   = 21;
  localparam int unsigned CFIR_DECIM  = 2;
  localparam int unsigned PFIR_TAPS   = 41;
  localparam int unsigned PFIR_DECIM  = 2;

  // 10 MHz at 40 MSps: 2^16 * 10/40
  localparam logic [PHASE_W-1:0] FTW_DEFAULT = 16'h4000;

  localparam int unsigned REF_LEN     = 64;  // pulse-compression reference length (taps)

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t CFIR_COEFS [CFIR_TAPS] = '{
    -16'sd5, -16'sd40, -16'sd71, 16'sd128, 16'sd565, 16'sd243, -16'sd1654, -16'sd2636,
    16'sd1765, 16'sd10499, 16'sd15188, 16'sd10499, 16'sd1765, -16'sd2636, -16'sd1654,
    16'sd243, 16'sd565, 16'sd128, -16'sd71, -16'sd40, -16'sd5
  };

  localparam coef_t PFIR_COEFS [PFIR_TAPS] = '{
    16'sd1, -16'sd20, -16'sd20, 16'sd32, 16'sd76, 16'sd0, -16'sd155, -16'sd130, 16'sd175,
    16'sd370, -16'sd1, -16'sd617, -16'sd485, 16'sd621, 16'sd1285, -16'sd1, -16'sd2221,
    -16'sd1919, 16'sd2984, 16'sd9852, 16'sd13105, 16'sd9852, 16'sd2984, -16'sd1919,
    -16'sd2221, -16'sd1, 16'sd1285, 16'sd621, -16'sd485, -16'sd617, -16'sd1, 16'sd370,
    16'sd175, -16'sd130, -16'sd155, 16'sd0, 16'sd76, 16'sd32, -16'sd20, -16'sd20, 16'sd1
  };

endpackage
