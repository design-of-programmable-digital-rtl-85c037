// ddc_pkg: widths, types and default constants shared by the digital down
// converter (DDC) modules.
//
// The DDC mixes a real IF sample stream down to complex baseband with a
// numerically controlled oscillator (NCO) and then decimates each of the I
// and Q arms with a CIC filter followed by two half-band FIR filters.
// The chain of blocks follows the source design; every width below is this
// design's own choice, because the source design gives no word lengths.
// The half-band default coefficients are an 11-tap Blackman-windowed
// half-band design (sum of taps = 1.0 in Q1.15), also this design's choice.
package ddc_pkg;

  // Sample and coefficient word lengths.
  localparam int unsigned ADC_W      = 14;  // ADC sample width
  localparam int unsigned PHASE_W    = 32;  // NCO phase accumulator width
  localparam int unsigned LUT_AW     = 10;  // NCO sine table address width
  localparam int unsigned NCO_W      = 16;  // NCO sine/cosine amplitude width
  localparam int unsigned MIX_W      = 16;  // mixer output width
  localparam int unsigned CIC_STAGES = 2;   // integrator/comb pairs (Fig. 2)
  localparam int unsigned CIC_MAX_DEC = 9;  // largest CIC decimation ("less than 10")
  localparam int unsigned DEC_W      = 4;   // width of the decimation setting
  localparam int unsigned CIC_OUT_W  = MIX_W + CIC_STAGES * $clog2(CIC_MAX_DEC);
  localparam int unsigned COEF_W     = 16;  // half-band coefficient width
  localparam int unsigned COEF_FRAC  = 15;  // coefficients are Q1.15

  // Programmable half-band coefficients. The names follow the tap labels of
  // the polyphase half-band structure: h0 is the centre tap (single-tap
  // branch), h1 weights the outer symmetric pair, h3 the middle pair and h5
  // the inner pair of the folded branch.
  typedef struct packed {
    logic signed [COEF_W-1:0] h0;
    logic signed [COEF_W-1:0] h1;
    logic signed [COEF_W-1:0] h3;
    logic signed [COEF_W-1:0] h5;
  } hb_coef_t;

  localparam hb_coef_t HB_COEF_DEFAULT = '{
    h0: 16'sd16384,
    h1: 16'sd57,
    h3: -16'sd1183,
    h5: 16'sd9318
  };

  // Run-time configuration of the whole converter.
  typedef struct packed {
    logic [PHASE_W-1:0] phase_inc;  // NCO tuning word: f = phase_inc * fs / 2^PHASE_W
    logic [DEC_W-1:0]   cic_dec;    // CIC decimation factor, 1..CIC_MAX_DEC
    hb_coef_t           hb1;        // coefficients of the first half-band filter
    hb_coef_t           hb2;        // coefficients of the second half-band filter
  } ddc_cfg_t;

endpackage
