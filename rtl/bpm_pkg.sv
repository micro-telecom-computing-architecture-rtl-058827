// Shared constants and types of the BPM signal-processing chain.
//
// The four pickup channels are named A, B, C and D. A crossbar pattern is a
// number 0..3; pattern p sends RF input k to RF channel (k + p) mod 4. The
// widths below are this design's choice: 16-bit ADC words (the converter's
// resolution), 24-bit signed I/Q after the turn-by-turn filters, 27-bit
// amplitudes (room for the CORDIC gain of about 1.647 times sqrt(2)), and
// positions in signed 32-bit nanometres.
package bpm_pkg;

  localparam int unsigned NCH      = 4;   // pickup electrodes A..D
  localparam int unsigned ADC_W    = 16;  // ADC resolution
  localparam int unsigned IQ_W     = 24;  // I/Q width after CIC/FIR to TBT rate
  localparam int unsigned AMP_W    = 27;  // amplitude width (non-negative, signed container)
  localparam int unsigned COEF_W   = 18;  // FIR coefficient width, Q1.17
  localparam int unsigned COEF_FRAC = 17; // FIR coefficients sum to 2^17 (unity DC gain)
  localparam int unsigned RATIO_FRAC = 24;// fraction bits of the difference-over-sum ratio
  localparam int unsigned POS_W    = 32;  // position in nm, signed
  localparam int unsigned K_W      = 28;  // position coefficient in nm, unsigned

  typedef enum logic [1:0] {CH_A = 2'd0, CH_B = 2'd1, CH_C = 2'd2, CH_D = 2'd3} ch_e;

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic signed [AMP_W-1:0] amp_t;
  typedef logic signed [POS_W-1:0] pos_t;

  // One set of four electrode amplitudes with its strobe.
  typedef struct packed {
    logic valid;
    amp_t a;
    amp_t b;
    amp_t c;
    amp_t d;
  } amp4_t;

  // One beam position sample.
  typedef struct packed {
    logic valid;
    pos_t x;
    pos_t y;
    logic [AMP_W+1:0] sum;  // VA+VB+VC+VD, unsigned
  } pos_sample_t;

  // Smallest b with 2^b >= r^n: bit growth of an n-stage CIC decimating by r.
  function automatic int unsigned cic_growth(input int unsigned r, input int unsigned n);
    longint unsigned p;
    int unsigned b;
    p = 1;
    for (int unsigned i = 0; i < n; i++) p = p * longint'(r);
    b = 0;
    while ((64'd1 << b) < p) b++;
    return b;
  endfunction

endpackage
