// Shared widths and constants of the DDC / spectrum-detection receiver.
//
// One clock domain at the ADC rate (fs = 100 MHz). The numbers taken from the
// design description are the 4096-point maximum FFT length (LOG2_KMAX) and the
// decimation factors 2 and 4 (CIC_RLOG2_MAX). Every other width below (ADC
// resolution, LO amplitude, I/Q word, FFT internal word, dB format) is this
// implementation's choice.
package sdr_pkg;
  localparam int ADC_W         = 14;  // real IF sample from the ADC
  localparam int NCO_ACC_W     = 32;  // phase accumulator
  localparam int NCO_ADDR_W    = 10;  // sine/cosine ROM address
  localparam int NCO_AMP_W     = 16;  // LO amplitude
  localparam int IQ_W          = 16;  // baseband I/Q word
  localparam int CIC_N         = 4;   // integrator / comb stages
  localparam int CIC_RLOG2_MAX = 2;   // R = 2 or 4
  localparam int FIR_TAPS      = 21;
  localparam int COEF_W        = 18;  // FIR coefficient, Q3.15 (1.0 = 2**15)
  localparam int COEF_FRAC     = 15;
  localparam int WIN_W         = 16;  // unsigned Q0.16 window coefficient
  localparam int LOG2_KMAX     = 12;  // 4096-point FFT
  localparam int FFT_DW        = 24;  // FFT internal real/imag word
  localparam int TW_W          = 18;  // twiddle, Q2.16
  localparam int NAVG_LOG2_MAX = 4;   // up to 16 averaged frames
  localparam int PWR_W         = 2*FFT_DW;
  localparam int DB_W          = 16;  // level in 1/16 dB
  localparam int DB_FRAC       = 4;
  localparam int MED_W         = 15;  // median window in bins

  // One bin of the detection output.
  typedef struct packed {
    logic [LOG2_KMAX-1:0] bin;
    logic signed [DB_W-1:0] level;   // averaged level, 1/16 dBm
    logic signed [DB_W-1:0] floor;   // median noise floor
    logic signed [DB_W-1:0] thr;     // noise riding threshold
    logic                   det;     // level above threshold
  } spec_bin_t;

  // One detected signal: a run of adjacent bins above the threshold.
  typedef struct packed {
    logic [LOG2_KMAX-1:0] start;
    logic [LOG2_KMAX-1:0] stop;
    logic [LOG2_KMAX-1:0] peak_bin;
    logic signed [DB_W-1:0] peak_level;
  } sig_report_t;
endpackage
