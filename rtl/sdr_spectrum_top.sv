// Receiver back end of a software-defined radio: digital down conversion
// followed by FFT spectrum processing and automatic signal detection.
//
// Data path (one clock domain at the ADC rate):
//   ADC samples -> ddc (NCO, mixer, CIC /R, compensating FIR) -> complex
//   baseband at fs/R -> window_mult (host-loaded window) -> fft_engine (K
//   points) -> spectrum_averager (2**navg frames of |X|^2) -> log_dbm (1/16
//   dBm) -> noise_floor_median (sliding median) -> nrt_detector (floor +
//   SNR margin) -> per-bin spectrum stream and one report per detected signal.
// This chain is the one of the design description; the FFT is not required
// to see every sample: while it computes, the window stage drops input, and a
// new frame starts at the next request.
//
// Configuration (sample while idle or hold steady): cfg_ftw_i sets the LO to
// cfg_ftw_i * fs / 2**32 (75 MHz IF at fs = 100 MHz: 32'hC000_0000);
// cfg_rlog2_i = 1 or 2 gives 50 or 25 MSPS baseband and takes effect through
// reset; cfg_log2k_i sets K, latched at every frame; cfg_navg_log2_i the
// number of averaged frames; cfg_offset_i the dBm calibration and
// cfg_snr_margin_i the detection margin, both in 1/16 dB. The FIR
// coefficients and the window RAM are written through their ports.
module sdr_spectrum_top #(
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // ADC
  input  logic signed [sdr_pkg::ADC_W-1:0] adc_i,
  input  logic                             adc_valid_i,
  // configuration
  input  logic [sdr_pkg::NCO_ACC_W-1:0]    cfg_ftw_i,
  input  logic [1:0]                       cfg_rlog2_i,
  input  logic [3:0]                       cfg_log2k_i,
  input  logic [2:0]                       cfg_navg_log2_i,
  input  logic signed [sdr_pkg::DB_W-1:0]  cfg_offset_i,
  input  logic signed [sdr_pkg::DB_W-1:0]  cfg_snr_margin_i,
  // CFIR coefficient write port
  input  logic                             coef_we,
  input  logic [4:0]                       coef_addr,
  input  logic signed [sdr_pkg::COEF_W-1:0] coef_data,
  // window RAM write port
  input  logic                             win_we,
  input  logic [LOG2_KMAX-1:0]             win_addr,
  input  logic [sdr_pkg::WIN_W-1:0]        win_data,
  // baseband I/Q
  output logic signed [sdr_pkg::IQ_W-1:0]  ddc_i_o,
  output logic signed [sdr_pkg::IQ_W-1:0]  ddc_q_o,
  output logic                             ddc_valid_o,
  // spectrum and detections
  output sdr_pkg::spec_bin_t               spec_o,
  output logic                             spec_valid_o,
  output logic                             spec_last_o,
  output sdr_pkg::sig_report_t             rep_o,
  output logic                             rep_valid_o,
  output logic                             fft_busy_o
);
  import sdr_pkg::*;

  localparam int LW = $clog2(LOG2_KMAX+1);

  // ---- DDC ----
  ddc #(.ADC_W(ADC_W), .IQ_W(IQ_W), .RLOG2_MAX(CIC_RLOG2_MAX), .TAPS(FIR_TAPS), .CW(COEF_W)) u_ddc (
    .clk, .rst_n, .adc_i, .adc_valid_i, .ftw_i(cfg_ftw_i), .rlog2_i(cfg_rlog2_i),
    .coef_we, .coef_addr, .coef_data,
    .i_o(ddc_i_o), .q_o(ddc_q_o), .valid_o(ddc_valid_o)
  );

  // ---- window ----
  logic [LW-1:0]          log2k;
  logic                   frame_req;
  logic signed [IQ_W-1:0] w_i, w_q;
  logic [LOG2_KMAX-1:0]   w_idx;
  logic                   w_valid, w_last;

  window_mult #(.LOG2_KMAX(LOG2_KMAX), .DW(IQ_W), .WW(WIN_W)) u_win (
    .clk, .rst_n, .win_we, .win_addr, .win_data,
    .log2k_i(log2k), .frame_req_i(frame_req),
    .i_i(ddc_i_o), .q_i(ddc_q_o), .valid_i(ddc_valid_o),
    .i_o(w_i), .q_o(w_q), .idx_o(w_idx), .valid_o(w_valid), .last_o(w_last)
  );

  // ---- FFT ----
  logic signed [FFT_DW-1:0] f_re, f_im;
  logic [LOG2_KMAX-1:0]     f_bin;
  logic                     f_valid, f_last;

  fft_engine #(.LOG2_KMAX(LOG2_KMAX), .IW(IQ_W), .DW(FFT_DW), .TW(TW_W)) u_fft (
    .clk, .rst_n, .log2k_i(LW'(cfg_log2k_i)), .log2k_o(log2k), .frame_req_o(frame_req),
    .in_re(w_i), .in_im(w_q), .in_idx(w_idx), .in_valid(w_valid),
    .out_re(f_re), .out_im(f_im), .out_bin(f_bin), .out_valid(f_valid), .out_last(f_last),
    .busy_o(fft_busy_o)
  );

  // ---- averaging ----
  logic [PWR_W-1:0]     a_pwr;
  logic [LOG2_KMAX-1:0] a_bin;
  logic                 a_valid, a_last;

  spectrum_averager #(.LOG2_KMAX(LOG2_KMAX), .DW(FFT_DW), .NAVG_LOG2_MAX(NAVG_LOG2_MAX)) u_avg (
    .clk, .rst_n, .navg_log2_i(cfg_navg_log2_i),
    .re_i(f_re), .im_i(f_im), .bin_i(f_bin), .valid_i(f_valid), .last_i(f_last),
    .pwr_o(a_pwr), .bin_o(a_bin), .valid_o(a_valid), .last_o(a_last)
  );

  // ---- dBm ----
  logic signed [DB_W-1:0] l_db;
  logic [LOG2_KMAX-1:0]   l_bin;
  logic                   l_valid, l_last;

  log_dbm #(.PW(PWR_W), .OW(DB_W), .LOG2_KMAX(LOG2_KMAX)) u_log (
    .clk, .rst_n, .offset_i(cfg_offset_i),
    .pwr_i(a_pwr), .bin_i(a_bin), .valid_i(a_valid), .last_i(a_last),
    .db_o(l_db), .bin_o(l_bin), .valid_o(l_valid), .last_o(l_last)
  );

  // ---- noise floor ----
  logic signed [DB_W-1:0] m_db, m_floor;
  logic [LOG2_KMAX-1:0]   m_bin;
  logic                   m_valid, m_last;

  noise_floor_median #(.W(MED_W), .DBW(DB_W), .LOG2_KMAX(LOG2_KMAX)) u_med (
    .clk, .rst_n, .db_i(l_db), .bin_i(l_bin), .valid_i(l_valid), .last_i(l_last),
    .db_o(m_db), .floor_o(m_floor), .bin_o(m_bin), .valid_o(m_valid), .last_o(m_last)
  );

  // ---- detection ----
  nrt_detector #(.DBW(DB_W), .LOG2_KMAX(LOG2_KMAX)) u_det (
    .clk, .rst_n, .snr_margin_i(cfg_snr_margin_i),
    .db_i(m_db), .floor_i(m_floor), .bin_i(m_bin), .valid_i(m_valid), .last_i(m_last),
    .spec_o, .spec_valid_o, .spec_last_o, .rep_o, .rep_valid_o
  );
endmodule
