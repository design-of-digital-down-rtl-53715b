// Digital down converter: real IF samples in, decimated complex baseband out.
//
// The NCO generates the quadrature LO at ftw_i * fs / 2**32; the mixer forms
// I = x*cos and Q = -x*sin; each branch is decimated by R = 2**rlog2_i in a CIC
// filter and then passed through the compensating FIR. With fs = 100 MHz and
// R = 2 or 4 the output rate is 50 or 25 MSPS, as in the design description;
// the FIR does not decimate. Both branches share one set of FIR coefficients
// (coef_* write port, see cfir_filter).
//
// Timing: the ADC delivers one sample per clock while adc_valid_i is high.
// The NCO is advanced with the ADC sample and delayed to line up with it.
// Latency from an ADC sample to the I/Q sample that completes its decimation
// group is 5 clocks (2 NCO, 1 mixer, 1 CIC, 1 FIR). valid_o pulses once per R
// input samples.
module ddc #(
  parameter int ADC_W     = sdr_pkg::ADC_W,
  parameter int IQ_W      = sdr_pkg::IQ_W,
  parameter int RLOG2_MAX = sdr_pkg::CIC_RLOG2_MAX,
  parameter int TAPS      = sdr_pkg::FIR_TAPS,
  parameter int CW        = sdr_pkg::COEF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  adc_i,
  input  logic                     adc_valid_i,
  input  logic [sdr_pkg::NCO_ACC_W-1:0] ftw_i,
  input  logic [$clog2(RLOG2_MAX+1)-1:0] rlog2_i,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  logic signed [CW-1:0]     coef_data,
  output logic signed [IQ_W-1:0]   i_o,
  output logic signed [IQ_W-1:0]   q_o,
  output logic                     valid_o
);
  localparam int LO_W = sdr_pkg::NCO_AMP_W;

  logic signed [LO_W-1:0]  lo_cos, lo_sin;
  logic                    lo_valid;
  logic signed [ADC_W-1:0] adc_d1, adc_d2;
  logic signed [IQ_W-1:0]  mix_i, mix_q, cic_i, cic_q;
  logic                    mix_valid, cic_valid_i, cic_valid_q, fir_valid_q;

  nco u_nco (
    .clk, .rst_n, .en(adc_valid_i), .ftw(ftw_i),
    .cos_o(lo_cos), .sin_o(lo_sin), .valid_o(lo_valid)
  );

  // align the ADC sample with the two-clock NCO output
  always_ff @(posedge clk) begin
    adc_d1 <= adc_i;
    adc_d2 <= adc_d1;
  end

  ddc_mixer #(.IN_W(ADC_W), .LO_W(LO_W), .OUT_W(IQ_W)) u_mix (
    .clk, .rst_n, .x_i(adc_d2), .cos_i(lo_cos), .sin_i(lo_sin), .valid_i(lo_valid),
    .i_o(mix_i), .q_o(mix_q), .valid_o(mix_valid)
  );

  cic_decimator #(.IN_W(IQ_W), .OUT_W(IQ_W), .RLOG2_MAX(RLOG2_MAX)) u_cic_i (
    .clk, .rst_n, .rlog2_i, .x_i(mix_i), .valid_i(mix_valid), .y_o(cic_i), .valid_o(cic_valid_i)
  );
  cic_decimator #(.IN_W(IQ_W), .OUT_W(IQ_W), .RLOG2_MAX(RLOG2_MAX)) u_cic_q (
    .clk, .rst_n, .rlog2_i, .x_i(mix_q), .valid_i(mix_valid), .y_o(cic_q), .valid_o(cic_valid_q)
  );

  cfir_filter #(.TAPS(TAPS), .DW(IQ_W), .CW(CW)) u_fir_i (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .x_i(cic_i), .valid_i(cic_valid_i), .y_o(i_o), .valid_o(valid_o)
  );
  cfir_filter #(.TAPS(TAPS), .DW(IQ_W), .CW(CW)) u_fir_q (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .x_i(cic_q), .valid_i(cic_valid_q), .y_o(q_o), .valid_o(fir_valid_q)
  );

  // both branches run in lock-step
  assert property (@(posedge clk) disable iff (!rst_n) fir_valid_q == valid_o);
endmodule
