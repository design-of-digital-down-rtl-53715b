// Compensating FIR (CFIR) filter after the CIC decimator.
//
// Computes y(n) = sum_k h(k) x(n-k) in transposed direct form: each new
// sample is multiplied by all TAPS coefficients at once and added into a chain
// of partial sums. It flattens the pass-band droop of the CIC. The convolution
// is the design description's; the tap count, the coefficient format (signed
// CW bits, FRAC fraction bits, 1.0 = 2**15), the default coefficients and the
// run-time write port are this implementation's choices. The default set is
// a 21-tap least-squares design for the main configuration, a 4-stage CIC
// with R = 2: gain 1/|H_cic(f)| up to 0.4 of the output rate (the 40 MHz
// instantaneous bandwidth at 50 MSPS), unity DC gain (coefficients sum to
// 2**15). CIC and CFIR together are then flat within 0.05 dB to 0.35 and
// -0.25 dB at 0.4 of the output rate, -26 dB at 0.5. With R = 4 the same set
// leaves -2 dB at 0.4; a set designed for R = 4 can be written at run time.
// The filter does not decimate.
//
// Interface: coef_we writes coef_data into tap coef_addr (h(0) is the tap
// applied to the newest sample). Timing: y_o/valid_o one clock after valid_i;
// the output is rounded and saturated to DW bits.
module cfir_filter #(
  parameter int TAPS = sdr_pkg::FIR_TAPS,
  parameter int DW   = sdr_pkg::IQ_W,
  parameter int CW   = sdr_pkg::COEF_W,
  parameter int FRAC = sdr_pkg::COEF_FRAC,
  parameter logic signed [CW-1:0] H_INIT [TAPS] = '{
    -18'sd146, 18'sd551, -18'sd1240, 18'sd2226, -18'sd3451, 18'sd4755, -18'sd5838,
    18'sd6136, -18'sd4361, -18'sd3811, 18'sd43126, -18'sd3811, -18'sd4361, 18'sd6136,
    -18'sd5838, 18'sd4755, -18'sd3451, 18'sd2226, -18'sd1240, 18'sd551, -18'sd146}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_addr,
  input  logic signed [CW-1:0]      coef_data,
  input  logic signed [DW-1:0]      x_i,
  input  logic                      valid_i,
  output logic signed [DW-1:0]      y_o,
  output logic                      valid_o
);
  localparam int AW = DW + CW + $clog2(TAPS) + 1;

  logic signed [CW-1:0] h [TAPS];
  logic signed [AW-1:0] part [1:TAPS-1];  // part[k] holds sum of taps k..TAPS-1
  logic signed [AW-1:0] acc, rnd;

  always_comb begin
    acc = part[1] + AW'(x_i) * AW'(h[0]);
    rnd = (acc + (AW'(1) <<< (FRAC-1))) >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++)
        h[k] <= H_INIT[k];
      for (int k = 1; k < TAPS; k++)
        part[k] <= '0;
      y_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      if (coef_we && int'(coef_addr) < TAPS)
        h[coef_addr] <= coef_data;
      valid_o <= valid_i;
      if (valid_i) begin
        for (int k = 1; k < TAPS-1; k++)
          part[k] <= part[k+1] + AW'(x_i) * AW'(h[k]);
        part[TAPS-1] <= AW'(x_i) * AW'(h[TAPS-1]);
        if (rnd > AW'((1 << (DW-1)) - 1))
          y_o <= DW'((1 << (DW-1)) - 1);
        else if (rnd < -AW'(1 << (DW-1)))
          y_o <= DW'(-(1 << (DW-1)));
        else
          y_o <= DW'(rnd);
      end
    end
  end
endmodule
