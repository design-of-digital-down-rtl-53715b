// Cascaded integrator-comb (CIC) decimator, one branch (I or Q) of the DDC.
//
// N integrators y[n] = y[n-1] + x[n] run at the input rate; every R-th input
// sample is passed to N combs y = x[m] - x[m-D] that run at the decimated
// rate. R = 2**rlog2_i is a power of two (1 .. RLOG2_MAX), as the design
// description requires. Registers are IN_W + N*RLOG2_MAX bits wide
// (Hogenauer), so two's complement wrap-around in the integrators is harmless.
// The filter gain (R*D)**N is removed by a rounding arithmetic shift of
// N*rlog2 bits (D = 1), giving unity DC gain for every R; the result is
// saturated to OUT_W bits. The stage count N = 4, D = 1, the gain
// normalisation and the saturation are this implementation's choices.
//
// Timing: one output (valid_o pulse) per R valid inputs, one clock after the
// R-th of them. rlog2_i should only change while in reset.
module cic_decimator #(
  parameter int IN_W      = sdr_pkg::IQ_W,
  parameter int OUT_W     = sdr_pkg::IQ_W,
  parameter int N         = sdr_pkg::CIC_N,
  parameter int RLOG2_MAX = sdr_pkg::CIC_RLOG2_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(RLOG2_MAX+1)-1:0] rlog2_i,
  input  logic signed [IN_W-1:0]   x_i,
  input  logic                     valid_i,
  output logic signed [OUT_W-1:0]  y_o,
  output logic                     valid_o
);
  localparam int GW = IN_W + N * RLOG2_MAX;

  logic signed [GW-1:0] integ [N];
  logic signed [GW-1:0] comb_dly [N];
  logic [RLOG2_MAX-1:0] phase;
  logic                 take;

  // comb chain, evaluated once per decimated sample
  logic signed [GW-1:0] comb_in [N+1];
  logic signed [GW-1:0] scaled;
  logic [7:0]           sh;

  assign take = valid_i && (phase == RLOG2_MAX'((1 << rlog2_i) - 1));

  always_comb begin
    comb_in[0] = integ[N-1];
    for (int k = 0; k < N; k++)
      comb_in[k+1] = comb_in[k] - comb_dly[k];
    sh     = 8'(N * rlog2_i);
    scaled = (sh == 0) ? comb_in[N]
                       : (comb_in[N] + (GW'(1) <<< (sh - 1))) >>> sh;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        integ[k]    <= '0;
        comb_dly[k] <= '0;
      end
      phase   <= '0;
      valid_o <= 1'b0;
      y_o     <= '0;
    end else begin
      valid_o <= take;
      if (valid_i) begin
        integ[0] <= integ[0] + GW'(x_i);
        for (int k = 1; k < N; k++)
          integ[k] <= integ[k] + integ[k-1];
        phase <= take ? '0 : phase + 1'b1;
      end
      if (take) begin
        for (int k = 0; k < N; k++)
          comb_dly[k] <= comb_in[k];
        if (scaled > GW'((1 << (OUT_W-1)) - 1))
          y_o <= OUT_W'((1 << (OUT_W-1)) - 1);
        else if (scaled < -GW'(1 << (OUT_W-1)))
          y_o <= OUT_W'(-(1 << (OUT_W-1)));
        else
          y_o <= OUT_W'(scaled);
      end
    end
  end
endmodule
