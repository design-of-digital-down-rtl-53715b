// Quadrature mixer of the DDC.
//
// Multiplies the real ADC sample by the NCO cosine (in-phase branch) and by the
// negated NCO sine (quadrature branch), i.e. by exp(-j*w*n), which moves the
// LO frequency to 0 Hz. The products are rounded to OUT_W bits so that a
// full-scale input times a full-scale LO gives a full-scale output. The
// multiplication follows the design description; the sign of Q, the rounding
// and the single register stage are this implementation's choices.
//
// Timing: one clock from valid_i to valid_o.
module ddc_mixer #(
  parameter int IN_W  = sdr_pkg::ADC_W,
  parameter int LO_W  = sdr_pkg::NCO_AMP_W,
  parameter int OUT_W = sdr_pkg::IQ_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x_i,
  input  logic signed [LO_W-1:0]  cos_i,
  input  logic signed [LO_W-1:0]  sin_i,
  input  logic                    valid_i,
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o,
  output logic                    valid_o
);
  localparam int PW = IN_W + LO_W;
  localparam int SH = PW - 1 - OUT_W;   // product bits dropped (keeps one sign bit)

  logic signed [PW-1:0] pi, pq;
  logic signed [PW-1:0] ri, rq;

  always_comb begin
    pi = x_i * cos_i;
    pq = -(x_i * sin_i);
    ri = (pi + (PW'(1) <<< (SH-1))) >>> SH;
    rq = (pq + (PW'(1) <<< (SH-1))) >>> SH;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      i_o     <= '0;
      q_o     <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        i_o <= OUT_W'(ri);
        q_o <= OUT_W'(rq);
      end
    end
  end
endmodule
