// Numerically controlled oscillator: quadrature local oscillator for the DDC.
//
// A phase accumulator adds the tuning word `ftw` once per enabled clock; its
// top ADDR_W bits address a cosine ROM and a sine ROM (phase truncation). The
// output frequency is ftw * fclk / 2**ACC_W. The accumulator-plus-ROM
// structure follows the design description; the accumulator width, ROM depth
// and amplitude width are this implementation's choices. The ROM contents,
// round((2**(AMP_W-1)-1) * cos|sin(2*pi*a/2**ADDR_W)), are computed at
// elaboration.
//
// Timing: the sample for phase p(n) = n*ftw appears on cos_o/sin_o two clocks
// after the n-th `en` (accumulator read, registered ROM output), with valid_o.
// Reset clears the phase to 0.
module nco #(
  parameter int ACC_W  = sdr_pkg::NCO_ACC_W,
  parameter int ADDR_W = sdr_pkg::NCO_ADDR_W,
  parameter int AMP_W  = sdr_pkg::NCO_AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [ACC_W-1:0]        ftw,
  output logic signed [AMP_W-1:0] cos_o,
  output logic signed [AMP_W-1:0] sin_o,
  output logic                    valid_o
);
  localparam int DEPTH = 1 << ADDR_W;

  typedef logic signed [AMP_W-1:0] table_t [DEPTH];

  function automatic table_t make_table(input bit is_sin);
    table_t t;
    for (int a = 0; a < DEPTH; a++) begin
      real ph;
      ph = 2.0 * 3.14159265358979323846 * real'(a) / real'(DEPTH);
      t[a] = AMP_W'($rtoi($floor(real'((1 << (AMP_W-1)) - 1) * (is_sin ? $sin(ph) : $cos(ph)) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t COS_ROM = make_table(1'b0);
  localparam table_t SIN_ROM = make_table(1'b1);

  logic [ACC_W-1:0]  phase;
  logic [ADDR_W-1:0] addr;
  logic              addr_vld;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      addr     <= '0;
      addr_vld <= 1'b0;
      valid_o  <= 1'b0;
    end else begin
      addr_vld <= en;
      valid_o  <= addr_vld;
      if (en) begin
        addr  <= phase[ACC_W-1 -: ADDR_W];
        phase <= phase + ftw;
      end
    end
  end

  always_ff @(posedge clk) begin
    cos_o <= COS_ROM[addr];
    sin_o <= SIN_ROM[addr];
  end
endmodule
