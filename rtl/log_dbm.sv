// Power-to-dBm converter.
//
// Computes 10*log10(P) as (10*log10 2) * log2(P). log2 is formed from the
// position e of the leading one of P and the 8 bits that follow it, looked up
// in a 256-entry table round(256 * log2(1 + m/256)) computed at elaboration,
// giving log2(P) in units of 1/256. The product with 10*log10(2) is taken in
// fixed point (12330 / 2**16 = 0.18814 = 10*log10(2) * 16 / 256), so the level
// comes out in 1/16 dB. A signed calibration offset (offset_i, 1/16 dB) is
// then added and the result saturated, which normalises the scale to dBm.
// Converting to a dBm scale with a normalisation is the design description's;
// the number format, the table size and the offset port are this
// implementation's choices. P = 0 gives offset_i - 16 (1 dB below P = 1).
//
// Timing: 3 clocks from valid_i to valid_o; bin_i/last_i travel alongside.
module log_dbm #(
  parameter int PW        = sdr_pkg::PWR_W,
  parameter int OW        = sdr_pkg::DB_W,
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [OW-1:0]   offset_i,
  input  logic [PW-1:0]          pwr_i,
  input  logic [LOG2_KMAX-1:0]   bin_i,
  input  logic                   valid_i,
  input  logic                   last_i,
  output logic signed [OW-1:0]   db_o,
  output logic [LOG2_KMAX-1:0]   bin_o,
  output logic                   valid_o,
  output logic                   last_o
);
  localparam int EW = $clog2(PW);
  localparam int LW = EW + 8;      // log2 in 1/256 units

  typedef logic [8:0] lut_t [256];

  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 9'($rtoi($floor(256.0 * $ln(1.0 + real'(i) / 256.0) / $ln(2.0) + 0.5)));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  // stage 1: leading one and mantissa
  logic [EW-1:0]  e_c;
  logic [PW-1:0]  norm_c;
  logic           zero_c;
  always_comb begin
    e_c = '0;
    for (int b = 0; b < PW; b++)
      if (pwr_i[b]) e_c = EW'(b);
    zero_c = (pwr_i == '0);
    norm_c = pwr_i << (EW'(PW-1) - e_c);
  end

  logic [EW-1:0]  s1_e;
  logic [7:0]     s1_m;
  logic           s1_zero, s1_vld, s1_last;
  logic [LOG2_KMAX-1:0] s1_bin;
  logic [LW-1:0]  s2_l2;
  logic           s2_zero, s2_vld, s2_last;
  logic [LOG2_KMAX-1:0] s2_bin;
  logic signed [31:0] db_c;

  always_comb begin
    db_c = 32'((s2_l2 * 32'd12330 + 32'd32768) >> 16) + 32'(offset_i);
    if (s2_zero) db_c = 32'(offset_i) - 32'sd16;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_vld <= 1'b0; s1_last <= 1'b0; s1_e <= '0; s1_m <= '0; s1_zero <= 1'b1; s1_bin <= '0;
      s2_vld <= 1'b0; s2_last <= 1'b0; s2_l2 <= '0; s2_zero <= 1'b1; s2_bin <= '0;
      valid_o <= 1'b0; last_o <= 1'b0; db_o <= '0; bin_o <= '0;
    end else begin
      s1_vld  <= valid_i;
      s1_last <= valid_i && last_i;
      s1_e    <= e_c;
      s1_m    <= norm_c[PW-2 -: 8];
      s1_zero <= zero_c;
      s1_bin  <= bin_i;
      s2_vld  <= s1_vld;
      s2_last <= s1_last;
      s2_l2   <= LW'({s1_e, 8'd0}) + LW'(LUT[s1_m]);
      s2_zero <= s1_zero;
      s2_bin  <= s1_bin;
      valid_o <= s2_vld;
      last_o  <= s2_last;
      bin_o   <= s2_bin;
      if (s2_vld) begin
        if (db_c > 32'((1 << (OW-1)) - 1))    db_o <= OW'((1 << (OW-1)) - 1);
        else if (db_c < -32'(1 << (OW-1))) db_o <= OW'(-(1 << (OW-1)));
        else                         db_o <= OW'(db_c);
      end
    end
  end
endmodule
