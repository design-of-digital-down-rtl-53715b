// Spectrum averager: mean power per FFT bin over 2**navg_log2_i frames.
//
// For every bin it forms P = re**2 + im**2 and accumulates it in a RAM holding
// one word per bin. The first frame of a group overwrites the word, the
// following ones add to it, and during the last frame of the group the
// total, shifted right by navg_log2_i, is sent out as the mean power of the
// bin. Averaging several FFTs to reduce the variance of the spectrum is the
// design description's; averaging power (not magnitude) over a power-of-two
// number of frames is this implementation's choice.
//
// Timing: bins arrive at most one per clock in any order of frames but with
// the same bin order in every frame; last_i marks the final bin of a frame.
// The RAM is read in the clock the bin arrives and written in the next, so
// out_* follow their input bin by two clocks. navg_log2_i is sampled at the
// start of each group.
module spectrum_averager #(
  parameter int LOG2_KMAX     = sdr_pkg::LOG2_KMAX,
  parameter int DW            = sdr_pkg::FFT_DW,
  parameter int NAVG_LOG2_MAX = sdr_pkg::NAVG_LOG2_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NAVG_LOG2_MAX+1)-1:0] navg_log2_i,
  input  logic signed [DW-1:0]     re_i,
  input  logic signed [DW-1:0]     im_i,
  input  logic [LOG2_KMAX-1:0]     bin_i,
  input  logic                     valid_i,
  input  logic                     last_i,
  output logic [2*DW-1:0]          pwr_o,
  output logic [LOG2_KMAX-1:0]     bin_o,
  output logic                     valid_o,
  output logic                     last_o
);
  localparam int PW = 2 * DW;
  localparam int AW = PW + NAVG_LOG2_MAX;
  localparam int NW = $clog2(NAVG_LOG2_MAX+1);

  logic [AW-1:0]        acc_ram [1 << LOG2_KMAX];
  logic [AW-1:0]        acc_rd;
  logic [PW-1:0]        p;
  logic [NAVG_LOG2_MAX-1:0] frame;   // frame number inside the group
  logic [NW-1:0]        navg;        // latched at the first frame of a group

  // stage 1 registers
  logic                 s_vld, s_last, s_first, s_final;
  logic [LOG2_KMAX-1:0] s_bin;
  logic [PW-1:0]        s_p;
  logic [AW-1:0]        sum;

  logic                 first_f, final_f;
  logic [NW-1:0]        navg_now;

  always_comb begin
    p        = PW'($unsigned(PW'(re_i) * PW'(re_i))) + PW'($unsigned(PW'(im_i) * PW'(im_i)));
    navg_now = (frame == 0) ? navg_log2_i : navg;
    first_f  = (frame == 0);
    final_f  = (frame == NAVG_LOG2_MAX'((1 << navg_now) - 1));
    sum      = (s_first ? '0 : acc_rd) + AW'(s_p);
  end

  always_ff @(posedge clk) begin
    acc_rd <= acc_ram[bin_i];
    if (s_vld)
      acc_ram[s_bin] <= sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame        <= '0;
      navg         <= '0;
      s_vld        <= 1'b0;
      s_last       <= 1'b0;
      s_first      <= 1'b0;
      s_final      <= 1'b0;
      s_bin        <= '0;
      s_p          <= '0;
      valid_o      <= 1'b0;
      last_o       <= 1'b0;
      bin_o        <= '0;
      pwr_o        <= '0;
    end else begin
      s_vld   <= valid_i;
      s_last  <= valid_i && last_i;
      if (valid_i) begin
        s_bin   <= bin_i;
        s_p     <= p;
        s_first <= first_f;
        s_final <= final_f;
        if (first_f) navg <= navg_log2_i;
        if (last_i)  frame <= final_f ? '0 : frame + 1'b1;
      end
      valid_o      <= s_vld && s_final;
      last_o       <= s_last && s_final;
      if (s_vld && s_final) begin
        bin_o <= s_bin;
        pwr_o <= PW'(sum >> navg);
      end
    end
  end
endmodule
