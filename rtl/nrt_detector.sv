// Noise-riding-threshold (NRT) detector and signal reporter.
//
// For every bin the threshold is NRT = noise floor + SNR margin, and the bin
// is declared occupied when its level is above NRT. This rule, and a margin
// that is set at run time (typically 10 to 15 dB), are the design
// description's. Adjacent occupied bins are merged into one detected signal,
// reported once with its first bin, last bin, and the bin and level of its
// peak; the report format is this implementation's choice.
//
// Interface: levels, floors and the margin are in 1/16 dB. spec_o carries
// every bin (level, floor, threshold, flag) one clock after it arrives. A
// report pulses on rep_valid_o one clock after the first unoccupied bin that
// follows a run, or after the last bin of the frame if the run reaches it.
module nrt_detector #(
  parameter int DBW       = sdr_pkg::DB_W,
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DBW-1:0]    snr_margin_i,
  input  logic signed [DBW-1:0]    db_i,
  input  logic signed [DBW-1:0]    floor_i,
  input  logic [LOG2_KMAX-1:0]     bin_i,
  input  logic                     valid_i,
  input  logic                     last_i,
  output sdr_pkg::spec_bin_t       spec_o,
  output logic                     spec_valid_o,
  output logic                     spec_last_o,
  output sdr_pkg::sig_report_t     rep_o,
  output logic                     rep_valid_o
);
  import sdr_pkg::*;

  logic signed [DBW:0]   thr_w;
  logic signed [DBW-1:0] thr;
  logic                  det;

  always_comb begin
    thr_w = (DBW+1)'(floor_i) + (DBW+1)'(snr_margin_i);
    if (thr_w > (DBW+1)'((1 << (DBW-1)) - 1))  thr = DBW'((1 << (DBW-1)) - 1);
    else if (thr_w < -(DBW+1)'(1 << (DBW-1))) thr = DBW'(-(1 << (DBW-1)));
    else                                       thr = DBW'(thr_w);
    det = db_i > thr;
  end

  logic                  in_run;
  sig_report_t           run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      spec_o       <= '0;
      spec_valid_o <= 1'b0;
      spec_last_o  <= 1'b0;
      rep_o        <= '0;
      rep_valid_o  <= 1'b0;
      in_run       <= 1'b0;
      run          <= '0;
    end else begin
      spec_valid_o <= valid_i;
      spec_last_o  <= valid_i && last_i;
      rep_valid_o  <= 1'b0;
      if (valid_i) begin
        spec_o <= '{bin: bin_i, level: db_i, floor: floor_i, thr: thr, det: det};
        if (det) begin
          if (!in_run || db_i > run.peak_level) begin
            run.peak_bin   <= bin_i;
            run.peak_level <= db_i;
          end
          if (!in_run) run.start <= bin_i;
          run.stop <= bin_i;
          in_run   <= !last_i;
          if (last_i) begin
            rep_valid_o <= 1'b1;
            rep_o       <= '{start: in_run ? run.start : bin_i, stop: bin_i,
                             peak_bin: (!in_run || db_i > run.peak_level) ? bin_i : run.peak_bin,
                             peak_level: (!in_run || db_i > run.peak_level) ? db_i : run.peak_level};
          end
        end else begin
          in_run <= 1'b0;
          if (in_run) begin
            rep_valid_o <= 1'b1;
            rep_o       <= run;
          end
        end
      end
    end
  end
endmodule
