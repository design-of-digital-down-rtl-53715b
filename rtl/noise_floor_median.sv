// Noise-floor estimator: sliding median of the dB spectrum across frequency.
//
// The bins of one averaged spectrum stream through a W-tap shift register.
// When a bin reaches the centre tap, the median of the taps around it is its
// noise floor: narrow signals occupy few bins of the window and so do not lift
// the median, while the floor still follows slow changes of the noise level
// across the band. Estimating the floor by median filtering is the design
// description's; the window width W and the edge rule are this
// implementation's choices. Near the band edges the window holds fewer valid
// bins and the lower median of those is taken.
//
// The median is rank-based: every valid tap counts the valid taps that are
// smaller (ties broken by position) and the tap whose count equals
// (valid - 1) / 2 is chosen. W*(W-1) comparators, no sorting state.
//
// Timing: a bin leaves (db_o with its floor_o) one clock after the bin H =
// (W-1)/2 places behind it has arrived. After last_i the block shifts in H
// empty taps on its own, one per clock, to push out the final bins; no input
// may arrive during those H clocks (checked by an assertion).
module noise_floor_median #(
  parameter int W         = sdr_pkg::MED_W,
  parameter int DBW       = sdr_pkg::DB_W,
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DBW-1:0]  db_i,
  input  logic [LOG2_KMAX-1:0]   bin_i,
  input  logic                   valid_i,
  input  logic                   last_i,
  output logic signed [DBW-1:0]  db_o,
  output logic signed [DBW-1:0]  floor_o,
  output logic [LOG2_KMAX-1:0]   bin_o,
  output logic                   valid_o,
  output logic                   last_o
);
  localparam int H  = (W - 1) / 2;
  localparam int CW = $clog2(W + 1);

  typedef struct packed {
    logic                  vld;
    logic                  last;
    logic [LOG2_KMAX-1:0]  bin;
    logic signed [DBW-1:0] db;
  } tap_t;

  tap_t          taps [W];
  logic [CW-1:0] flush;
  logic          shifted;
  logic          do_shift;

  assign do_shift = valid_i || (flush != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < W; t++) taps[t] <= '0;
      flush   <= '0;
      shifted <= 1'b0;
    end else begin
      shifted <= do_shift;
      if (do_shift) begin
        for (int t = W-1; t > 0; t--) taps[t] <= taps[t-1];
        if (flush != 0) begin
          taps[0] <= '0;
          flush   <= flush - 1'b1;
        end else begin
          taps[0] <= '{vld: 1'b1, last: last_i, bin: bin_i, db: db_i};
          if (last_i) flush <= CW'(H);
        end
      end
    end
  end

  // rank-based median over the valid taps
  logic [CW-1:0]         rank [W];
  logic [CW-1:0]         nvalid;
  logic signed [DBW-1:0] med;
  always_comb begin
    nvalid = '0;
    for (int t = 0; t < W; t++) nvalid += CW'(taps[t].vld);
    med = taps[H].db;
    for (int i = 0; i < W; i++) begin
      rank[i] = '0;
      for (int k = 0; k < W; k++)
        if (k != i && taps[k].vld &&
            ((taps[k].db < taps[i].db) || (taps[k].db == taps[i].db && k < i)))
          rank[i] += 1'b1;
    end
    for (int i = 0; i < W; i++)
      if (taps[i].vld && rank[i] == ((nvalid - 1'b1) >> 1)) med = taps[i].db;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      last_o  <= 1'b0;
      db_o    <= '0;
      floor_o <= '0;
      bin_o   <= '0;
    end else begin
      valid_o <= shifted && taps[H].vld;
      last_o  <= shifted && taps[H].vld && taps[H].last;
      if (shifted && taps[H].vld) begin
        db_o    <= taps[H].db;
        floor_o <= med;
        bin_o   <= taps[H].bin;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (flush != 0) |-> !valid_i);
endmodule
