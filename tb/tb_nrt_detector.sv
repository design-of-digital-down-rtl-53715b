// Self-checking test of the noise-riding-threshold detector. A frame of 200
// bins with a flat floor and random levels, plus runs of bins forced above
// the floor + margin (one at the first bin, one at the last, single-bin and
// wide runs), is streamed. Every bin's threshold (floor + margin, saturated)
// and flag (level > threshold) are checked, and the list of reports (first
// bin, last bin, peak bin, peak level of each run) must equal the runs found
// here. Two margins (10 and 15 dB) are used.
module tb_nrt_detector;
  import sdr_pkg::*;
  localparam int K = 200;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] margin = 160;
  logic signed [15:0] db = 0, fl = 0;
  logic [11:0] bin = 0;
  logic valid_i = 0, last_i = 0;
  spec_bin_t spec;
  logic spec_valid, spec_last;
  sig_report_t rep;
  logic rep_valid;
  int checks = 0, failures = 0;

  nrt_detector dut (.clk, .rst_n, .snr_margin_i(margin), .db_i(db), .floor_i(fl), .bin_i(bin),
                    .valid_i, .last_i, .spec_o(spec), .spec_valid_o(spec_valid), .spec_last_o(spec_last),
                    .rep_o(rep), .rep_valid_o(rep_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lvl [K], flr [K];
  sig_report_t exp_rep [$];
  int nrep = 0;

  always @(negedge clk) if (rst_n && rep_valid) begin
    sig_report_t e;
    nrep++;
    checks++;
    if (exp_rep.size() == 0) begin failures++; $display("unexpected report"); end
    else begin
      e = exp_rep.pop_front();
      if (rep !== e) begin failures++; $display("report %0d..%0d peak %0d/%0d, exp %0d..%0d peak %0d/%0d",
          rep.start, rep.stop, rep.peak_bin, rep.peak_level, e.start, e.stop, e.peak_bin, e.peak_level); end
    end
  end

  task automatic frame(input int m);
    bit det [K];
    int s, pk;
    margin = 16'(m);
    for (int b = 0; b < K; b++) begin
      flr[b] = -1500 + b;
      lvl[b] = flr[b] - 50 + int'($urandom % 100);
    end
    // runs above threshold
    for (int b = 0; b < 3; b++) lvl[b] = flr[b] + m + 10 + b;
    lvl[50] = flr[50] + m + 1;               // just above
    lvl[60] = flr[60] + m;                   // exactly at threshold: not detected
    for (int b = 100; b < 120; b++) lvl[b] = flr[b] + m + 20 + ((b * 37) % 50);
    for (int b = 195; b < K; b++) lvl[b] = flr[b] + m + 5;
    for (int b = 0; b < K; b++) det[b] = lvl[b] > flr[b] + m;
    // expected reports
    for (int b = 0; b < K; b++) begin
      if (det[b] && (b == 0 || !det[b-1])) begin s = b; pk = b; end
      if (det[b] && lvl[b] > lvl[pk]) pk = b;
      if (det[b] && (b == K - 1 || !det[b+1]))
        exp_rep.push_back('{start: 12'(s), stop: 12'(b), peak_bin: 12'(pk), peak_level: 16'(lvl[pk])});
    end
    for (int b = 0; b < K; b++) begin
      db = 16'(lvl[b]); fl = 16'(flr[b]); bin = 12'(b); valid_i = 1; last_i = (b == K - 1);
      @(posedge clk); #1;
      valid_i = 0; last_i = 0;
      checks += 4;
      if (!spec_valid || spec.bin !== 12'(b)) begin failures++; $display("bin %0d not out", b); end
      if (spec.thr !== 16'(flr[b] + m)) begin failures++; $display("thr %0d", b); end
      if (spec.det !== det[b]) begin failures++; $display("det %0d", b); end
      if (spec_last !== (b == K - 1) || spec.level !== 16'(lvl[b]) || spec.floor !== 16'(flr[b])) begin
        failures++; $display("fields %0d", b);
      end
      if (b % 13 == 0) begin @(posedge clk); #1; end
    end
    repeat (3) @(posedge clk); #1;
    checks++;
    if (exp_rep.size() != 0) begin failures++; $display("%0d reports missing", exp_rep.size()); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    frame(160);
    frame(240);
    // threshold saturation
    db = 16'sd32767; fl = 16'sd32700; margin = 16'sd200; bin = 0; valid_i = 1; last_i = 1;
    @(posedge clk); #1; valid_i = 0; last_i = 0;
    checks += 2;
    if (spec.thr !== 16'sd32767) begin failures++; $display("no saturation"); end
    if (spec.det) begin failures++; $display("saturated threshold detected"); end
    checks++;
    if (nrep != 8) begin failures++; $display("%0d reports", nrep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
