// End-to-end test of the receiver at its default (full) size.
//
// A 75 MHz IF carrying two tones plus noise is sampled at fs = 100 MHz and
// fed to the top, one ADC sample per clock. Two configurations are run:
//   1. R = 2 (50 MSPS), K = 4096, 4 averaged frames, 12 dB margin;
//   2. R = 4 (25 MSPS), K = 1024, 2 averaged frames, 10 dB margin,
//      after a reset and a reload of the window RAM for the new length.
// The tones sit on bin centres (+246 and -598 bins in run 1, +100 and -200
// in run 2). For each run the test loads a 4-term Blackman-Harris window,
// w[n] = 0.35875 - 0.48829 cos(2 pi n/K) + 0.14128 cos(4 pi n/K)
//        - 0.01168 cos(6 pi n/K), scaled to Q0.16,
// and checks that exactly the two tones are reported, each with its peak on
// the expected bin, that the peak level matches the level predicted from the
// tone amplitude, DDC gain, window coherent gain (0.35875) and FFT scaling
// within 1 dB, that the floor of empty bins is at least 20 dB below the
// tones, and that every bin's threshold equals floor + margin. It also checks
// the DDC output rate (fs/R) and counts the mechanisms the design has:
// decimation by 2 and by 4, FFT lengths 4096 and 1024, power averaging,
// samples dropped while the FFT is busy, FIR coefficient writes, threshold
// crossings and signal reports. A mechanism that never happens is a failure.
module tb_sdr_spectrum_top;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc = 0;
  logic adc_valid = 0;
  logic [31:0] ftw = 32'hC000_0000;   // 75 MHz LO
  logic [1:0] rlog2 = 1;
  logic [3:0] log2k = 12;
  logic [2:0] navg = 2;
  logic signed [15:0] offset = 0, margin = 192;
  logic coef_we = 0;
  logic [4:0] coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic win_we = 0;
  logic [11:0] win_addr = 0;
  logic [15:0] win_data = 0;
  logic signed [15:0] ddc_i, ddc_q;
  logic ddc_valid;
  spec_bin_t spec;
  logic spec_valid, spec_last;
  sig_report_t rep;
  logic rep_valid, fft_busy;
  int checks = 0, failures = 0;

  sdr_spectrum_top dut (
    .clk, .rst_n, .adc_i(adc), .adc_valid_i(adc_valid),
    .cfg_ftw_i(ftw), .cfg_rlog2_i(rlog2), .cfg_log2k_i(log2k), .cfg_navg_log2_i(navg),
    .cfg_offset_i(offset), .cfg_snr_margin_i(margin),
    .coef_we, .coef_addr, .coef_data, .win_we, .win_addr, .win_data,
    .ddc_i_o(ddc_i), .ddc_q_o(ddc_q), .ddc_valid_o(ddc_valid),
    .spec_o(spec), .spec_valid_o(spec_valid), .spec_last_o(spec_last),
    .rep_o(rep), .rep_valid_o(rep_valid), .fft_busy_o(fft_busy));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ddc = 0, n_dropped = 0, n_det_bins = 0, n_reports = 0, n_fft_frames = 0, n_spectra = 0;
  int n_coef_writes = 0, n_r2 = 0, n_r4 = 0, n_k4096 = 0, n_k1024 = 0;
  always @(posedge clk) if (rst_n) begin
    if (ddc_valid) begin
      n_ddc++;
      if (fft_busy) n_dropped++;
      if (rlog2 == 1) n_r2++; else n_r4++;
    end
    if (dut.u_fft.out_valid && dut.u_fft.out_last) begin
      n_fft_frames++;
      if (dut.u_fft.log2k_o == 12) n_k4096++;
      if (dut.u_fft.log2k_o == 10) n_k1024++;
    end
    if (spec_valid && spec.det) n_det_bins++;
    if (coef_we) n_coef_writes++;
  end

  // ---------------- capture of one spectrum ----------------
  int lvl [4096], flr [4096], thr [4096];
  bit det [4096];
  sig_report_t reps [$];
  bit spectrum_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (spec_valid) begin
      lvl[spec.bin] = spec.level; flr[spec.bin] = spec.floor; thr[spec.bin] = spec.thr; det[spec.bin] = spec.det;
      if (spec_last) begin spectrum_done = 1; n_spectra++; end
    end
    if (rep_valid) begin reps.push_back(rep); n_reports++; end
  end

  // ---------------- stimulus ----------------
  real f1, f2, a1, a2;
  int adc_n = 0;
  bit run_adc = 0;
  always @(posedge clk) begin
    if (run_adc) begin
      real v;
      v = a1 * $cos(2 * PI * f1 / 100.0 * adc_n) + a2 * $cos(2 * PI * f2 / 100.0 * adc_n + 1.0);
      // noise: sum of 4 uniforms, about 12 LSB rms
      for (int i = 0; i < 4; i++) v += (real'($urandom % 4096) / 4096.0 - 0.5) * 41.0;
      adc <= 14'($rtoi($floor(v + 0.5)));
      adc_valid <= 1;
      adc_n++;
    end else adc_valid <= 0;
  end

  task automatic load_window(input int lk);
    int k;
    real w;
    k = 1 << lk;
    for (int n = 0; n < k; n++) begin
      w = 0.35875 - 0.48829 * $cos(2 * PI * n / k) + 0.14128 * $cos(4 * PI * n / k)
          - 0.01168 * $cos(6 * PI * n / k);
      win_we <= 1; win_addr <= 12'(n); win_data <= 16'($rtoi($floor(w * 65535.0 + 0.5)));
      @(posedge clk);
    end
    win_we <= 0;
  endtask

  task automatic check_run(input int r, input int lk, input int bin1, input int bin2, input int m);
    int k, b1, b2, hits1, hits2, pk1, pk2, lo_floor;
    real fs_out, exp1, exp2, amp_fft;
    k = 1 << lk;
    b1 = bin1 & (k - 1);
    b2 = bin2 & (k - 1);
    hits1 = 0; hits2 = 0;
    foreach (reps[i]) begin
      checks++;
      if (reps[i].peak_bin >= 12'(b1 - 2) && reps[i].peak_bin <= 12'(b1 + 2)) begin
        hits1++; pk1 = reps[i].peak_level;
        if (reps[i].peak_bin != 12'(b1)) begin failures++; $display("tone 1 peak at %0d, expected %0d", reps[i].peak_bin, b1); end
      end else if (reps[i].peak_bin >= 12'(b2 - 2) && reps[i].peak_bin <= 12'(b2 + 2)) begin
        hits2++; pk2 = reps[i].peak_level;
        if (reps[i].peak_bin != 12'(b2)) begin failures++; $display("tone 2 peak at %0d, expected %0d", reps[i].peak_bin, b2); end
      end else begin
        failures++; $display("false report: bins %0d..%0d peak %0d", reps[i].start, reps[i].stop, reps[i].peak_bin);
      end
    end
    checks += 2;
    if (hits1 != 1) begin failures++; $display("tone 1 reported %0d times", hits1); end
    if (hits2 != 1) begin failures++; $display("tone 2 reported %0d times", hits2); end
    // predicted level: ADC amplitude a -> baseband a/2 * 4 (14 to 16 bit)
    // -> window coherent gain -> FFT output amplitude * 2**7 / K * K
    amp_fft = a1 / 2.0 * 4.0 * 0.35875 * 128.0;
    exp1 = 160.0 * $log10(amp_fft * amp_fft);
    amp_fft = a2 / 2.0 * 4.0 * 0.35875 * 128.0;
    exp2 = 160.0 * $log10(amp_fft * amp_fft);
    checks += 2;
    if (hits1 == 1 && (pk1 - exp1 > 16.0 || exp1 - pk1 > 16.0)) begin failures++; $display("tone 1 level %0d/16 dB, expected %0.1f", pk1, exp1); end
    if (hits2 == 1 && (pk2 - exp2 > 16.0 || exp2 - pk2 > 16.0)) begin failures++; $display("tone 2 level %0d/16 dB, expected %0.1f", pk2, exp2); end
    $display("K=%0d R=%0d: tone levels %0.2f / %0.2f dB (expected %0.2f / %0.2f), floor at bin %0d: %0.2f dB",
             k, r, pk1 / 16.0, pk2 / 16.0, exp1 / 16.0, exp2 / 16.0, b1 + 40, flr[(b1 + 40) % k] / 16.0);
    checks++;
    if (flr[(b1 + 40) % k] > pk2 - 320) begin failures++; $display("noise floor too high"); end
    // every bin: threshold = floor + margin, flag = level > threshold
    for (int b = 0; b < k; b++) begin
      checks++;
      if (thr[b] != flr[b] + m || det[b] != (lvl[b] > thr[b])) begin
        failures++; $display("bin %0d: thr %0d floor %0d det %0d", b, thr[b], flr[b], det[b]);
      end
    end
  endtask

  task automatic rate_check(input int r);
    int t0, c0;
    @(posedge clk iff ddc_valid);
    c0 = n_ddc; t0 = 0;
    repeat (1000 * r) begin @(posedge clk); t0++; end
    checks++;
    if (n_ddc - c0 != 1000) begin failures++; $display("R=%0d: %0d DDC outputs in %0d clocks", r, n_ddc - c0, t0); end
  endtask

  initial begin
    int k;
    // ---------- run 1: R = 2, K = 4096, 4 frames ----------
    repeat (4) @(posedge clk);
    rst_n <= 1;
    load_window(12);
    // rewrite the FIR coefficients through the port (the default set)
    for (int t = 0; t < 21; t++) begin
      coef_we <= 1; coef_addr <= 5'(t); coef_data <= dut.u_ddc.u_fir_i.H_INIT[t];
      @(posedge clk);
    end
    coef_we <= 0;
    f1 = 75.0 + 246.0 * 50.0 / 4096.0;  a1 = 1500.0;
    f2 = 75.0 - 598.0 * 50.0 / 4096.0;  a2 = 400.0;
    run_adc = 1;
    rate_check(2);
    // skip the first spectrum: its first frame saw the filters start up
    wait (spectrum_done); spectrum_done = 0; reps.delete();
    wait (spectrum_done); spectrum_done = 0;
    repeat (5) @(posedge clk);
    check_run(2, 12, 246, -598, 192);

    // ---------- run 2: R = 4, K = 1024, 2 frames ----------
    run_adc = 0;
    rst_n <= 0;
    rlog2 <= 2; log2k <= 10; navg <= 1; margin <= 160;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    reps.delete(); spectrum_done = 0;
    load_window(10);
    f1 = 75.0 + 100.0 * 25.0 / 1024.0;  a1 = 1000.0;
    f2 = 75.0 - 200.0 * 25.0 / 1024.0;  a2 = 300.0;
    run_adc = 1;
    rate_check(4);
    wait (spectrum_done); spectrum_done = 0; reps.delete();
    wait (spectrum_done); spectrum_done = 0;
    repeat (5) @(posedge clk);
    check_run(4, 10, 100, -200, 160);

    // ---------- mechanisms ----------
    $display("mechanisms: R2 outputs %0d, R4 outputs %0d, FFT frames %0d (K=4096: %0d, K=1024: %0d), spectra %0d,",
             n_r2, n_r4, n_fft_frames, n_k4096, n_k1024, n_spectra);
    $display("            dropped while FFT busy %0d, FIR writes %0d, detected bins %0d, reports %0d",
             n_dropped, n_coef_writes, n_det_bins, n_reports);
    checks += 9;
    if (n_r2 == 0)   begin failures++; $display("decimation by 2 never used"); end
    if (n_r4 == 0)   begin failures++; $display("decimation by 4 never used"); end
    if (n_k4096 == 0) begin failures++; $display("K=4096 never used"); end
    if (n_k1024 == 0) begin failures++; $display("K=1024 never used"); end
    if (n_fft_frames < 2 * n_spectra) begin failures++; $display("averaging did not combine frames"); end
    if (n_dropped == 0) begin failures++; $display("no sample dropped while busy"); end
    if (n_coef_writes != 21) begin failures++; $display("FIR coefficient writes %0d", n_coef_writes); end
    if (n_det_bins == 0) begin failures++; $display("no threshold crossing"); end
    if (n_reports == 0) begin failures++; $display("no report"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
