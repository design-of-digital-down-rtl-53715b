// Self-checking test of the FFT engine at its full 4096-point capacity.
// Frames of K = 8, 64, 1024 and 4096 random complex samples (and one single
// tone) are loaded in answer to frame_req_o; every output bin is compared with
// a double-precision DFT computed here, scaled like the engine
// (X[k] / K * 2**7), within a rounding tolerance (a few LSB plus 1e-5 of
// the bin value for twiddle quantisation). Bins must leave in natural
// order, one per clock, with out_last on bin K-1, and the first bin must
// appear log2(K)*(K/2+3) + 4 clocks after the last input sample.
module tb_fft_engine;
  logic clk = 0, rst_n = 0;
  logic [3:0] log2k = 3;
  logic [3:0] log2k_o;
  logic frame_req;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic [11:0] in_idx = 0;
  logic in_valid = 0;
  logic signed [23:0] out_re, out_im;
  logic [11:0] out_bin;
  logic out_valid, out_last, busy;
  int checks = 0, failures = 0;

  fft_engine dut (.clk, .rst_n, .log2k_i(log2k), .log2k_o, .frame_req_o(frame_req),
                  .in_re, .in_im, .in_idx, .in_valid,
                  .out_re, .out_im, .out_bin, .out_valid, .out_last, .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;
  real xr [4096], xi [4096];
  real costab [4096], sintab [4096];
  bit req_seen = 0;
  always @(posedge clk) if (rst_n && frame_req) req_seen = 1;

  task automatic frame(input int lk, input int next_lk, input int kind, input real tol);
    int k, t_last, t_first, cnt;
    real er, ei, maxerr, tl;
    k = 1 << lk;
    for (int m = 0; m < k; m++) begin
      costab[m] = $cos(2 * PI * m / k);
      sintab[m] = $sin(2 * PI * m / k);
    end
    while (!req_seen) begin @(posedge clk); #1; end
    req_seen = 0;
    checks++;
    if (log2k_o != 4'(lk)) begin failures++; $display("length not latched"); end
    for (int n = 0; n < k; n++) begin
      if (kind == 0) begin
        in_re = 16'($urandom); in_im = 16'($urandom);
      end else begin
        in_re = 16'($rtoi($floor(20000.0 * $cos(2 * PI * 5 * n / k) + 0.5)));
        in_im = 16'($rtoi($floor(20000.0 * $sin(2 * PI * 5 * n / k) + 0.5)));
      end
      xr[n] = in_re; xi[n] = in_im;
      in_idx = 12'(n); in_valid = 1;
      @(posedge clk); #1;
      if (n % 9 == 4) begin in_valid = 0; @(posedge clk); #1; end
    end
    in_valid = 0;
    log2k = 4'(next_lk);   // latched at the next request
    t_last = 0;
    while (!out_valid) begin @(posedge clk); #1; t_last++; end
    checks++;
    if (t_last != lk * (k / 2 + 3) + 4) begin
      failures++; $display("K=%0d: first bin after %0d clocks, expected %0d", k, t_last, lk * (k / 2 + 3) + 4);
    end
    maxerr = 0;
    for (int b = 0; b < k; b++) begin
      er = 0; ei = 0;
      for (int n = 0; n < k; n++) begin
        int m;
        m = (n * b) % k;
        er += xr[n] * costab[m] + xi[n] * sintab[m];
        ei += xi[n] * costab[m] - xr[n] * sintab[m];
      end
      er = er / k * 128.0; ei = ei / k * 128.0;
      checks += 3;
      if (!out_valid || out_bin != 12'(b)) begin failures++; $display("K=%0d: bin %0d missing (valid=%0d bin=%0d)", k, b, out_valid, out_bin); end
      if (out_last != (b == k - 1)) begin failures++; $display("last flag"); end
      tl = tol + ((er < 0 ? -er : er) + (ei < 0 ? -ei : ei)) * 1.0e-5;
      if (real'(out_re) - er > tl || er - real'(out_re) > tl ||
          real'(out_im) - ei > tl || ei - real'(out_im) > tl) begin
        failures++;
        if (failures < 10) $display("K=%0d bin %0d: got %0d,%0d exp %0.1f,%0.1f", k, b, out_re, out_im, er, ei);
      end
      if (real'(out_re) - er > maxerr) maxerr = real'(out_re) - er;
      if (er - real'(out_re) > maxerr) maxerr = er - real'(out_re);
      @(posedge clk); #1;
    end
    checks++;
    if (out_valid) begin failures++; $display("extra bins"); end
    $display("K=%0d kind=%0d: max error %0.2f LSB", k, kind, maxerr);
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // tolerance: 2 LSB of rounding per stage
    frame(3, 6, 0, 6.0);
    frame(6, 6, 0, 12.0);
    frame(6, 10, 1, 12.0);
    frame(10, 12, 0, 20.0);
    frame(12, 3, 0, 24.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
