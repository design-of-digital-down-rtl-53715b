// Self-checking test of the median noise-floor estimator (W = 15).
// Frames of random levels (with narrow strong "signals" added) of K = 40,
// 100 and 9 bins (shorter than the window) are streamed, with idle gaps
// inside a frame. For every bin the floor must equal the lower median of the
// levels of bins max(0, b-7) .. min(K-1, b+7), sorted here; the level, bin
// number and last flag must pass through, and every bin must come out.
module tb_noise_floor_median;
  localparam int H = 7;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] db = 0;
  logic [11:0] bin = 0;
  logic valid_i = 0, last_i = 0;
  logic signed [15:0] db_o, floor_o;
  logic [11:0] bin_o;
  logic valid_o, last_o;
  int checks = 0, failures = 0;

  noise_floor_median dut (.clk, .rst_n, .db_i(db), .bin_i(bin), .valid_i, .last_i,
                          .db_o, .floor_o, .bin_o, .valid_o, .last_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lvl [200];
  int exp_db [$], exp_fl [$], exp_bin [$], exp_last [$];
  int nout = 0;

  always @(negedge clk) if (rst_n && valid_o) begin
    nout++;
    checks += 4;
    if (exp_db.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e_db, e_fl, e_b, e_l;
      e_db = exp_db.pop_front(); e_fl = exp_fl.pop_front(); e_b = exp_bin.pop_front(); e_l = exp_last.pop_front();
      if (db_o !== 16'(e_db)) begin failures++; $display("level bin %0d", e_b); end
      if (floor_o !== 16'(e_fl)) begin failures++; $display("bin %0d floor %0d exp %0d", e_b, floor_o, e_fl); end
      if (bin_o !== 12'(e_b)) begin failures++; $display("bin %0d exp %0d", bin_o, e_b); end
      if (last_o !== 1'(e_l)) begin failures++; $display("last at %0d", e_b); end
    end
  end

  task automatic frame(input int k);
    int lo, hi, n, tmp;
    int win [$];
    for (int b = 0; b < k; b++) begin
      lvl[b] = -1200 + int'($urandom % 64);
      if ($urandom % 10 == 0) lvl[b] += 400;      // sparse signals
    end
    for (int b = 0; b < k; b++) begin
      lo = (b - H < 0) ? 0 : b - H;
      hi = (b + H > k - 1) ? k - 1 : b + H;
      win.delete();
      for (int i = lo; i <= hi; i++) win.push_back(lvl[i]);
      win.sort();
      exp_db.push_back(lvl[b]);
      exp_fl.push_back(win[(win.size() - 1) / 2]);
      exp_bin.push_back(b);
      exp_last.push_back(b == k - 1);
    end
    for (int b = 0; b < k; b++) begin
      db = 16'(lvl[b]); bin = 12'(b); valid_i = 1; last_i = (b == k - 1);
      @(posedge clk); #1;
      valid_i = 0; last_i = 0;
      if (b % 11 == 5) begin @(posedge clk); #1; end
    end
    repeat (H + 3) @(posedge clk); #1;
    checks++;
    if (exp_db.size() != 0) begin failures++; $display("%0d bins missing", exp_db.size()); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    frame(40);
    frame(100);
    frame(9);
    frame(40);
    checks++;
    if (nout != 189) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
