// Self-checking test of the power-to-dBm converter: powers spanning the whole
// 48-bit range (random, powers of two, zero) are converted; each result must
// be within 1/16 dB (one LSB) of 16 * 10*log10(P) + offset computed in double
// precision, P = 0 must give offset - 16, saturation at the top of the 16-bit
// range is exercised with a large offset, and the latency must be 3 clocks.
module tb_log_dbm;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] offset = 0;
  logic [47:0] p = 0;
  logic [11:0] bin = 0;
  logic valid_i = 0, last_i = 0;
  logic signed [15:0] db;
  logic [11:0] bin_o;
  logic valid_o, last_o;
  int checks = 0, failures = 0;

  log_dbm dut (.clk, .rst_n, .offset_i(offset), .pwr_i(p), .bin_i(bin), .valid_i, .last_i,
               .db_o(db), .bin_o, .valid_o, .last_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real maxerr = 0;

  task automatic one(input logic [47:0] v, input int off);
    real e;
    int ei;
    p = v; offset = 16'(off); valid_i = 1; bin = 12'($urandom); last_i = v[0];
    @(posedge clk); #1;
    valid_i = 0;
    repeat (2) begin
      checks++;
      if (valid_o) begin failures++; $display("early output"); end
      @(posedge clk); #1;
    end
    if (v == 0) e = off - 16;
    else e = 160.0 * $log10(real'(v)) + off;
    if (e > 32767) e = 32767;
    checks += 3;
    if (!valid_o) begin failures++; $display("no output after 3 clocks"); end
    if (bin_o !== bin || last_o !== v[0]) begin failures++; $display("bin/last not carried"); end
    if (real'(db) - e > 1.0 || e - real'(db) > 1.0) begin
      failures++; $display("P=%0d: got %0d exp %0.2f", v, db, e);
    end
    if (real'(db) - e > maxerr) maxerr = real'(db) - e;
    if (e - real'(db) > maxerr) maxerr = e - real'(db);
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    one(0, 0);
    one(0, -100);
    for (int b = 0; b < 48; b++) one(48'(1) << b, 0);
    for (int b = 0; b < 48; b++) one((48'(1) << b) - 1, 37);
    for (int i = 0; i < 500; i++) one({16'($urandom), 32'($urandom)} >> ($urandom % 48), -480);
    one(48'hFFFF_FFFF_FFFF, 32000);  // saturates
    $display("max error %0.3f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
