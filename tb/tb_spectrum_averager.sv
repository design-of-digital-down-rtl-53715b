// Self-checking test of the spectrum averager: groups of 1, 4 and 16 frames
// of random bins (K = 32, bins sent with idle gaps) must produce exactly one
// output frame per group, in bin order, each value equal to
// floor(sum of re**2 + im**2 over the group / frames), computed here.
// Full-scale inputs check that the power and the sum do not overflow, and the
// two-clock latency from the last frame's bin to its output is checked.
module tb_spectrum_averager;
  localparam int K = 32;
  logic clk = 0, rst_n = 0;
  logic [2:0] navg = 0;
  logic signed [23:0] re = 0, im = 0;
  logic [11:0] bin = 0;
  logic valid_i = 0, last_i = 0;
  logic [47:0] pwr;
  logic [11:0] bin_o;
  logic valid_o, last_o;
  int checks = 0, failures = 0;

  spectrum_averager dut (.clk, .rst_n, .navg_log2_i(navg), .re_i(re), .im_i(im), .bin_i(bin),
                         .valid_i, .last_i, .pwr_o(pwr), .bin_o, .valid_o, .last_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] acc [K];
  logic [63:0] expq [$];
  int expb [$], expt [$];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && valid_o) begin
    logic [63:0] e; int b, t;
    nout++;
    checks += 4;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front(); b = expb.pop_front(); t = expt.pop_front();
      if (pwr !== 48'(e)) begin failures++; $display("bin %0d got %0d exp %0d", b, pwr, e); end
      if (bin_o !== 12'(b)) begin failures++; $display("bin %0d exp %0d", bin_o, b); end
      if (last_o !== (b == K - 1)) begin failures++; $display("last"); end
      if (cyc - t != 2) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  task automatic group(input int lg, input bit full);
    int nf;
    nf = 1 << lg;
    navg = 3'(lg);
    for (int f = 0; f < nf; f++) begin
      for (int b = 0; b < K; b++) begin
        if (full) begin re = -24'sd8388608; im = -24'sd8388608; end
        else begin re = 24'($urandom); im = 24'($urandom); end
        if (f == 0) acc[b] = 0;
        acc[b] += 64'(longint'(re) * longint'(re)) + 64'(longint'(im) * longint'(im));
        bin = 12'(b); valid_i = 1; last_i = (b == K - 1);
        if (f == nf - 1) begin expq.push_back(acc[b] >> lg); expb.push_back(b); expt.push_back(cyc); end
        @(posedge clk); #1;
        valid_i = 0; last_i = 0;
        if (b % 7 == 3) begin @(posedge clk); #1; end
      end
      repeat (5) @(posedge clk); #1;
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing outputs"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    group(0, 0);
    group(2, 0);
    group(4, 0);
    group(4, 1);
    group(1, 0);
    checks++;
    if (nout != 5 * K) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
