// Self-checking test of the quadrature mixer: random ADC samples and LO
// values (including the full-scale corners) are multiplied and compared with
// round(x*cos / 2**13) and round(-x*sin / 2**13) computed here; one-clock
// latency is checked.
module tb_ddc_mixer;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] x;
  logic signed [15:0] c, s;
  logic valid_i = 0;
  logic signed [15:0] i_o, q_o;
  logic valid_o;
  int checks = 0, failures = 0;

  ddc_mixer dut (.clk, .rst_n, .x_i(x), .cos_i(c), .sin_i(s), .valid_i, .i_o, .q_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_div(input longint p);
    // round half up of p / 8192
    return int'((p + 4096) >>> 13);
  endfunction

  initial begin
    int ei, eq;
    x = 0; c = 0; s = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k < 4) begin
        x = (k[0]) ? -14'sd8192 : 14'sd8191;
        c = (k[1]) ? -16'sd32767 : 16'sd32767;
        s = (k[1]) ? 16'sd32767 : -16'sd32767;
      end else begin
        x = 14'($urandom); c = 16'($urandom); s = 16'($urandom);
        if (c == -16'sd32768) c = -16'sd32767;
        if (s == -16'sd32768) s = -16'sd32767;
      end
      valid_i = 1;
      ei = rnd_div(longint'(x) * longint'(c));
      eq = rnd_div(-(longint'(x) * longint'(s)));
      @(posedge clk); #1;
      valid_i = 0;
      checks += 3;
      if (!valid_o) begin failures++; $display("valid missing"); end
      if (i_o !== 16'(ei)) begin failures++; $display("I x=%0d c=%0d got %0d exp %0d", x, c, i_o, ei); end
      if (q_o !== 16'(eq)) begin failures++; $display("Q x=%0d s=%0d got %0d exp %0d", x, s, q_o, eq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
