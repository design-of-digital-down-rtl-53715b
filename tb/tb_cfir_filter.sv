// Self-checking test of the compensating FIR: random samples (with idle gaps)
// are filtered first with the default coefficient set and then with random
// coefficients written through the coefficient port. Every output is compared
// with sum h(k) x(n-k), scaled by 2**-15 with rounding and saturated, computed here.
// One-clock latency and one output per input are checked.
module tb_cfir_filter;
  localparam int T = 21;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [4:0] coef_addr = 0;
  logic signed [17:0] coef_data = 0;
  logic signed [15:0] x = 0;
  logic valid_i = 0;
  logic signed [15:0] y;
  logic valid_o;
  int checks = 0, failures = 0;

  cfir_filter dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_data, .x_i(x), .valid_i, .y_o(y), .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default taps of the design (CIC compensator, 1.0 = 2**15)
  int h [T] = '{-146, 551, -1240, 2226, -3451, 4755, -5838, 6136, -4361, -3811, 43126,
                -3811, -4361, 6136, -5838, 4755, -3451, 2226, -1240, 551, -146};
  longint hist [$];

  task automatic stream(input int n, input bit big);
    longint acc, e;
    for (int i = 0; i < n; i++) begin
      x = big ? ((i % 2) ? 16'sd32767 : -16'sd32768) : 16'($urandom);
      hist.push_front(longint'(x));
      valid_i = 1;
      @(posedge clk); #1;
      valid_i = 0;
      acc = 0;
      for (int k = 0; k < T; k++) if (k < hist.size()) acc += longint'(h[k]) * hist[k];
      e = (acc + 16384) >>> 15;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      checks += 2;
      if (!valid_o) begin failures++; $display("no output"); end
      if (y !== 16'(e)) begin failures++; $display("n=%0d got %0d exp %0d", i, y, e); end
      if (i % 3 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (valid_o) begin failures++; $display("output without input"); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    stream(500, 0);
    // load random coefficients (history of the partial sums is kept, so
    // restart the history by a reset after loading)
    for (int k = 0; k < T; k++) begin
      h[k] = $signed(18'($urandom)) / 2;
      coef_we = 1; coef_addr = 5'(k); coef_data = 18'(h[k]);
      @(posedge clk); #1;
    end
    coef_we = 0;
    // zero history without reset (reset would restore the defaults): flush with zeros
    for (int i = 0; i < T; i++) begin x = 0; valid_i = 1; @(posedge clk); #1; end
    valid_i = 0;
    hist.delete();
    for (int i = 0; i < T; i++) hist.push_front(0);
    stream(500, 0);
    stream(100, 1);   // alternating full scale drives saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
