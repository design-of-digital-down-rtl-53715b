// Self-checking test of the CIC decimator for R = 2 and R = 4.
// Reference: the CIC equals an FIR whose impulse response is N boxcars of
// length R convolved; this test computes that response, convolves the input
// history with it at every R-th sample and applies the same rounding shift
// (N*log2 R) and saturation. Checks every output value, the output rate
// (one per R inputs, one clock after the R-th) and unity DC gain.
module tb_cic_decimator;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] rlog2;
  logic signed [15:0] x;
  logic valid_i = 0;
  logic signed [15:0] y;
  logic valid_o;
  int checks = 0, failures = 0;

  cic_decimator dut (.clk, .rst_n, .rlog2_i(rlog2), .x_i(x), .valid_i, .y_o(y), .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];
  longint h [];

  task automatic make_h(input int r);
    longint t [];
    h = new[1];
    h[0] = 1;
    for (int s = 0; s < N; s++) begin
      t = new[h.size() + r - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int k = 0; k < r; k++) t[i+k] += h[i];
      h = t;
    end
  endtask

  task automatic run(input int lr, input int nsamp, input int mode);
    int r, nout, got_out, sh;
    longint acc, e;
    r = 1 << lr;
    sh = N * lr;
    make_h(r);
    rlog2 = 2'(lr);
    rst_n = 0; valid_i = 0; x = 0;
    hist.delete();
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    got_out = 0; nout = 0;
    for (int n = 0; n < nsamp; n++) begin
      case (mode)
        0: x = 16'($urandom);
        1: x = 16'sd20000;                     // DC
        default: x = -16'sd32768;              // negative full scale
      endcase
      // bursts with idle gaps: valid need not be continuous
      valid_i = 1;
      hist.push_front(longint'(x));
      @(posedge clk); #1;
      valid_i = 0;
      if ((n + 1) % r == 0) begin
        acc = 0;
        for (int k = 0; k < h.size(); k++)
          if (N + k < hist.size()) acc += h[k] * hist[N + k];
        e = (sh == 0) ? acc : ((acc + (longint'(1) <<< (sh - 1))) >>> sh);
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        nout++;
        // the output must be present one clock after the R-th input
        checks += 2;
        if (!valid_o) begin failures++; $display("R=%0d: no output after sample %0d", r, n); end
        if (y !== 16'(e)) begin failures++; $display("R=%0d n=%0d got %0d exp %0d", r, n, y, e); end
        if (mode == 1 && n > 4 * h.size()) begin
          checks++;
          if (y !== 16'sd20000) begin failures++; $display("DC gain: %0d", y); end
        end
        if (mode == 2 && n > 4 * h.size()) begin
          checks++;
          if (y !== -16'sd32768) begin failures++; $display("neg full scale: %0d", y); end
        end
      end else begin
        checks++;
        if (valid_o) begin failures++; $display("R=%0d: unexpected output at %0d", r, n); end
      end
      if (valid_o) got_out++;
      if (n % 5 == 2) begin
        @(posedge clk); #1;
        checks++;
        if (valid_o) begin failures++; $display("output during idle"); end
      end
    end
    checks++;
    if (got_out != nsamp / r) begin failures++; $display("rate: %0d outputs for %0d inputs", got_out, nsamp); end
  endtask


  initial begin
    run(1, 3000, 0);
    run(2, 3000, 0);
    run(1, 200, 1);
    run(2, 200, 1);
    run(2, 200, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
