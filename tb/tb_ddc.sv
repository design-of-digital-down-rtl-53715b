// End-to-end test of the DDC (NCO, mixer, CIC, CFIR) for R = 2 and R = 4.
// A real tone at 75 MHz + delta, sampled at fs = 100 MHz, is mixed with a
// 75 MHz LO. The baseband output must be a complex tone at +delta: after
// settling, the mean phase advance per output sample must match
// 2*pi*delta*R/fs and the mean amplitude must match amp/2 times the CIC and
// CFIR gain at that frequency (computed here from their formulas) within
// 0.5 dB. A 100 MHz input (constant after sampling) lands at +25 MHz, on a
// null of the R = 4 CIC, and must be removed. The output rate fs/R is checked.
module tb_ddc;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc = 0;
  logic adc_valid = 0;
  logic [1:0] rlog2;
  logic signed [15:0] i_o, q_o;
  logic valid_o;
  int checks = 0, failures = 0;

  ddc dut (.clk, .rst_n, .adc_i(adc), .adc_valid_i(adc_valid), .ftw_i(32'hC000_0000), .rlog2_i(rlog2),
           .coef_we(1'b0), .coef_addr(5'd0), .coef_data(18'sd0),
           .i_o, .q_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;
  int hq [21] = '{-146, 551, -1240, 2226, -3451, 4755, -5838, 6136, -4361, -3811, 43126,
                -3811, -4361, 6136, -5838, 4755, -3451, 2226, -1240, 551, -146};

  // magnitude of CIC (N=4) times CFIR at baseband frequency f (fraction of fs)
  function automatic real gain(input real f, input int r);
    real c, fr, re, im;
    c = (f == 0.0) ? 1.0 : $sin(PI * f * r) / (r * $sin(PI * f));
    c = c * c * c * c;
    if (c < 0) c = -c;
    fr = f * r;
    re = 0; im = 0;
    for (int k = 0; k < 21; k++) begin
      re += hq[k] / 32768.0 * $cos(2 * PI * fr * k);
      im -= hq[k] / 32768.0 * $sin(2 * PI * fr * k);
    end
    return c * $sqrt(re * re + im * im);
  endfunction

  task automatic run(input int lr, input real f_in_mhz, input real amp, input bit expect_pass);
    int r, n, nout, t0, t1;
    real prev_ph, ph, dph, mag, exp_dph, exp_mag, sum_mag, sum_dph, d;
    int cnt;
    r = 1 << lr;
    rlog2 = 2'(lr);
    rst_n = 0; adc_valid = 0;
    repeat (4) @(posedge clk); #1;
    rst_n = 1;
    nout = 0; cnt = 0; sum_mag = 0; sum_dph = 0; prev_ph = 0;
    t0 = 0; t1 = 0;
    for (n = 0; n < 6000; n++) begin
      adc = 14'($rtoi($floor(amp * $cos(2 * PI * f_in_mhz / 100.0 * n) + 0.5)));
      adc_valid = 1;
      @(posedge clk); #1;
      if (valid_o) begin
        nout++;
        if (nout == 200) t0 = n;
        if (nout == 1200) t1 = n;
        ph = $atan2(real'(q_o), real'(i_o));
        mag = $sqrt(real'(i_o) * i_o + real'(q_o) * q_o);
        if (nout > 200) begin
          d = ph - prev_ph;
          while (d > PI) d -= 2 * PI;
          while (d < -PI) d += 2 * PI;
          sum_dph += d; sum_mag += mag; cnt++;
        end
        prev_ph = ph;
      end
    end
    adc_valid = 0;
    // rate: 1000 outputs in 1000*R input clocks
    checks++;
    if (t1 - t0 != 1000 * r) begin failures++; $display("R=%0d: rate %0d clocks per 1000 outputs", r, t1 - t0); end
    exp_dph = 2 * PI * (f_in_mhz - 75.0) / 100.0 * r;
    while (exp_dph > PI) exp_dph -= 2 * PI;
    exp_mag = amp / 2.0 * (32767.0 / 32768.0) * 4.0 * gain((f_in_mhz - 75.0) / 100.0, r);
    // amp/2 from the real tone, *4: 14-bit input to 16-bit output scaling
    checks++;
    if (expect_pass) begin
      if (((sum_dph / cnt - exp_dph) > 0.01 || (sum_dph / cnt - exp_dph) < -0.01)) begin
        failures++; $display("R=%0d f=%f: phase step %f exp %f", r, f_in_mhz, sum_dph / cnt, exp_dph);
      end
      checks++;
      if ((20 * $log10((sum_mag / cnt) / exp_mag) > 0.5 || 20 * $log10((sum_mag / cnt) / exp_mag) < -0.5)) begin
        failures++; $display("R=%0d f=%f: magnitude %f exp %f", r, f_in_mhz, sum_mag / cnt, exp_mag);
      end
    end else begin
      if (sum_mag / cnt > amp * 2.0 * 0.01) begin
        failures++; $display("R=%0d f=%f: not attenuated, %f", r, f_in_mhz, sum_mag / cnt);
      end
    end
    $display("R=%0d f_in=%0.3f MHz: |y|=%0.1f (model %0.1f)", r, f_in_mhz, sum_mag / cnt, exp_mag);
  endtask

  initial begin
    run(1, 78.125, 6000.0, 1);   // +3.125 MHz, 50 MSPS
    run(1, 70.0, 6000.0, 1);     // -5 MHz
    run(1, 94.0, 6000.0, 1);     // +19 MHz: edge of the 40 MHz band
    run(2, 77.0, 6000.0, 1);     // +2 MHz, 25 MSPS
    run(2, 71.5, 8000.0, 1);     // -3.5 MHz
    run(2, 75.0 + 25.0, 6000.0, 0); // 100 MHz input: +25 MHz, falls on a CIC null at R = 4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
