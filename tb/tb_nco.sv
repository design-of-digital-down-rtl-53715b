// Self-checking test of the NCO: for two tuning words, every LO sample is
// compared with round(32767*cos/sin(2*pi*a/1024)), a = top 10 bits of n*ftw,
// and the two-clock latency from `en` to valid_o is checked. `en` is also
// held low for a while to check that the phase only advances when enabled.
module tb_nco;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] ftw;
  logic signed [15:0] cos_o, sin_o;
  logic valid_o;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .en, .ftw, .cos_o, .sin_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(input logic [31:0] ph, input bit is_sin);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(ph[31:22]) / 1024.0;
    return $rtoi($floor(32767.0 * (is_sin ? $sin(a) : $cos(a)) + 0.5));
  endfunction

  task automatic run(input logic [31:0] word, input int n);
    logic [31:0] ph;
    int got;
    ph = 0;
    ftw = word;
    rst_n = 0; en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < n; k++) begin
      // gap every 7th sample: phase must hold
      en <= (k % 7 != 3);
      @(posedge clk);
    end
    en <= 0;
  endtask

  // scoreboard: expected phases queued at each enabled clock
  logic [31:0] exp_ph [$];
  logic [31:0] ph_model;
  int en_time [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      exp_ph.delete(); en_time.delete(); ph_model = 0;
    end else begin
      if (en) begin
        exp_ph.push_back(ph_model);
        en_time.push_back(cyc);
        ph_model = ph_model + ftw;
      end
      if (valid_o) begin
        logic [31:0] p;
        int t;
        p = exp_ph.pop_front();
        t = en_time.pop_front();
        checks += 3;
        if (cos_o !== 16'(ref_val(p, 0))) begin failures++; $display("cos mismatch ph=%h got %0d exp %0d", p, cos_o, ref_val(p,0)); end
        if (sin_o !== 16'(ref_val(p, 1))) begin failures++; $display("sin mismatch ph=%h got %0d exp %0d", p, sin_o, ref_val(p,1)); end
        if (cyc - t != 2) begin failures++; $display("latency %0d", cyc - t); end
      end
    end
  end

  initial begin
    run(32'h1000_0000, 100);     // fs/16
    repeat (4) @(posedge clk);
    run(32'h1234_5679, 3000);    // arbitrary word, exercises the whole table
    repeat (4) @(posedge clk);
    run(32'hC000_0000, 50);      // 75 MHz at fs = 100 MHz
    repeat (4) @(posedge clk);
    if (exp_ph.size() != 0) begin failures++; $display("missing outputs"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
