// Self-checking test of the window stage: random Q0.16 coefficients are
// loaded for K = 16 and K = 64; after each frame request exactly K samples
// must leave, numbered 0..K-1, each equal to round(x*w[n]/2**16), with
// last_o on n = K-1, two clocks after the sample was accepted; samples before
// a request and after the K-th are dropped.
module tb_window_mult;
  logic clk = 0, rst_n = 0;
  logic win_we = 0;
  logic [11:0] win_addr = 0;
  logic [15:0] win_data = 0;
  logic [3:0] log2k = 4;
  logic frame_req = 0;
  logic signed [15:0] i_i = 0, q_i = 0;
  logic valid_i = 0;
  logic signed [15:0] i_o, q_o;
  logic [11:0] idx_o;
  logic valid_o, last_o;
  int checks = 0, failures = 0;

  window_mult dut (.clk, .rst_n, .win_we, .win_addr, .win_data, .log2k_i(log2k), .frame_req_i(frame_req),
                   .i_i, .q_i, .valid_i, .i_o, .q_o, .idx_o, .valid_o, .last_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] w [4096];
  // expected outputs
  int exp_i [$], exp_q [$], exp_n [$], exp_t [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && valid_o) begin
    int ei, eq, en, et;
    checks += 5;
    if (exp_i.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      ei = exp_i.pop_front(); eq = exp_q.pop_front(); en = exp_n.pop_front(); et = exp_t.pop_front();
      if (i_o !== 16'(ei) || q_o !== 16'(eq)) begin failures++; $display("n=%0d got %0d,%0d exp %0d,%0d", en, i_o, q_o, ei, eq); end
      if (idx_o !== 12'(en)) begin failures++; $display("idx %0d exp %0d", idx_o, en); end
      if (last_o !== (en == (1 << log2k) - 1)) begin failures++; $display("last flag at %0d", en); end
      if (cyc - et != 2) begin failures++; $display("latency %0d", cyc - et); end
    end
  end

  task automatic frame(input int lk, input int nsamp);
    int k;
    k = 1 << lk;
    log2k = 4'(lk);
    for (int a = 0; a < k; a++) begin
      w[a] = 16'($urandom);
      if (a == 0) w[a] = 16'hFFFF;
      win_we = 1; win_addr = 12'(a); win_data = w[a];
      @(posedge clk); #1;
    end
    win_we = 0;
    // samples before the request are dropped
    for (int s = 0; s < 5; s++) begin i_i = 16'($urandom); valid_i = 1; @(posedge clk); #1; end
    valid_i = 0;
    frame_req = 1; @(posedge clk); #1; frame_req = 0;
    for (int s = 0, n = 0; s < nsamp; s++) begin
      i_i = 16'($urandom); q_i = 16'($urandom);
      if (s == 1) begin i_i = -16'sd32768; q_i = 16'sd32767; end
      valid_i = ($urandom % 4 != 0);
      if (valid_i && n < k) begin
        exp_i.push_back(int'((longint'(i_i) * w[n] + 32768) >>> 16));
        exp_q.push_back(int'((longint'(q_i) * w[n] + 32768) >>> 16));
        exp_n.push_back(n);
        exp_t.push_back(cyc);
        n++;
      end
      @(posedge clk); #1;
    end
    valid_i = 0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("%0d outputs missing", exp_i.size()); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    frame(4, 60);
    frame(6, 150);
    frame(4, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
