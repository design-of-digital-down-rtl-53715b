// Window stage: frames the DDC output into FFT blocks and applies the window.
//
// Each complex sample is multiplied by a coefficient w[n] read from a RAM of
// 2**LOG2_KMAX unsigned Q0.16 words. As in the design description, the host
// loads the Blackman-Harris coefficients for the chosen FFT length into the
// RAM before the FFT runs (win_we / win_addr / win_data); any other window can
// be loaded the same way. Framing is this implementation's choice: a pulse on
// frame_req_i arms the stage, which then windows the next K = 2**log2k_i valid
// samples, numbering them n = 0 .. K-1, and drops samples until the next
// request. Products are rounded to DW bits.
//
// Timing: i_o/q_o/idx_o appear two clocks after the accepted sample (RAM read,
// multiply); last_o marks n = K-1.
module window_mult #(
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX,
  parameter int DW        = sdr_pkg::IQ_W,
  parameter int WW        = sdr_pkg::WIN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // coefficient RAM write port
  input  logic                    win_we,
  input  logic [LOG2_KMAX-1:0]    win_addr,
  input  logic [WW-1:0]           win_data,
  // frame control
  input  logic [$clog2(LOG2_KMAX+1)-1:0] log2k_i,
  input  logic                    frame_req_i,
  // samples in
  input  logic signed [DW-1:0]    i_i,
  input  logic signed [DW-1:0]    q_i,
  input  logic                    valid_i,
  // windowed samples out
  output logic signed [DW-1:0]    i_o,
  output logic signed [DW-1:0]    q_o,
  output logic [LOG2_KMAX-1:0]    idx_o,
  output logic                    valid_o,
  output logic                    last_o
);
  localparam int PW = DW + WW + 1;

  logic [WW-1:0]          wram [1 << LOG2_KMAX];
  logic [WW-1:0]          w_rd;
  logic                   armed;
  logic [LOG2_KMAX-1:0]   n;
  logic [LOG2_KMAX-1:0]   kmask;
  logic                   take;

  logic signed [DW-1:0]   s_i, s_q;
  logic [LOG2_KMAX-1:0]   s_idx;
  logic                   s_vld, s_last;
  logic signed [PW-1:0]   pi, pq;

  assign kmask = LOG2_KMAX'((1 << log2k_i) - 1);
  assign take  = armed && valid_i;

  always_ff @(posedge clk) begin
    if (win_we)
      wram[win_addr] <= win_data;
    w_rd <= wram[n];
  end

  always_comb begin
    pi = (PW'(s_i) * $signed({1'b0, w_rd}) + (PW'(1) <<< (WW-1))) >>> WW;
    pq = (PW'(s_q) * $signed({1'b0, w_rd}) + (PW'(1) <<< (WW-1))) >>> WW;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      n       <= '0;
      s_vld   <= 1'b0;
      s_last  <= 1'b0;
      valid_o <= 1'b0;
      last_o  <= 1'b0;
      s_i     <= '0;
      s_q     <= '0;
      s_idx   <= '0;
      i_o     <= '0;
      q_o     <= '0;
      idx_o   <= '0;
    end else begin
      // stage 1: accept, RAM read at n
      s_vld  <= take;
      s_last <= take && (n == kmask);
      if (take) begin
        s_i   <= i_i;
        s_q   <= q_i;
        s_idx <= n;
        if (n == kmask) begin
          n     <= '0;
          armed <= 1'b0;
        end else begin
          n <= n + 1'b1;
        end
      end
      if (frame_req_i) begin
        armed <= 1'b1;
        n     <= '0;
      end
      // stage 2: multiply
      valid_o <= s_vld;
      last_o  <= s_last;
      if (s_vld) begin
        i_o   <= DW'(pi);
        q_o   <= DW'(pq);
        idx_o <= s_idx;
      end
    end
  end
endmodule
