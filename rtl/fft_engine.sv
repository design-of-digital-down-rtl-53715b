// Complex FFT of programmable length K = 2**log2k_i (up to 2**LOG2_KMAX).
//
// Memory-based radix-2 decimation-in-frequency engine. A frame of K windowed
// samples is written into a complex RAM in natural order, transformed in place
// stage by stage with one butterfly per clock, and read out in natural bin
// order by bit-reversed addressing. The design description asks for an FFT of
// programmable length (4096 points in its example) but not for its structure;
// the in-place engine, the word widths and the scaling are this
// implementation's choices.
//
// Butterfly of stage s (span h = K >> (s+1), pair a, b = a + h, p = a mod h):
//   x[a] <= (x[a] + x[b]) / 2
//   x[b] <= (x[a] - x[b]) * W / 2,   W = exp(-j*2*pi*p*2**s / K)
// Every stage halves the data (rounded), so the output is X[k] / K scaled by
// 2**(DW-IW-1), the shift applied to the input. Twiddles come from a ROM of
// K_MAX/2 entries, round(2**(TW-2) * exp(-j*2*pi*m/K_MAX)), computed at
// elaboration and read with stride K_MAX/K for shorter lengths.
//
// Interface and timing: frame_req_o pulses when the engine starts waiting for
// a frame; log2k_o is the length latched at that moment. Samples are written
// at in_idx while in_valid; the sample with in_idx = K-1 starts the transform.
// A frame takes K load cycles (set by the input rate), log2(K) * (K/2 + 3)
// compute cycles and K + 1 unload cycles, during which one bin per clock leaves
// on out_* (out_last on bin K-1). Input arriving while busy is ignored.
module fft_engine #(
  parameter int LOG2_KMAX = sdr_pkg::LOG2_KMAX,
  parameter int IW        = sdr_pkg::IQ_W,
  parameter int DW        = sdr_pkg::FFT_DW,
  parameter int TW        = sdr_pkg::TW_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(LOG2_KMAX+1)-1:0] log2k_i,
  output logic [$clog2(LOG2_KMAX+1)-1:0] log2k_o,
  output logic                   frame_req_o,
  input  logic signed [IW-1:0]   in_re,
  input  logic signed [IW-1:0]   in_im,
  input  logic [LOG2_KMAX-1:0]   in_idx,
  input  logic                   in_valid,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im,
  output logic [LOG2_KMAX-1:0]   out_bin,
  output logic                   out_valid,
  output logic                   out_last,
  output logic                   busy_o
);
  localparam int KMAX = 1 << LOG2_KMAX;
  localparam int LW   = $clog2(LOG2_KMAX+1);
  localparam int AW   = LOG2_KMAX;
  localparam int IN_SH = DW - IW - 1;

  typedef enum logic [1:0] {S_REQ, S_LOAD, S_CALC, S_OUT} state_t;
  state_t state;

  // ---------------- memories ----------------
  logic signed [DW-1:0] mem_re [KMAX];
  logic signed [DW-1:0] mem_im [KMAX];
  typedef logic signed [TW-1:0] twiddle_t [KMAX/2];

  // part = 0: real part round(2**(TW-2) cos), 1: imaginary part -round(2**(TW-2) sin)
  function automatic twiddle_t make_twiddles(input bit part);
    twiddle_t t;
    for (int m = 0; m < KMAX/2; m++) begin
      real ph;
      ph = 2.0 * 3.14159265358979323846 * real'(m) / real'(KMAX);
      t[m] = TW'($rtoi($floor((part ? -real'(1 << (TW-2)) * $sin(ph)
                                    :  real'(1 << (TW-2)) * $cos(ph)) + 0.5)));
    end
    return t;
  endfunction

  localparam twiddle_t TW_RE = make_twiddles(1'b0);
  localparam twiddle_t TW_IM = make_twiddles(1'b1);

  logic [AW-1:0]        ra, rb, wa, wb;
  logic                 wea, web;
  logic signed [DW-1:0] da_re, da_im, db_re, db_im;
  logic signed [DW-1:0] qa_re, qa_im, qb_re, qb_im;
  logic [AW-2:0]        tw_addr;
  logic signed [TW-1:0] w_re, w_im;

  always_ff @(posedge clk) begin
    if (wea) begin
      mem_re[wa] <= da_re;
      mem_im[wa] <= da_im;
    end
    if (web) begin
      mem_re[wb] <= db_re;
      mem_im[wb] <= db_im;
    end
    qa_re <= mem_re[ra];
    qa_im <= mem_im[ra];
    qb_re <= mem_re[rb];
    qb_im <= mem_im[rb];
    w_re  <= TW_RE[tw_addr];
    w_im  <= TW_IM[tw_addr];
  end

  // ---------------- control ----------------
  logic [LW-1:0]   L;          // latched log2 K
  logic [LW-1:0]   s;          // stage
  logic [AW-1:0]   j;          // butterfly (compute) or bin (unload) counter
  logic [1:0]      drain;
  logic [AW-1:0]   kmask;
  logic            issue;      // a butterfly is issued this clock
  logic            p1_vld;
  logic [AW-1:0]   p1_a, p1_b;
  logic            u1_vld, u1_last;
  logic [AW-1:0]   u1_bin;

  assign kmask   = AW'((1 << L) - 1);
  assign log2k_o = L;
  assign busy_o  = (state == S_CALC) || (state == S_OUT);

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v, input logic [LW-1:0] n);
    logic [AW-1:0] r;
    for (int i = 0; i < AW; i++) r[i] = v[AW-1-i];
    return r >> (AW - int'(n));
  endfunction

  // butterfly addresses of counter j in stage s
  logic [AW-1:0] span, ia, ib, pos;
  logic [LW-1:0] sh_hi;
  always_comb begin
    sh_hi = L - 1'b1 - s;                         // log2 span
    span  = AW'(1) << sh_hi;
    pos   = j & (span - 1'b1);
    ia    = ((j >> sh_hi) << (sh_hi + 1'b1)) | pos;
    ib    = ia | span;
    tw_addr = (AW-1)'(pos << (s + (LW'(LOG2_KMAX) - L)));
    issue = (state == S_CALC) && (drain == 2'd0);
  end

  always_comb begin
    ra = ia;
    rb = ib;
    if (state == S_OUT) ra = bitrev(j, L);
  end

  // ---------------- butterfly datapath ----------------
  localparam int XW = DW + 1;
  localparam int MW = XW + TW;
  logic signed [XW-1:0] sr, si, dr, di;
  logic signed [MW-1:0] mr, mi;
  logic signed [DW-1:0] bf_a_re, bf_a_im, bf_b_re, bf_b_im;

  always_comb begin
    sr = XW'(qa_re) + XW'(qb_re);
    si = XW'(qa_im) + XW'(qb_im);
    dr = XW'(qa_re) - XW'(qb_re);
    di = XW'(qa_im) - XW'(qb_im);
    mr = MW'(dr) * MW'(w_re) - MW'(di) * MW'(w_im);
    mi = MW'(dr) * MW'(w_im) + MW'(di) * MW'(w_re);
    bf_a_re = DW'((sr + XW'(1)) >>> 1);
    bf_a_im = DW'((si + XW'(1)) >>> 1);
    bf_b_re = DW'((mr + (MW'(1) <<< (TW-2))) >>> (TW-1));
    bf_b_im = DW'((mi + (MW'(1) <<< (TW-2))) >>> (TW-1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_REQ;
      frame_req_o <= 1'b0;
      L           <= LW'(LOG2_KMAX);
      s           <= '0;
      j           <= '0;
      drain       <= '0;
      p1_vld      <= 1'b0;
      u1_vld      <= 1'b0;
      u1_last     <= 1'b0;
      u1_bin      <= '0;
      p1_a        <= '0;
      p1_b        <= '0;
      wea         <= 1'b0;
      web         <= 1'b0;
      wa          <= '0;
      wb          <= '0;
      da_re       <= '0;
      da_im       <= '0;
      db_re       <= '0;
      db_im       <= '0;
      out_valid   <= 1'b0;
      out_last    <= 1'b0;
      out_bin     <= '0;
      out_re      <= '0;
      out_im      <= '0;
    end else begin
      frame_req_o <= 1'b0;
      wea         <= 1'b0;
      web         <= 1'b0;
      p1_vld      <= 1'b0;
      u1_vld      <= 1'b0;
      u1_last     <= 1'b0;
      out_valid   <= 1'b0;
      out_last    <= 1'b0;
      if (drain != 0) drain <= drain - 1'b1;

      // write-back of the butterfly issued two clocks earlier
      if (p1_vld) begin
        wea   <= 1'b1;
        web   <= 1'b1;
        wa    <= p1_a;
        wb    <= p1_b;
        da_re <= bf_a_re;
        da_im <= bf_a_im;
        db_re <= bf_b_re;
        db_im <= bf_b_im;
      end

      // unload pipeline: RAM read registered, then presented
      if (u1_vld) begin
        out_valid <= 1'b1;
        out_last  <= u1_last;
        out_bin   <= u1_bin;
        out_re    <= qa_re;
        out_im    <= qa_im;
      end

      unique case (state)
        S_REQ: begin
          L           <= (log2k_i == 0) ? LW'(1) :
                         (log2k_i > LW'(LOG2_KMAX)) ? LW'(LOG2_KMAX) : log2k_i;
          frame_req_o <= 1'b1;
          state       <= S_LOAD;
        end
        S_LOAD: begin
          if (in_valid) begin
            wea   <= 1'b1;
            wa    <= in_idx;
            da_re <= DW'(in_re) <<< IN_SH;
            da_im <= DW'(in_im) <<< IN_SH;
            if ((in_idx & kmask) == kmask) begin
              state <= S_CALC;
              s     <= '0;
              j     <= '0;
              drain <= 2'd2;     // let the last sample reach the RAM
            end
          end
        end
        S_CALC: begin
          if (issue) begin
            p1_vld <= 1'b1;
            p1_a   <= ia;
            p1_b   <= ib;
            if (j == (kmask >> 1)) begin
              j     <= '0;
              drain <= 2'd3;     // finish write-back before the next stage reads
              if (s == L - 1'b1) state <= S_OUT;
              else               s <= s + 1'b1;
            end else begin
              j <= j + 1'b1;
            end
          end
        end
        S_OUT: begin
          if (drain == 0) begin
            u1_vld  <= 1'b1;
            u1_bin  <= j;
            u1_last <= (j == kmask);
            if (j == kmask) begin
              j     <= '0;
              state <= S_REQ;
            end else begin
              j <= j + 1'b1;
            end
          end
        end
        default: state <= S_REQ;
      endcase
    end
  end

  // the two butterfly writes of one clock never collide
  assert property (@(posedge clk) disable iff (!rst_n) (wea && web) |-> (wa != wb));
endmodule
