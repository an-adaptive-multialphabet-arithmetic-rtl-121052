// whm_model: weighted history modeling unit for the arithmetic coder.
// The probability of symbol x is (O_x * W + 1) / (NSYM + M * W), where O_x is
// how often x occurs among the M most recent symbols and W = 2^W_LOG2 is the
// weight. The weights and sizes are picked so the denominator is a power of
// two (256 + 112 * 16 = 2048 by default), so the coder needs no division.
// Parts:
//   hist_buf    - the M most recent symbols, as a shift register;
//   mbca        - the multibase cumulative occurrence array;
//   mps_tracker - names the "last" symbol, the one given the rest of the range.
// Update: a new symbol 'cur' enters the history and the oldest symbol 'prev'
// leaves. Only these two change the counts. As the document describes, the
// array is updated twice, once per symbol: in the accepting cycle prev's
// occurrence drops by one, and in the next cycle (busy = 1) cur's rises by one.
// Taking prev first keeps every count within 0..M; the order is this design's.
// Read ports (combinational):
//   lk_*   - Q and n of any symbol (encoder symbol or decoder result);
//   mps_*  - Q and n of the last symbol;
//   srch_* - largest symbol whose Q does not exceed a target (decoder).
// TOT_LOG2 = log2(NSYM + M*W) is exported for the coder; a size whose total
// is not a power of two is rejected at elaboration.
module whm_model #(
  parameter int unsigned NBANK    = 16,
  parameter int unsigned BSIZE    = 16,
  parameter int unsigned HIST_LEN = 112,
  parameter int unsigned W_LOG2   = 4,
  parameter int unsigned NSYM     = NBANK * BSIZE,
  parameter int unsigned SYM_W    = $clog2(NSYM),
  parameter int unsigned CNT_W    = $clog2(HIST_LEN + 1),
  parameter int unsigned TOT_LOG2 = $clog2(NSYM + (HIST_LEN << W_LOG2)),
  parameter int unsigned FREQ_W   = TOT_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [SYM_W-1:0]  lk_sym,
  output logic [FREQ_W-1:0] lk_q,
  output logic [FREQ_W-1:0] lk_n,
  output logic [SYM_W-1:0]  mps,
  output logic [FREQ_W-1:0] mps_q,
  output logic [FREQ_W-1:0] mps_n,
  input  logic [FREQ_W-1:0] srch_t,
  output logic [SYM_W-1:0]  srch_sym,
  input  logic              upd_valid,
  input  logic [SYM_W-1:0]  upd_sym,
  output logic              busy
);
  if ((NSYM + (HIST_LEN << W_LOG2)) != (1 << TOT_LOG2)) begin : g_bad_total
    $error("whm_model: NSYM + HIST_LEN * 2^W_LOG2 must be a power of two");
  end

  logic [SYM_W-1:0]  tail, cur_q;
  logic              start;
  logic [CNT_W-1:0]  occ_mps, occ_upd;
  logic [SYM_W-1:0]  m_upd_sym;
  logic              m_upd_up;

  assign start = upd_valid && !busy;

  hist_buf #(.NSYM(NSYM), .HIST_LEN(HIST_LEN), .SYM_W(SYM_W)) u_hist (
    .clk, .rst_n, .clear, .shift(start), .sym_in(upd_sym), .tail
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cur_q <= '0;
    end else if (clear) begin
      busy  <= 1'b0;
    end else begin
      busy <= start;
      if (start) cur_q <= upd_sym;
    end
  end

  // First update: the leaving symbol, -1. Second update: the new symbol, +1.
  assign m_upd_sym = busy ? cur_q : tail;
  assign m_upd_up  = busy;

  mbca #(.NBANK(NBANK), .BSIZE(BSIZE), .HIST_LEN(HIST_LEN), .W_LOG2(W_LOG2),
         .NSYM(NSYM), .SYM_W(SYM_W), .CNT_W(CNT_W), .FREQ_W(FREQ_W)) u_array (
    .clk, .rst_n, .clear,
    .upd_en(start || busy), .upd_sym(m_upd_sym), .upd_up(m_upd_up),
    .a_sym(lk_sym), .a_q(lk_q), .a_n(lk_n),
    .b_sym(mps), .b_q(mps_q), .b_n(mps_n), .b_occ(occ_mps),
    .c_sym(upd_sym), .c_occ(occ_upd),
    .srch_t, .srch_sym
  );

  mps_tracker #(.SYM_W(SYM_W), .CNT_W(CNT_W)) u_mps (
    .clk, .rst_n, .clear, .upd(start), .cur(upd_sym), .prev(tail),
    .occ_cur(occ_upd), .occ_mps(occ_mps), .mps
  );

endmodule
