// whm_direct: weighted history model for small alphabets, with one parallel
// up/down counter per symbol. Counter x holds cum(x), the number of history
// entries below x. The cumulative frequency is Q(x) = cum(x) * 2^W_LOG2 + x,
// and the frequency n(x) = occ(x) * 2^W_LOG2 + 1. Because the weight is a
// power of two, the low W_LOG2 bits of every cumulative frequency never
// change. They are the fixed part, given by the symbol index, so the counters
// only need clog2(M+1) bits.
// Update (one cycle): the new symbol 'cur' enters the history shift register
// and the oldest symbol 'prev' leaves. A comparator orders the two. If cur >
// prev, the counters prev+1 .. cur count down. If cur < prev, the counters
// cur+1 .. prev count up. That equals adding W to cur's frequency and taking
// W from prev's. This is the document's small-alphabet model. It counts the
// mirror image (the document's counters hold occurrences above x), which is
// this design's choice. Its ports are those of whm_model, so the same encoder
// and decoder can use it. 'busy' is always low: one update per cycle.
// Lookups and the search (largest x with Q(x) <= target, one comparator per
// symbol) are combinational. The last symbol is tracked by mps_tracker.
module whm_direct #(
  parameter int unsigned NSYM     = 16,
  parameter int unsigned HIST_LEN = 127,
  parameter int unsigned W_LOG2   = 4,
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
    $error("whm_direct: NSYM + HIST_LEN * 2^W_LOG2 must be a power of two");
  end

  logic [CNT_W-1:0] cnt_q [NSYM];
  logic [SYM_W-1:0] tail;

  function automatic logic [CNT_W-1:0] init_cum(int unsigned x);
    return CNT_W'((x * HIST_LEN + NSYM - 1) / NSYM);
  endfunction

  hist_buf #(.NSYM(NSYM), .HIST_LEN(HIST_LEN), .SYM_W(SYM_W)) u_hist (
    .clk, .rst_n, .clear, .shift(upd_valid), .sym_in(upd_sym), .tail
  );

  // Counter x is selected when x lies in (min(cur,prev), max(cur,prev)].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned x = 0; x < NSYM; x++) cnt_q[x] <= init_cum(x);
    end else if (clear) begin
      for (int unsigned x = 0; x < NSYM; x++) cnt_q[x] <= init_cum(x);
    end else if (upd_valid) begin
      for (int unsigned x = 0; x < NSYM; x++) begin
        if (upd_sym > tail && x > tail && x <= upd_sym)      cnt_q[x] <= cnt_q[x] - 1'b1;
        else if (upd_sym < tail && x > upd_sym && x <= tail) cnt_q[x] <= cnt_q[x] + 1'b1;
      end
    end
  end

  function automatic logic [CNT_W-1:0] cum_of(logic [SYM_W:0] x);
    if (x >= (SYM_W+1)'(NSYM)) return CNT_W'(HIST_LEN);
    return cnt_q[x[SYM_W-1:0]];
  endfunction

  function automatic logic [CNT_W-1:0] occ_of(logic [SYM_W-1:0] x);
    return cum_of({1'b0, x} + 1'b1) - cum_of({1'b0, x});
  endfunction

  function automatic logic [FREQ_W-1:0] q_of(logic [SYM_W-1:0] x);
    return (FREQ_W'(cum_of({1'b0, x})) << W_LOG2) + FREQ_W'(x);
  endfunction

  function automatic logic [FREQ_W-1:0] n_of(logic [SYM_W-1:0] x);
    return (FREQ_W'(occ_of(x)) << W_LOG2) + 1'b1;
  endfunction

  assign lk_q  = q_of(lk_sym);
  assign lk_n  = n_of(lk_sym);
  assign mps_q = q_of(mps);
  assign mps_n = n_of(mps);
  assign busy  = 1'b0;

  always_comb begin
    srch_sym = '0;
    for (int unsigned x = 1; x < NSYM; x++)
      if (q_of(SYM_W'(x)) <= srch_t) srch_sym = SYM_W'(x);
  end

  mps_tracker #(.SYM_W(SYM_W), .CNT_W(CNT_W)) u_mps (
    .clk, .rst_n, .clear, .upd(upd_valid), .cur(upd_sym), .prev(tail),
    .occ_cur(occ_of(upd_sym)), .occ_mps(occ_of(mps)), .mps
  );
endmodule
