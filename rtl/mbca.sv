// mbca: multibase cumulative occurrence array.
// It holds, for every symbol x of an NSYM-symbol alphabet, the cumulative
// occurrence cum(x) = number of history entries holding a symbol below x, and
// gives the cumulative frequency Q(x) = cum(x) * 2^W_LOG2 + x and the
// frequency n(x) = occ(x) * 2^W_LOG2 + 1 used by the coder.
//
// The alphabet is split into NBANK banks of BSIZE symbols. Bank b keeps its
// "base" cum(b*BSIZE) in an up/down counter and, in a small RAM word, the
// BSIZE-1 differences cum(b*BSIZE + j) - base for j = 1..BSIZE-1. A change of
// one symbol's occurrence by +-1 touches every cum(x) with x above that symbol.
// It is done in one clock: two 4-to-16 decoders (the document's PLAs) pick the
// bases above the symbol's bank and the entries above its offset. Every
// selected base counts; the symbol's bank word is read into BSIZE-1 counters,
// updated and written back. Each entry only needs CNT_W = clog2(HIST_LEN+1)
// bits, 7 for the default model.
//
// Three read ports (combinational) add a base to a bank entry to return
// Q(x) and n(x). The search port finds the largest x with Q(x) <= target in two
// levels. First NBANK comparators against the bank bases pick the bank, then
// BSIZE-1 comparators inside that bank pick the symbol: 32 comparators instead
// of 256. The banking, the base/difference split and the comparator count
// follow the document. Carrying the fixed "+1" part of each frequency as the
// symbol index, so the array holds occurrences only, also follows it. Its
// ordering is this design's choice: cum(x) counts the symbols below x.
// The document's counters count the symbols above x, the mirror image.
// Comparing full-width Q values, not CNT_W-bit ones, is also this design's.
//
// Interface: upd_en with upd_sym and upd_up (1: occurrence +1, 0: -1).
// 'clear' or reset loads the counts of hist_buf's initial contents.
// Timing: reads and search are combinational; an update takes effect at the
// next clock edge.
module mbca #(
  parameter int unsigned NBANK    = 16,
  parameter int unsigned BSIZE    = 16,
  parameter int unsigned HIST_LEN = 112,
  parameter int unsigned W_LOG2   = 4,
  parameter int unsigned NSYM     = NBANK * BSIZE,
  parameter int unsigned SYM_W    = $clog2(NSYM),
  parameter int unsigned CNT_W    = $clog2(HIST_LEN + 1),
  parameter int unsigned FREQ_W   = $clog2(NSYM + (HIST_LEN << W_LOG2)) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // update
  input  logic              upd_en,
  input  logic [SYM_W-1:0]  upd_sym,
  input  logic              upd_up,
  // read ports: a (lookup), b (last symbol), c (symbol being updated)
  input  logic [SYM_W-1:0]  a_sym,
  output logic [FREQ_W-1:0] a_q,
  output logic [FREQ_W-1:0] a_n,
  input  logic [SYM_W-1:0]  b_sym,
  output logic [FREQ_W-1:0] b_q,
  output logic [FREQ_W-1:0] b_n,
  output logic [CNT_W-1:0]  b_occ,
  input  logic [SYM_W-1:0]  c_sym,
  output logic [CNT_W-1:0]  c_occ,
  // search port
  input  logic [FREQ_W-1:0] srch_t,
  output logic [SYM_W-1:0]  srch_sym
);
  localparam int unsigned BANK_W = $clog2(NBANK);
  localparam int unsigned OFF_W  = $clog2(BSIZE);

  if (NSYM != (1 << SYM_W) || BSIZE != (1 << OFF_W) || NBANK != (1 << BANK_W)) begin : g_bad_size
    $error("mbca: bank count and bank size must be powers of two");
  end

  logic [CNT_W-1:0] base_q [NBANK];
  logic [CNT_W-1:0] bank_q [NBANK][BSIZE-1];

  // Counts of the uniformly filled initial history (see hist_buf).
  function automatic logic [CNT_W-1:0] init_cum(int unsigned x);
    return CNT_W'((x * HIST_LEN + NSYM - 1) / NSYM);
  endfunction

  // ---------------- update ----------------
  logic [BANK_W-1:0] ub;
  logic [OFF_W-1:0]  uo;
  logic [NBANK-1:0]  base_sel;   // PLA 1: banks above the symbol's bank
  logic [BSIZE-1:0]  ent_sel;    // PLA 2: entries above the symbol's offset
  logic [CNT_W-1:0]  bank_rd  [BSIZE-1];
  logic [CNT_W-1:0]  bank_upd [BSIZE-1];

  assign ub = upd_sym[SYM_W-1 -: BANK_W];
  assign uo = upd_sym[OFF_W-1:0];

  always_comb begin
    for (int unsigned b = 0; b < NBANK; b++) base_sel[b] = (b > ub);
    for (int unsigned j = 0; j < BSIZE; j++) ent_sel[j]  = (j > uo);
    for (int unsigned j = 1; j < BSIZE; j++) begin
      bank_rd[j-1]  = bank_q[ub][j-1];
      bank_upd[j-1] = ent_sel[j] ? (upd_up ? bank_rd[j-1] + 1'b1 : bank_rd[j-1] - 1'b1)
                                 : bank_rd[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NBANK; b++) begin
        base_q[b] <= init_cum(b * BSIZE);
        for (int unsigned j = 1; j < BSIZE; j++)
          bank_q[b][j-1] <= init_cum(b * BSIZE + j) - init_cum(b * BSIZE);
      end
    end else if (clear) begin
      for (int unsigned b = 0; b < NBANK; b++) begin
        base_q[b] <= init_cum(b * BSIZE);
        for (int unsigned j = 1; j < BSIZE; j++)
          bank_q[b][j-1] <= init_cum(b * BSIZE + j) - init_cum(b * BSIZE);
      end
    end else if (upd_en) begin
      for (int unsigned b = 0; b < NBANK; b++)
        if (base_sel[b]) base_q[b] <= upd_up ? base_q[b] + 1'b1 : base_q[b] - 1'b1;
      for (int unsigned j = 1; j < BSIZE; j++)
        bank_q[ub][j-1] <= bank_upd[j-1];
    end
  end

  // ---------------- read ports ----------------
  // cum(x) = base + entry; cum(x+1) comes from the same bank or the next base.
  function automatic logic [CNT_W-1:0] cum_of(logic [SYM_W:0] x);
    logic [BANK_W-1:0] b;
    logic [OFF_W-1:0]  o;
    if (x >= (SYM_W+1)'(NSYM)) return CNT_W'(HIST_LEN);
    b = x[SYM_W-1 -: BANK_W];
    o = x[OFF_W-1:0];
    if (o == '0) return base_q[b];
    return base_q[b] + bank_q[b][o-1'b1];
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

  assign a_q   = q_of(a_sym);
  assign a_n   = n_of(a_sym);
  assign b_q   = q_of(b_sym);
  assign b_n   = n_of(b_sym);
  assign b_occ = occ_of(b_sym);
  assign c_occ = occ_of(c_sym);

  // ---------------- search ----------------
  logic [BANK_W-1:0] sb;
  logic [OFF_W-1:0]  so;
  always_comb begin
    sb = '0;
    for (int unsigned b = 1; b < NBANK; b++)
      if (((FREQ_W'(base_q[b]) << W_LOG2) + FREQ_W'(b * BSIZE)) <= srch_t) sb = BANK_W'(b);
    so = '0;
    for (int unsigned j = 1; j < BSIZE; j++)
      if (((FREQ_W'(base_q[sb] + bank_q[sb][j-1]) << W_LOG2)
           + FREQ_W'(sb * BSIZE) + FREQ_W'(j)) <= srch_t) so = OFF_W'(j);
  end
  assign srch_sym = {sb, so};
endmodule
