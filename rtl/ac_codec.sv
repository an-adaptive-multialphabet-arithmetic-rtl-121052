// ac_codec: adaptive 256-symbol arithmetic codec with the weighted history
// model (history length M = 112, weight W = 16, total 2048).
// Encoder path: symbols -> ac_encoder (+ its own whm_model) -> bit_packer ->
// 16-bit code words. Decoder path: code words -> bit_unpacker -> ac_decoder
// (+ its own whm_model) -> symbols. The two paths are independent, as in a
// codec chip with separate encoder and decoder. Both models start in the same
// state and update with the same rule, so the decoder tracks the encoder.
// An encoder flush (enc_flush with enc_valid) ends a stream: it sends the rest
// of the code, pads the last word and restarts the encoder's model. 'clear'
// restarts everything, and is how the decoder is told that a new stream
// begins. The split into encoder, decoder and modeling unit follows the
// document; the handshakes and word width are this design's.
// DIRECT selects the modeling unit: 0 (default) the banked whm_model for
// large alphabets, 1 the per-symbol-counter whm_direct for small ones.
// Timing: with whm_model each path takes one symbol every 2 clock cycles
// when not stalled (two array updates per symbol); with whm_direct, one
// symbol per cycle.
module ac_codec #(
  parameter bit          DIRECT   = 1'b0,   // 1: per-symbol counters (whm_direct)
  parameter int unsigned NBANK    = 16,
  parameter int unsigned BSIZE    = 16,
  parameter int unsigned HIST_LEN = 112,
  parameter int unsigned W_LOG2   = 4,
  parameter int unsigned NSYM     = NBANK * BSIZE,
  parameter int unsigned SYM_W    = $clog2(NSYM),
  parameter int unsigned TOT_LOG2 = $clog2(NSYM + (HIST_LEN << W_LOG2)),
  parameter int unsigned FREQ_W   = TOT_LOG2 + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  // encoder: symbols in, code words out
  input  logic             enc_valid,
  input  logic             enc_flush,
  input  logic [SYM_W-1:0] enc_sym,
  output logic             enc_ready,
  output logic             enc_wd_valid,
  output logic [15:0]      enc_wd_data,
  input  logic             enc_wd_ready,
  output logic             enc_carry_lost,
  // decoder: code words in, symbols out
  input  logic             dec_wd_valid,
  input  logic [15:0]      dec_wd_data,
  output logic             dec_wd_ready,
  output logic             dec_valid,
  output logic [SYM_W-1:0] dec_sym,
  input  logic             dec_ready
);
  // ---------------- encoder path ----------------
  logic [SYM_W-1:0]  em_sym, em_mps, em_srch_sym;
  logic [FREQ_W-1:0] em_q, em_n, em_mps_q, em_mps_n;
  logic              em_busy, em_upd, em_clear;
  logic              ob_valid, ob_pad, ob_ready;
  logic [15:0]       ob_bits, enc_a;
  logic [4:0]        ob_cnt;

  if (DIRECT) begin : g_enc_direct
    whm_direct #(.NSYM(NSYM), .HIST_LEN(HIST_LEN), .W_LOG2(W_LOG2), .SYM_W(SYM_W),
                 .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_enc_model (
      .clk, .rst_n, .clear(clear || em_clear),
      .lk_sym(em_sym), .lk_q(em_q), .lk_n(em_n),
      .mps(em_mps), .mps_q(em_mps_q), .mps_n(em_mps_n),
      .srch_t('0), .srch_sym(em_srch_sym),
      .upd_valid(em_upd), .upd_sym(em_sym), .busy(em_busy)
    );
  end else begin : g_enc_banked
    whm_model #(.NBANK(NBANK), .BSIZE(BSIZE), .HIST_LEN(HIST_LEN), .W_LOG2(W_LOG2),
                .NSYM(NSYM), .SYM_W(SYM_W), .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_enc_model (
      .clk, .rst_n, .clear(clear || em_clear),
      .lk_sym(em_sym), .lk_q(em_q), .lk_n(em_n),
      .mps(em_mps), .mps_q(em_mps_q), .mps_n(em_mps_n),
      .srch_t('0), .srch_sym(em_srch_sym),
      .upd_valid(em_upd), .upd_sym(em_sym), .busy(em_busy)
    );
  end

  ac_encoder #(.SYM_W(SYM_W), .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_enc (
    .clk, .rst_n, .clear,
    .in_valid(enc_valid), .in_flush(enc_flush), .in_sym(enc_sym), .in_ready(enc_ready),
    .m_sym(em_sym), .m_q(em_q), .m_n(em_n), .m_mps(em_mps), .m_busy(em_busy),
    .m_upd(em_upd), .m_clear(em_clear),
    .ob_valid, .ob_bits, .ob_cnt, .ob_pad, .ob_ready,
    .carry_lost(enc_carry_lost), .a_reg(enc_a)
  );

  bit_packer u_packer (
    .clk, .rst_n, .clear,
    .in_valid(ob_valid), .in_bits(ob_bits), .in_cnt(ob_cnt), .in_pad(ob_pad), .in_ready(ob_ready),
    .wd_valid(enc_wd_valid), .wd_data(enc_wd_data), .wd_ready(enc_wd_ready)
  );

  // ---------------- decoder path ----------------
  logic [SYM_W-1:0]  dm_sym, dm_mps, dm_srch_sym;
  logic [FREQ_W-1:0] dm_q, dm_n, dm_mps_q, dm_mps_n, dm_srch_t;
  logic              dm_busy, dm_upd;
  logic [15:0]       window, dec_a;
  logic [5:0]        avail;
  logic              take;
  logic [4:0]        take_cnt;

  bit_unpacker u_unpacker (
    .clk, .rst_n, .clear,
    .wd_valid(dec_wd_valid), .wd_data(dec_wd_data), .wd_ready(dec_wd_ready),
    .window, .avail, .take, .take_cnt
  );

  if (DIRECT) begin : g_dec_direct
    whm_direct #(.NSYM(NSYM), .HIST_LEN(HIST_LEN), .W_LOG2(W_LOG2), .SYM_W(SYM_W),
                 .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_dec_model (
      .clk, .rst_n, .clear,
      .lk_sym(dm_sym), .lk_q(dm_q), .lk_n(dm_n),
      .mps(dm_mps), .mps_q(dm_mps_q), .mps_n(dm_mps_n),
      .srch_t(dm_srch_t), .srch_sym(dm_srch_sym),
      .upd_valid(dm_upd), .upd_sym(dm_sym), .busy(dm_busy)
    );
  end else begin : g_dec_banked
    whm_model #(.NBANK(NBANK), .BSIZE(BSIZE), .HIST_LEN(HIST_LEN), .W_LOG2(W_LOG2),
                .NSYM(NSYM), .SYM_W(SYM_W), .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_dec_model (
      .clk, .rst_n, .clear,
      .lk_sym(dm_sym), .lk_q(dm_q), .lk_n(dm_n),
      .mps(dm_mps), .mps_q(dm_mps_q), .mps_n(dm_mps_n),
      .srch_t(dm_srch_t), .srch_sym(dm_srch_sym),
      .upd_valid(dm_upd), .upd_sym(dm_sym), .busy(dm_busy)
    );
  end

  ac_decoder #(.SYM_W(SYM_W), .TOT_LOG2(TOT_LOG2), .FREQ_W(FREQ_W)) u_dec (
    .clk, .rst_n, .clear,
    .window, .avail, .take, .take_cnt,
    .m_srch_t(dm_srch_t), .m_srch_sym(dm_srch_sym), .m_sym(dm_sym),
    .m_q(dm_q), .m_n(dm_n), .m_mps(dm_mps), .m_mps_q(dm_mps_q), .m_mps_n(dm_mps_n),
    .m_busy(dm_busy), .m_upd(dm_upd),
    .out_valid(dec_valid), .out_sym(dec_sym), .out_ready(dec_ready), .a_reg(dec_a)
  );
endmodule
