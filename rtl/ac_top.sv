// ac_top: the two codec configurations side by side, each with its own ports.
//   big   - 256 symbols, banked model (16 banks x 16), M = 112, W = 16:
//           the main configuration, for byte-wide video data;
//   small - 16 symbols, one counter per symbol, M = 127, W = 16: the
//           small-alphabet model, for symbols of a few bits.
// Both totals are 2048, so no division is needed. Each codec has an encoder
// (symbols in, 16-bit code words out) and a decoder (code words in, symbols
// out) that work independently; see ac_codec for the handshakes.
// Timing: big takes one symbol per 2 cycles per path, small one per cycle.
module ac_top (
  input  logic        clk,
  input  logic        rst_n,
  // 256-symbol codec
  input  logic        big_clear,
  input  logic        big_enc_valid,
  input  logic        big_enc_flush,
  input  logic [7:0]  big_enc_sym,
  output logic        big_enc_ready,
  output logic        big_enc_wd_valid,
  output logic [15:0] big_enc_wd_data,
  input  logic        big_enc_wd_ready,
  output logic        big_enc_carry_lost,
  input  logic        big_dec_wd_valid,
  input  logic [15:0] big_dec_wd_data,
  output logic        big_dec_wd_ready,
  output logic        big_dec_valid,
  output logic [7:0]  big_dec_sym,
  input  logic        big_dec_ready,
  // 16-symbol codec
  input  logic        small_clear,
  input  logic        small_enc_valid,
  input  logic        small_enc_flush,
  input  logic [3:0]  small_enc_sym,
  output logic        small_enc_ready,
  output logic        small_enc_wd_valid,
  output logic [15:0] small_enc_wd_data,
  input  logic        small_enc_wd_ready,
  output logic        small_enc_carry_lost,
  input  logic        small_dec_wd_valid,
  input  logic [15:0] small_dec_wd_data,
  output logic        small_dec_wd_ready,
  output logic        small_dec_valid,
  output logic [3:0]  small_dec_sym,
  input  logic        small_dec_ready
);
  ac_codec #(.DIRECT(1'b0), .NBANK(16), .BSIZE(16), .HIST_LEN(112), .W_LOG2(4)) u_big (
    .clk, .rst_n, .clear(big_clear),
    .enc_valid(big_enc_valid), .enc_flush(big_enc_flush), .enc_sym(big_enc_sym),
    .enc_ready(big_enc_ready), .enc_wd_valid(big_enc_wd_valid), .enc_wd_data(big_enc_wd_data),
    .enc_wd_ready(big_enc_wd_ready), .enc_carry_lost(big_enc_carry_lost),
    .dec_wd_valid(big_dec_wd_valid), .dec_wd_data(big_dec_wd_data), .dec_wd_ready(big_dec_wd_ready),
    .dec_valid(big_dec_valid), .dec_sym(big_dec_sym), .dec_ready(big_dec_ready)
  );

  ac_codec #(.DIRECT(1'b1), .NBANK(1), .BSIZE(16), .HIST_LEN(127), .W_LOG2(4)) u_small (
    .clk, .rst_n, .clear(small_clear),
    .enc_valid(small_enc_valid), .enc_flush(small_enc_flush), .enc_sym(small_enc_sym),
    .enc_ready(small_enc_ready), .enc_wd_valid(small_enc_wd_valid), .enc_wd_data(small_enc_wd_data),
    .enc_wd_ready(small_enc_wd_ready), .enc_carry_lost(small_enc_carry_lost),
    .dec_wd_valid(small_dec_wd_valid), .dec_wd_data(small_dec_wd_data), .dec_wd_ready(small_dec_wd_ready),
    .dec_valid(small_dec_valid), .dec_sym(small_dec_sym), .dec_ready(small_dec_ready)
  );
endmodule
