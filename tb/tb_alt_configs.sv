// tb_alt_configs: round-trip test of ac_codec in the two other weighted
// history sizes that the model was evaluated with, set through parameters:
//   256 symbols, banked model, M = 24,  W = 32: total 256 + 768  = 1024
//                (5-bit array words, model scale 2^10);
//   16 symbols,  per-symbol counters, M = 30, W = 8: total 16 + 240 = 256
//                (5-bit counters, model scale 2^8).
// Each codec encodes three streams with random back-pressure, decodes them and
// compares every symbol (see codec_driver). This shows that the coder's
// shifts, the counter widths and the model's search follow the parameters,
// and that ac_top's default sizes are not the only ones that work.
module tb_alt_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        a_clear, a_enc_valid, a_enc_flush, a_enc_ready, a_enc_wd_valid, a_enc_wd_ready;
  logic        a_enc_carry_lost, a_dec_wd_valid, a_dec_wd_ready, a_dec_valid, a_dec_ready;
  logic [7:0]  a_enc_sym, a_dec_sym;
  logic [15:0] a_enc_wd_data, a_dec_wd_data;
  logic        b_clear, b_enc_valid, b_enc_flush, b_enc_ready, b_enc_wd_valid, b_enc_wd_ready;
  logic        b_enc_carry_lost, b_dec_wd_valid, b_dec_wd_ready, b_dec_valid, b_dec_ready;
  logic [3:0]  b_enc_sym, b_dec_sym;
  logic [15:0] b_enc_wd_data, b_dec_wd_data;

  ac_codec #(.DIRECT(1'b0), .NBANK(16), .BSIZE(16), .HIST_LEN(24), .W_LOG2(5)) u_a (
    .clk, .rst_n, .clear(a_clear),
    .enc_valid(a_enc_valid), .enc_flush(a_enc_flush), .enc_sym(a_enc_sym),
    .enc_ready(a_enc_ready), .enc_wd_valid(a_enc_wd_valid), .enc_wd_data(a_enc_wd_data),
    .enc_wd_ready(a_enc_wd_ready), .enc_carry_lost(a_enc_carry_lost),
    .dec_wd_valid(a_dec_wd_valid), .dec_wd_data(a_dec_wd_data), .dec_wd_ready(a_dec_wd_ready),
    .dec_valid(a_dec_valid), .dec_sym(a_dec_sym), .dec_ready(a_dec_ready)
  );

  ac_codec #(.DIRECT(1'b1), .NBANK(1), .BSIZE(16), .HIST_LEN(30), .W_LOG2(3)) u_b (
    .clk, .rst_n, .clear(b_clear),
    .enc_valid(b_enc_valid), .enc_flush(b_enc_flush), .enc_sym(b_enc_sym),
    .enc_ready(b_enc_ready), .enc_wd_valid(b_enc_wd_valid), .enc_wd_data(b_enc_wd_data),
    .enc_wd_ready(b_enc_wd_ready), .enc_carry_lost(b_enc_carry_lost),
    .dec_wd_valid(b_dec_wd_valid), .dec_wd_data(b_dec_wd_data), .dec_wd_ready(b_dec_wd_ready),
    .dec_valid(b_dec_valid), .dec_sym(b_dec_sym), .dec_ready(b_dec_ready)
  );

  logic a_done, b_done;
  int a_checks, a_failures, a_words, b_checks, b_failures, b_words;

  codec_driver #(.SYM_W(8), .NSTREAM(3), .NSYMS(1500)) u_a_drv (
    .clk, .clear(a_clear), .enc_valid(a_enc_valid), .enc_flush(a_enc_flush), .enc_sym(a_enc_sym),
    .enc_ready(a_enc_ready), .enc_wd_valid(a_enc_wd_valid), .enc_wd_data(a_enc_wd_data),
    .enc_wd_ready(a_enc_wd_ready), .enc_carry_lost(a_enc_carry_lost),
    .dec_wd_valid(a_dec_wd_valid), .dec_wd_data(a_dec_wd_data), .dec_wd_ready(a_dec_wd_ready),
    .dec_valid(a_dec_valid), .dec_sym(a_dec_sym), .dec_ready(a_dec_ready),
    .done(a_done), .checks(a_checks), .failures(a_failures), .total_words(a_words)
  );

  codec_driver #(.SYM_W(4), .NSTREAM(3), .NSYMS(1500)) u_b_drv (
    .clk, .clear(b_clear), .enc_valid(b_enc_valid), .enc_flush(b_enc_flush), .enc_sym(b_enc_sym),
    .enc_ready(b_enc_ready), .enc_wd_valid(b_enc_wd_valid), .enc_wd_data(b_enc_wd_data),
    .enc_wd_ready(b_enc_wd_ready), .enc_carry_lost(b_enc_carry_lost),
    .dec_wd_valid(b_dec_wd_valid), .dec_wd_data(b_dec_wd_data), .dec_wd_ready(b_dec_wd_ready),
    .dec_valid(b_dec_valid), .dec_sym(b_dec_sym), .dec_ready(b_dec_ready),
    .done(b_done), .checks(b_checks), .failures(b_failures), .total_words(b_words)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      u_a_drv.run();
      u_b_drv.run();
    join
    checks = a_checks + b_checks + 2;
    failures = a_failures + b_failures;
    // Both sizes must actually compress the skewed test source.
    if (a_words * 16 >= 8 * 3 * 1500) begin
      failures++;
      $display("FAIL: M=24, W=32 codec did not compress (%0d words)", a_words);
    end
    if (b_words * 16 >= 4 * 3 * 1500) begin
      failures++;
      $display("FAIL: M=30, W=8 codec did not compress (%0d words)", b_words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
