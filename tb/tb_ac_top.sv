// tb_ac_top: end-to-end test of ac_top at its default sizes, both codecs
// running at the same time. The 256-symbol codec (banked model, M = 112,
// W = 16) and the 16-symbol codec (per-symbol counters, M = 127, W = 16)
// each encode streams and decode the collected words back (see
// codec_driver). Every decoded symbol must equal the one sent. The test counts
// how often each mechanism of the design happened, and one that never happened
// counts as a failure: the last symbol, symbols below and above it, a change
// of last symbol, both model-total scalings (A >= 1 and A < 1), carries into
// the guard counter, skipped leading bits, encoder stalls from the bit buffer,
// decoder waits for code bits, flushes, array updates across banks, and
// counter updates up and down in the small model. It also checks the rates:
// the banked model never takes symbols closer than 2 cycles apart and does
// so at exactly 2 when nothing stalls; the per-symbol counters take one per
// cycle.
module tb_ac_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        big_clear, big_enc_valid, big_enc_flush, big_enc_ready, big_enc_wd_valid, big_enc_wd_ready;
  logic        big_enc_carry_lost, big_dec_wd_valid, big_dec_wd_ready, big_dec_valid, big_dec_ready;
  logic [7:0]  big_enc_sym, big_dec_sym;
  logic [15:0] big_enc_wd_data, big_dec_wd_data;
  logic        small_clear, small_enc_valid, small_enc_flush, small_enc_ready, small_enc_wd_valid, small_enc_wd_ready;
  logic        small_enc_carry_lost, small_dec_wd_valid, small_dec_wd_ready, small_dec_valid, small_dec_ready;
  logic [3:0]  small_enc_sym, small_dec_sym;
  logic [15:0] small_enc_wd_data, small_dec_wd_data;

  ac_top dut (.*);

  logic big_done, small_done;
  int big_checks, big_failures, big_words, small_checks, small_failures, small_words;

  codec_driver #(.SYM_W(8), .NSTREAM(3), .NSYMS(1200)) u_big_drv (
    .clk, .clear(big_clear), .enc_valid(big_enc_valid), .enc_flush(big_enc_flush), .enc_sym(big_enc_sym),
    .enc_ready(big_enc_ready), .enc_wd_valid(big_enc_wd_valid), .enc_wd_data(big_enc_wd_data),
    .enc_wd_ready(big_enc_wd_ready), .enc_carry_lost(big_enc_carry_lost),
    .dec_wd_valid(big_dec_wd_valid), .dec_wd_data(big_dec_wd_data), .dec_wd_ready(big_dec_wd_ready),
    .dec_valid(big_dec_valid), .dec_sym(big_dec_sym), .dec_ready(big_dec_ready),
    .done(big_done), .checks(big_checks), .failures(big_failures), .total_words(big_words)
  );

  codec_driver #(.SYM_W(4), .NSTREAM(3), .NSYMS(1200)) u_small_drv (
    .clk, .clear(small_clear), .enc_valid(small_enc_valid), .enc_flush(small_enc_flush), .enc_sym(small_enc_sym),
    .enc_ready(small_enc_ready), .enc_wd_valid(small_enc_wd_valid), .enc_wd_data(small_enc_wd_data),
    .enc_wd_ready(small_enc_wd_ready), .enc_carry_lost(small_enc_carry_lost),
    .dec_wd_valid(small_dec_wd_valid), .dec_wd_data(small_dec_wd_data), .dec_wd_ready(small_dec_wd_ready),
    .dec_valid(small_dec_valid), .dec_sym(small_dec_sym), .dec_ready(small_dec_ready),
    .done(small_done), .checks(small_checks), .failures(small_failures), .total_words(small_words)
  );

  // ---- mechanism counters ----
  int n_is_mps = 0, n_below = 0, n_above = 0, n_mps_change = 0, n_a_lt1 = 0, n_a_ge1 = 0;
  int n_carry = 0, n_skip = 0, n_enc_stall = 0, n_dec_stall = 0, n_flush = 0, n_bank_cross = 0;
  int n_small_up = 0, n_small_down = 0, n_small_mps_change = 0;
  int big_rate_bad = 0, big_rate_seen = 0, small_rate_bad = 0, small_rate_seen = 0;
  longint cyc = 0, big_last = -1, small_last = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.u_big.u_enc.code_go) begin
        if (big_enc_sym == dut.u_big.em_mps) n_is_mps++;
        else if (big_enc_sym < dut.u_big.em_mps) n_below++;
        else n_above++;
        if (dut.u_big.u_enc.a_q[15]) n_a_ge1++; else n_a_lt1++;
        if (dut.u_big.u_enc.lo_sum[16]) n_carry++;
        if (dut.u_big.u_enc.skip_q != 0) n_skip++;
        if (big_enc_sym[7:4] != dut.u_big.g_enc_banked.u_enc_model.tail[7:4]) n_bank_cross++;
        if (big_last >= 0 && cyc - big_last == 2) big_rate_seen++;
        if (big_last >= 0 && cyc - big_last < 2) big_rate_bad++;
        big_last <= cyc;
      end
      if (dut.u_big.em_upd && dut.u_big.g_enc_banked.u_enc_model.u_mps.cur != dut.u_big.em_mps &&
          dut.u_big.g_enc_banked.u_enc_model.u_mps.cur_new > dut.u_big.g_enc_banked.u_enc_model.u_mps.mps_new)
        n_mps_change++;
      if (big_enc_valid && !dut.u_big.ob_ready) n_enc_stall++;
      if (dut.u_big.u_dec.state_q == 1'b1 && !dut.u_big.dm_busy && dut.u_big.u_dec.avail < 6'(dut.u_big.u_dec.s))
        n_dec_stall++;
      if (dut.u_big.u_enc.flush_go || dut.u_small.u_enc.flush_go) n_flush++;
      if (dut.u_small.u_enc.code_go) begin
        if (small_enc_sym > dut.u_small.g_enc_direct.u_enc_model.tail) n_small_down++;
        if (small_enc_sym < dut.u_small.g_enc_direct.u_enc_model.tail) n_small_up++;
        if (small_enc_sym != dut.u_small.em_mps &&
            dut.u_small.g_enc_direct.u_enc_model.u_mps.cur_new > dut.u_small.g_enc_direct.u_enc_model.u_mps.mps_new)
          n_small_mps_change++;
        if (small_last >= 0 && small_enc_valid && dut.u_small.ob_ready && small_last == cyc - 1) small_rate_seen++;
        small_last <= cyc;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", big_checks + small_checks, big_failures + small_failures + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      u_big_drv.run();
      u_small_drv.run();
    join
    checks = big_checks + small_checks;
    failures = big_failures + small_failures;
    $display("big: last=%0d below=%0d above=%0d last_changes=%0d A<1=%0d A>=1=%0d carries=%0d skipped=%0d",
             n_is_mps, n_below, n_above, n_mps_change, n_a_lt1, n_a_ge1, n_carry, n_skip);
    $display("big: enc_stall=%0d dec_wait=%0d bank_cross=%0d rate_samples=%0d/%0d; flushes=%0d",
             n_enc_stall, n_dec_stall, n_bank_cross, big_rate_seen, big_rate_bad, n_flush);
    $display("small: counters up=%0d down=%0d last_changes=%0d one-cycle symbols=%0d",
             n_small_up, n_small_down, n_small_mps_change, small_rate_seen);
    checks += 16;
    failures += int'(n_is_mps == 0) + int'(n_below == 0) + int'(n_above == 0) + int'(n_mps_change == 0)
              + int'(n_a_lt1 == 0) + int'(n_a_ge1 == 0) + int'(n_carry == 0) + int'(n_skip == 0)
              + int'(n_enc_stall == 0) + int'(n_dec_stall == 0) + int'(n_flush != 6) + int'(n_bank_cross == 0)
              + int'(big_rate_seen == 0 || big_rate_bad != 0) + int'(n_small_up == 0) + int'(n_small_down == 0)
              + int'(n_small_mps_change == 0 || small_rate_seen == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
