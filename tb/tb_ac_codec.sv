// tb_ac_codec: end-to-end test of the codec at its default sizes (256
// symbols, M = 112, W = 16). Several streams of symbols are encoded, with
// random back-pressure on the code-word output. Each stream ends with a flush.
// The collected code words are fed to the decoder with random gaps, and every
// decoded symbol must equal the one sent. The sources change their statistics
// part way through each stream, so that the last symbol changes and both
// scalings of the model total (A >= 1 and A < 1) occur. The test counts how
// often each mechanism happened: the last symbol, symbols below and above it,
// a change of last symbol, both scalings, carries into the guard counter,
// skipped leading bits, encoder and decoder stalls, flushes and model updates
// that cross banks. A mechanism that never happened counts as a failure. It
// also checks the rate: one symbol per 2 cycles without back-pressure.
module tb_ac_codec;
  localparam int NSTREAM = 3;
  localparam int NSYM_STREAM = 1500;

  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic        enc_valid = 0, enc_flush = 0, enc_ready;
  logic [7:0]  enc_sym = 0;
  logic        enc_wd_valid, enc_wd_ready = 0, enc_carry_lost;
  logic [15:0] enc_wd_data;
  logic        dec_wd_valid = 0, dec_wd_ready;
  logic [15:0] dec_wd_data = 0;
  logic        dec_valid, dec_ready = 0;
  logic [7:0]  dec_sym;

  ac_codec dut (.*);

  int checks = 0, failures = 0;
  logic [7:0]  syms [$];
  logic [15:0] words [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- mechanism counters (observed inside the encoder) ----
  int n_is_mps = 0, n_below = 0, n_above = 0, n_mps_change = 0, n_a_lt1 = 0, n_a_ge1 = 0;
  int n_carry = 0, n_skip = 0, n_enc_stall = 0, n_dec_stall = 0, n_flush = 0, n_bank_cross = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc.code_go) begin
      if (enc_sym == dut.em_mps) n_is_mps++;
      else if (enc_sym < dut.em_mps) n_below++;
      else n_above++;
      if (dut.u_enc.a_q[15]) n_a_ge1++; else n_a_lt1++;
      if (dut.u_enc.lo_sum[16]) n_carry++;
      if (dut.u_enc.skip_q != 0) n_skip++;
      if (enc_sym[7:4] != dut.g_enc_banked.u_enc_model.tail[7:4]) n_bank_cross++;
    end
    if (dut.g_enc_banked.u_enc_model.u_mps.upd && dut.g_enc_banked.u_enc_model.u_mps.cur != dut.em_mps &&
        dut.g_enc_banked.u_enc_model.u_mps.cur_new > dut.g_enc_banked.u_enc_model.u_mps.mps_new) n_mps_change++;
    if (enc_valid && !dut.ob_ready) n_enc_stall++;
    if (dut.u_dec.state_q == 1'b1 && !dut.dm_busy && dut.u_dec.avail < 6'(dut.u_dec.s))
      n_dec_stall++;
    if (dut.u_enc.flush_go) n_flush++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Symbol source: a mixture whose favourite symbol moves between phases.
  function automatic logic [7:0] gen_sym(int i, int stream);
    int phase, r;
    phase = (i / 300 + stream) % 4;
    r = int'($urandom_range(0, 99));
    case (phase)
      0: return (r < 60) ? 8'd37 : (r < 85) ? 8'(36 + $urandom_range(0, 3)) : 8'($urandom_range(0, 255));
      1: return (r < 70) ? 8'd200 : (r < 90) ? 8'(198 + $urandom_range(0, 5)) : 8'($urandom_range(0, 255));
      2: return 8'($urandom_range(0, 255));
      default: return (r < 50) ? 8'd128 : (r < 80) ? 8'd3 : 8'(120 + $urandom_range(0, 15));
    endcase
  endfunction

  // Rate: cycles between two accepted symbols when nothing stalls.
  int rate_bad = 0, rate_seen = 0;
  longint last_acc = -1;
  always @(posedge clk) if (rst_n && dut.u_enc.code_go) begin
    if (last_acc >= 0 && dut.ob_ready && enc_valid) begin
      rate_seen++;
      if (cyc - last_acc < 2) rate_bad++;
    end
    last_acc <= cyc;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect code words with random back-pressure.
  bit collect = 0;
  always @(posedge clk) begin
    if (collect && enc_wd_valid && enc_wd_ready) words.push_back(enc_wd_data);
    enc_wd_ready <= collect && ($urandom_range(0, 3) != 0);
  end

  initial begin
    int idle_streak;
    logic [7:0] s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int st = 0; st < NSTREAM; st++) begin
      syms.delete(); words.delete();
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      collect = 1;
      // ---- encode ----
      // Inputs change on the falling edge; a transfer happens at the next
      // rising edge when valid and ready are both high at the falling edge.
      for (int i = 0; i < NSYM_STREAM; i++) begin
        s = gen_sym(i, st);
        syms.push_back(s);
        @(negedge clk);
        enc_valid = 1; enc_flush = 0; enc_sym = s;
        #1;
        while (!enc_ready) @(negedge clk);
      end
      @(negedge clk);
      enc_flush = 1;
      #1;
      while (!enc_ready) @(negedge clk);
      @(negedge clk);
      enc_valid = 0; enc_flush = 0;
      // drain the packer
      idle_streak = 0;
      while (idle_streak < 20) begin
        @(negedge clk);
        if (enc_wd_valid) idle_streak = 0; else idle_streak++;
      end
      collect = 0;
      check(!enc_carry_lost, "no carry lost");
      $display("stream %0d: %0d symbols -> %0d words (%0.3f bits/symbol)", st, syms.size(),
               words.size(), 16.0 * words.size() / syms.size());
      // ---- decode ----
      fork
        begin
          foreach (words[k]) begin
            @(negedge clk);
            dec_wd_valid = 0;
            while ($urandom_range(0, 2) == 0) @(negedge clk);
            dec_wd_valid = 1; dec_wd_data = words[k];
            #1;
            while (!dec_wd_ready) @(negedge clk);
          end
          @(negedge clk);
          dec_wd_valid = 0;
        end
        begin
          for (int k = 0; k < syms.size(); k++) begin
            @(negedge clk);
            dec_ready = ($urandom_range(0, 4) != 0);
            #1;
            while (!(dec_valid && dec_ready)) begin
              @(negedge clk);
              dec_ready = ($urandom_range(0, 4) != 0);
              #1;
            end
            check(dec_sym == syms[k], $sformatf("stream %0d symbol %0d: got %0d want %0d",
                                               st, k, dec_sym, syms[k]));
          end
          @(negedge clk);
          dec_ready = 0;
        end
      join
      repeat (5) @(posedge clk);
    end
    // ---- mechanisms ----
    $display("last=%0d below=%0d above=%0d last_changes=%0d A<1=%0d A>=1=%0d carries=%0d skipped=%0d",
             n_is_mps, n_below, n_above, n_mps_change, n_a_lt1, n_a_ge1, n_carry, n_skip);
    $display("enc_stall=%0d dec_stall=%0d flushes=%0d bank_cross=%0d rate_samples=%0d",
             n_enc_stall, n_dec_stall, n_flush, n_bank_cross, rate_seen);
    check(n_is_mps > 0, "last symbol coded");
    check(n_below > 0, "symbol below last coded");
    check(n_above > 0, "symbol above last coded");
    check(n_mps_change > 0, "last symbol changed");
    check(n_a_lt1 > 0 && n_a_ge1 > 0, "both scalings used");
    check(n_carry > 0, "carry into guard");
    check(n_skip > 0, "leading bits skipped");
    check(n_enc_stall > 0, "encoder stalled by the bit buffer");
    check(n_dec_stall > 0, "decoder stalled for code bits");
    check(n_flush == NSTREAM, "flushes");
    check(n_bank_cross > 0, "update across banks");
    check(rate_seen > 0 && rate_bad == 0, "2 cycles per symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
