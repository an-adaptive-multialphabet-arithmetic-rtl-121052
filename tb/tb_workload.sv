// tb_workload: runs data of the sizes evaluated for this coder through ac_top
// at its default sizes. The 256-symbol codec codes one byte stream of each
// size in turn: 103,026 bytes (an image file), 23,107 and 35,256 bytes (two
// classified vector-quantizer outputs) and 51,513 bytes (a pyramid
// vector-quantizer output). The original files are not available, so the
// bytes are generated: the image is a smooth picture in raster order with a
// little noise, the quantizer outputs are codebook indices with a skewed,
// slowly drifting distribution. The 16-symbol codec codes the same bytes
// split into two 4-bit symbols each (high half first).
// Every stream is encoded, flushed, decoded back from the collected words and
// compared symbol by symbol. The test also checks that the encoder of the
// 256-symbol codec accepts one byte every 2 cycles while nothing stalls it
// (the code-word output is always ready here) and that no carry is lost.
// It prints bits per symbol and the proportion remaining (coded size over
// original size) for each stream.
module tb_workload;
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

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NSRC = 4;
  localparam int SIZES [NSRC] = '{103026, 23107, 35256, 51513};
  localparam int WIDTH = 360;

  logic [7:0]  bytes [$];
  logic [15:0] words [$];
  bit          collect_big = 0, collect_small = 0;

  always @(posedge clk) begin
    if (collect_big && big_enc_wd_valid && big_enc_wd_ready) words.push_back(big_enc_wd_data);
    if (collect_small && small_enc_wd_valid && small_enc_wd_ready) words.push_back(small_enc_wd_data);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Byte source: src 0 is a picture, the others quantizer indices.
  task automatic make_bytes(input int src, input int n);
    int x, y, v, r, centre;
    bytes.delete();
    for (int i = 0; i < n; i++) begin
      if (src == 0) begin
        x = i % WIDTH;
        y = i / WIDTH;
        v = 40 + ((x * 3 + y * 2) / 8) % 160 + ((x / 45 + y / 36) % 2) * 30;
        r = int'($urandom_range(0, 9));
        v = v + ((r < 6) ? 0 : (r < 8) ? 1 : (r < 9) ? -1 : int'($urandom_range(0, 8)) - 4);
        bytes.push_back(8'(v));
      end else begin
        centre = (i / 2000 * 37 + src * 11) % 256;
        r = int'($urandom_range(0, 99));
        if (r < 35)      v = centre;
        else if (r < 65) v = centre + int'($urandom_range(0, 7));
        else if (r < 85) v = centre - int'($urandom_range(0, 15));
        else             v = int'($urandom_range(0, 255));
        bytes.push_back(8'(v));
      end
    end
  endtask

  task automatic run_big(input int src);
    int idle, n;
    longint t_prev;
    int rate_bad, rate_two;
    n = bytes.size();
    words.delete();
    rate_bad = 0; rate_two = 0; t_prev = -1;
    @(negedge clk); big_clear = 1; @(negedge clk); big_clear = 0;
    collect_big = 1;
    foreach (bytes[i]) begin
      @(negedge clk);
      big_enc_valid = 1; big_enc_flush = 0; big_enc_sym = bytes[i];
      #1;
      while (!big_enc_ready) @(negedge clk);
      if (t_prev >= 0) begin
        if (cyc - t_prev < 2) rate_bad++;
        if (cyc - t_prev == 2) rate_two++;
      end
      t_prev = cyc;
    end
    @(negedge clk); big_enc_flush = 1; #1;
    while (!big_enc_ready) @(negedge clk);
    @(negedge clk); big_enc_valid = 0; big_enc_flush = 0;
    idle = 0;
    while (idle < 20) begin
      @(negedge clk);
      if (big_enc_wd_valid) idle = 0; else idle++;
    end
    collect_big = 0;
    check(!big_enc_carry_lost, "no carry lost (256 symbols)");
    check(rate_bad == 0 && rate_two == n - 1,
          $sformatf("256-symbol encoder rate: %0d of %0d gaps at 2 cycles, %0d below", rate_two, n - 1, rate_bad));
    $display("256-symbol codec, source %0d: %0d bytes -> %0d words, %0.3f bits/symbol, proportion remaining %0.4f",
             src, n, words.size(), 16.0 * words.size() / n, 2.0 * words.size() / n);
    fork
      begin
        foreach (words[k]) begin
          @(negedge clk);
          big_dec_wd_valid = 1; big_dec_wd_data = words[k];
          #1;
          while (!big_dec_wd_ready) @(negedge clk);
        end
        @(negedge clk); big_dec_wd_valid = 0;
      end
      begin
        foreach (bytes[k]) begin
          @(negedge clk);
          big_dec_ready = 1;
          #1;
          while (!big_dec_valid) @(negedge clk);
          check(big_dec_sym == bytes[k], $sformatf("256 symbols, source %0d byte %0d: got %0d want %0d",
                                                   src, k, big_dec_sym, bytes[k]));
        end
        @(negedge clk); big_dec_ready = 0;
      end
    join
  endtask

  task automatic run_small(input int src);
    int idle, n;
    logic [3:0] nib;
    n = 2 * bytes.size();
    words.delete();
    @(negedge clk); small_clear = 1; @(negedge clk); small_clear = 0;
    collect_small = 1;
    for (int i = 0; i < n; i++) begin
      nib = (i % 2 == 0) ? bytes[i / 2][7:4] : bytes[i / 2][3:0];
      @(negedge clk);
      small_enc_valid = 1; small_enc_flush = 0; small_enc_sym = nib;
      #1;
      while (!small_enc_ready) @(negedge clk);
    end
    @(negedge clk); small_enc_flush = 1; #1;
    while (!small_enc_ready) @(negedge clk);
    @(negedge clk); small_enc_valid = 0; small_enc_flush = 0;
    idle = 0;
    while (idle < 20) begin
      @(negedge clk);
      if (small_enc_wd_valid) idle = 0; else idle++;
    end
    collect_small = 0;
    check(!small_enc_carry_lost, "no carry lost (16 symbols)");
    $display("16-symbol codec, source %0d: %0d nibbles -> %0d words, %0.3f bits/byte, proportion remaining %0.4f",
             src, n, words.size(), 32.0 * words.size() / n, 4.0 * words.size() / n);
    fork
      begin
        foreach (words[k]) begin
          @(negedge clk);
          small_dec_wd_valid = 1; small_dec_wd_data = words[k];
          #1;
          while (!small_dec_wd_ready) @(negedge clk);
        end
        @(negedge clk); small_dec_wd_valid = 0;
      end
      begin
        for (int k = 0; k < n; k++) begin
          nib = (k % 2 == 0) ? bytes[k / 2][7:4] : bytes[k / 2][3:0];
          @(negedge clk);
          small_dec_ready = 1;
          #1;
          while (!small_dec_valid) @(negedge clk);
          check(small_dec_sym == nib, $sformatf("16 symbols, source %0d nibble %0d: got %0d want %0d",
                                                src, k, small_dec_sym, nib));
        end
        @(negedge clk); small_dec_ready = 0;
      end
    join
  endtask

  initial begin
    big_clear = 0; big_enc_valid = 0; big_enc_flush = 0; big_enc_sym = '0; big_enc_wd_ready = 1;
    big_dec_wd_valid = 0; big_dec_wd_data = '0; big_dec_ready = 0;
    small_clear = 0; small_enc_valid = 0; small_enc_flush = 0; small_enc_sym = '0; small_enc_wd_ready = 1;
    small_dec_wd_valid = 0; small_dec_wd_data = '0; small_dec_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSRC; s++) begin
      make_bytes(s, SIZES[s]);
      run_big(s);
      run_small(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
