// codec_driver: testbench helper that exercises one codec of ac_top. It
// encodes NSTREAM streams of NSYMS symbols from a source whose favourite
// symbol moves, with random back-pressure on the code words, and flushes each
// stream. It then clears the codec, feeds the words to the decoder with
// random gaps and compares every decoded symbol with the one sent.
// Inputs change on the falling clock edge. A transfer happens at the rising
// edge when valid and ready were both high at the falling edge.
module codec_driver #(
  parameter int SYM_W   = 8,
  parameter int NSTREAM = 2,
  parameter int NSYMS   = 1000
) (
  input  logic             clk,
  output logic             clear,
  output logic             enc_valid,
  output logic             enc_flush,
  output logic [SYM_W-1:0] enc_sym,
  input  logic             enc_ready,
  input  logic             enc_wd_valid,
  input  logic [15:0]      enc_wd_data,
  output logic             enc_wd_ready,
  input  logic             enc_carry_lost,
  output logic             dec_wd_valid,
  output logic [15:0]      dec_wd_data,
  input  logic             dec_wd_ready,
  input  logic             dec_valid,
  input  logic [SYM_W-1:0] dec_sym,
  output logic             dec_ready,
  output logic             done,
  output int               checks,
  output int               failures,
  output int               total_words
);
  logic [SYM_W-1:0] syms [$];
  logic [15:0]      words [$];
  bit collect = 0;

  initial begin
    clear = 0; enc_valid = 0; enc_flush = 0; enc_sym = '0; enc_wd_ready = 0;
    dec_wd_valid = 0; dec_wd_data = '0; dec_ready = 0; done = 0;
    checks = 0; failures = 0; total_words = 0;
  end

  always @(posedge clk) begin
    if (collect && enc_wd_valid && enc_wd_ready) words.push_back(enc_wd_data);
    enc_wd_ready <= collect && ($urandom_range(0, 3) != 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d-bit codec): %s", SYM_W, what);
    end
  endtask

  function automatic logic [SYM_W-1:0] gen_sym(int i, int stream);
    int phase, r, fav;
    phase = (i / 250 + stream) % 4;
    r = int'($urandom_range(0, 99));
    fav = (phase * 5 + 3) % (1 << SYM_W);
    case (phase)
      0, 1: return (r < 60) ? SYM_W'(fav) : (r < 85) ? SYM_W'(fav + $urandom_range(0, 3)) : SYM_W'($urandom);
      2: return SYM_W'($urandom);
      default: return (r < 50) ? SYM_W'(fav) : (r < 80) ? SYM_W'(1) : SYM_W'($urandom);
    endcase
  endfunction

  task automatic run();
    int idle;
    logic [SYM_W-1:0] s;
    for (int st = 0; st < NSTREAM; st++) begin
      syms.delete(); words.delete();
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      collect = 1;
      for (int i = 0; i < NSYMS; i++) begin
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
      idle = 0;
      while (idle < 20) begin
        @(negedge clk);
        if (enc_wd_valid) idle = 0; else idle++;
      end
      collect = 0;
      check(!enc_carry_lost, "no carry lost");
      total_words += words.size();
      $display("%0d-bit codec, stream %0d: %0d symbols -> %0d words (%0.3f bits/symbol)", SYM_W, st,
               syms.size(), words.size(), 16.0 * words.size() / syms.size());
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
    end
    done = 1;
  endtask
endmodule
