// tb_ac_decoder: the reference encoder of ac_ref_pkg turns a random symbol
// sequence into a bit stream. The testbench feeds that stream to the decoder
// (with a real whm_model) through its window/avail/take port, sometimes
// holding back bits so that the decoder must wait. Every decoded symbol must
// equal the one encoded.
// Without stalls one symbol must come out every 2 cycles.
module tb_ac_decoder;
  import ac_ref_pkg::*;
  localparam int NSYMS = 2000;

  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic [15:0] window, a_reg;
  logic [5:0]  avail;
  logic        take;
  logic [4:0]  take_cnt;
  logic [11:0] m_srch_t, m_q, m_n, m_mps_q, m_mps_n;
  logic [7:0]  m_srch_sym, m_sym, m_mps, out_sym;
  logic        m_busy, m_upd, out_valid, out_ready = 0;

  whm_model u_model (
    .clk, .rst_n, .clear, .lk_sym(m_sym), .lk_q(m_q), .lk_n(m_n),
    .mps(m_mps), .mps_q(m_mps_q), .mps_n(m_mps_n), .srch_t(m_srch_t), .srch_sym(m_srch_sym),
    .upd_valid(m_upd), .upd_sym(m_sym), .busy(m_busy)
  );

  ac_decoder dut (.*);

  int checks = 0, failures = 0;
  ref_model rm, rm2;
  ref_encoder re;
  logic [7:0] syms[$];
  int unsigned pos = 0;      // bits already taken
  int unsigned limit = 0;    // bits made visible so far
  bit starve = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Bit source: shows up to 32 bits of the stream, fewer while starving.
  always_comb begin
    int unsigned n;
    n = limit - pos;
    if (n > 32) n = 32;
    avail = 6'(n);
    for (int i = 0; i < 16; i++)
      window[15-i] = (i < int'(n) && pos + i < re.bits.size()) ? re.bits[pos + i] : 1'b0;
  end
  always @(posedge clk) begin
    if (take) pos <= pos + take_cnt;
    if (!starve || $urandom_range(0, 2) == 0) limit <= (limit + 16 > re.bits.size()) ? re.bits.size() : limit + 16;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_wait = 0;
  always @(posedge clk) if (rst_n && dut.state_q == 1'b1 && !m_busy && avail < 6'(dut.s)) n_wait++;

  initial begin
    longint t0;
    int r;
    rm = new(); rm2 = new(); re = new(rm);
    for (int i = 0; i < NSYMS; i++) begin
      r = int'($urandom_range(0, 99));
      syms.push_back((r < 50) ? 8'(10 + i / 300) : (r < 75) ? 8'($urandom_range(0, 40)) : 8'($urandom_range(0, 255)));
      void'(re.encode(syms[i]));
    end
    re.flush();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NSYMS; k++) begin
      @(negedge clk);
      if (k == NSYMS / 2) starve = 0;
      if (k == NSYMS / 2 + 20) t0 = $time;
      out_ready = 1;
      #1;
      while (!out_valid) @(negedge clk);
      check(out_sym == syms[k], $sformatf("symbol %0d: got %0d want %0d", k, out_sym, syms[k]));
    end
    r = int'(($time - t0) / 10);
    check(r >= 2 * (NSYMS / 2 - 21) && r <= 2 * (NSYMS / 2 - 21) + 2,
          $sformatf("rate: %0d cycles for %0d symbols", r, NSYMS / 2 - 21));
    check(n_wait > 0, "decoder waited for code bits");
    $display("%0d bits decoded, %0d waits", pos, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
