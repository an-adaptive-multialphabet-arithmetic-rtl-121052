// tb_ac_encoder: checks the encoder against the reference encoder of
// ac_ref_pkg. The encoder is driven with a real whm_model, random gaps on the
// input and random back-pressure on the bit output. After each coded symbol
// the range register must equal the reference A. After the flush, the bits
// that left the encoder must equal the reference bit stream. Without stalls
// a new symbol must be taken every 2 cycles.
module tb_ac_encoder;
  import ac_ref_pkg::*;
  localparam int NSYMS = 2000;

  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_flush = 0, in_ready;
  logic [7:0]  in_sym = 0;
  logic [7:0]  m_sym, m_mps, srch_sym;
  logic [11:0] m_q, m_n, mps_q, mps_n;
  logic        m_busy, m_upd, m_clear;
  logic        ob_valid, ob_pad, ob_ready = 0, carry_lost;
  logic [15:0] ob_bits, a_reg;
  logic [4:0]  ob_cnt;

  whm_model u_model (
    .clk, .rst_n, .clear(clear || m_clear), .lk_sym(m_sym), .lk_q(m_q), .lk_n(m_n),
    .mps(m_mps), .mps_q, .mps_n, .srch_t(12'd0), .srch_sym,
    .upd_valid(m_upd), .upd_sym(m_sym), .busy(m_busy)
  );

  ac_encoder dut (.*);

  int checks = 0, failures = 0;
  bit got[$];
  ref_model rm;
  ref_encoder re;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Collect the output bits and vary back-pressure.
  bit bp = 1;
  always @(posedge clk) begin
    if (rst_n && ob_valid && ob_ready)
      for (int i = 0; i < 16; i++) if (i < int'(ob_cnt)) got.push_back(ob_bits[15-i]);
    ob_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    longint t0;
    int steps;
    rm = new(); re = new(rm);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NSYMS; i++) begin
      int r;
      r = int'($urandom_range(0, 99));
      if (i == NSYMS / 2) bp = 0;
      s = (r < 55) ? 8'(90 + (i / 400)) : (r < 80) ? 8'($urandom_range(80, 110)) : 8'($urandom_range(0, 255));
      @(negedge clk);
      in_valid = 0;
      if (bp) while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_flush = 0; in_sym = s;
      #1;
      if (i == NSYMS / 2 + 10) t0 = $time;
      while (!in_ready) @(negedge clk);
      void'(re.encode(s));
      @(posedge clk); #1;
      check(a_reg == 16'(re.a), $sformatf("A after symbol %0d: %h vs %h", i, a_reg, re.a));
    end
    steps = int'(($time - t0) / 10);
    check(steps >= 2 * (NSYMS / 2 - 11) && steps <= 2 * (NSYMS / 2 - 11) + 4,
          $sformatf("rate: %0d cycles for %0d symbols", steps, NSYMS / 2 - 11));
    @(negedge clk);
    in_flush = 1;
    #1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0; in_flush = 0;
    repeat (20) @(negedge clk);
    re.flush();
    while (got.size() % 16 != 0) got.push_back(1'b0);
    check(got.size() == re.bits.size(), $sformatf("stream length %0d vs %0d", got.size(), re.bits.size()));
    for (int i = 0; i < got.size() && i < re.bits.size(); i++)
      check(got[i] == re.bits[i], $sformatf("stream bit %0d", i));
    $display("%0d symbols coded into %0d bits", NSYMS, got.size());
    check(!carry_lost, "no carry lost");
    check(a_reg == 16'h8000, "restart after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
