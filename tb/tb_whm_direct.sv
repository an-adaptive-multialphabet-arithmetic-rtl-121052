// tb_whm_direct: checks the small-alphabet model (16 symbols, M = 127,
// W = 16) against the reference model of ac_ref_pkg. Random symbols are
// applied one per cycle, sometimes back to back. After each update every
// symbol's Q and n, the last symbol with its Q and n, and a search for a
// random target must match the reference.
module tb_whm_direct;
  import ac_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0] lk_sym = 0, mps, srch_sym, upd_sym = 0;
  logic [11:0] lk_q, lk_n, mps_q, mps_n, srch_t = 0;
  logic upd_valid = 0, busy;
  int checks = 0, failures = 0;
  ref_model rm;

  always #50 clk = ~clk;   // long enough for the 17 lookups of one step
  whm_direct dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s, t;
    rm = new(16, 127, 4);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      for (int x = 0; x < 16; x++) begin
        lk_sym = 4'(x);
        #1;
        check(lk_q == 12'(rm.q(x)) && lk_n == 12'(rm.n(x)), $sformatf("symbol %0d after %0d: %0d/%0d want %0d/%0d", x, n, lk_q, lk_n, rm.q(x), rm.n(x)));
      end
      t = $urandom_range(0, 2047);
      srch_t = 12'(t);
      #1;
      check(srch_sym == 4'(rm.search(t)), $sformatf("search %0d after %0d", t, n));
      check(mps == 4'(rm.mps) && mps_q == 12'(rm.q(rm.mps)) && mps_n == 12'(rm.n(rm.mps)),
            $sformatf("last symbol after %0d", n));
      check(!busy, "never busy");
      s = ($urandom_range(0, 1) != 0) ? (n / 300) % 16 : $urandom_range(0, 15);
      upd_valid = ($urandom_range(0, 4) != 0);
      upd_sym = 4'(s);
      @(negedge clk);
      if (upd_valid) rm.update(s);
      upd_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
