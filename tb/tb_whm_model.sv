// tb_whm_model: checks the weighted history modeling unit against the
// reference model of ac_ref_pkg (history queue, occurrence counts and the
// last-symbol rule). Random symbols are fed in, with random gaps. An update
// must keep 'busy' high for exactly one cycle (two array updates per symbol).
// After each update the lookup port, the last symbol and its Q and n, and
// a search for a random target must match the reference.
module tb_whm_model;
  import ac_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [7:0] lk_sym = 0, mps, srch_sym, upd_sym = 0;
  logic [11:0] lk_q, lk_n, mps_q, mps_n, srch_t = 0;
  logic upd_valid = 0, busy;
  int checks = 0, failures = 0;
  ref_model rm;

  always #5 clk = ~clk;
  whm_model dut (.*);

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

  task automatic compare(int n);
    int unsigned t;
    lk_sym = 8'($urandom);
    t = $urandom_range(0, 2047);
    srch_t = 12'(t);
    #1;
    check(lk_q == 12'(rm.q(lk_sym)) && lk_n == 12'(rm.n(lk_sym)), $sformatf("lookup %0d after %0d", lk_sym, n));
    check(mps == 8'(rm.mps), $sformatf("last symbol after %0d: %0d want %0d", n, mps, rm.mps));
    check(mps_q == 12'(rm.q(rm.mps)) && mps_n == 12'(rm.n(rm.mps)), "last symbol Q, n");
    check(srch_sym == 8'(rm.search(t)), $sformatf("search %0d after %0d", t, n));
  endtask

  initial begin
    int unsigned s;
    rm = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare(-1);
    for (int n = 0; n < 1500; n++) begin
      s = ($urandom_range(0, 2) != 0) ? 100 + (n / 250) * 7 + $urandom_range(0, 2) : $urandom_range(0, 255);
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      upd_valid = 1; upd_sym = 8'(s);
      #1;
      check(!busy, "idle before update");
      @(negedge clk);
      upd_valid = 0;
      check(busy, "busy in the second update cycle");
      @(negedge clk);
      check(!busy, "done after two cycles");
      rm.update(s);
      compare(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
