// tb_mbca: checks the multibase cumulative occurrence array at its default
// size (16 banks of 16, M = 112, W = 16) against a plain occurrence array.
// Random pairs of updates (one symbol -1, another +1, as the model makes
// them) are applied. After each pair, random symbols are read on all three
// ports and compared with Q(x) = 16 * (occurrences below x) + x and
// n(x) = 16 * occ(x) + 1. Random targets are searched and compared with the
// largest x whose Q(x) does not exceed the target.
module tb_mbca;
  logic clk = 0, rst_n = 0, clear = 0;
  logic upd_en = 0, upd_up = 0;
  logic [7:0] upd_sym = 0, a_sym = 0, b_sym = 0, c_sym = 0, srch_sym;
  logic [11:0] a_q, a_n, b_q, b_n, srch_t = 0;
  logic [6:0] b_occ, c_occ;
  int checks = 0, failures = 0;
  int unsigned occ[256];

  always #5 clk = ~clk;
  mbca dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned q_ref(int unsigned x);
    int unsigned c = 0;
    for (int unsigned j = 0; j < x; j++) c += occ[j];
    return 16 * c + x;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check();
    for (int k = 0; k < 6; k++) begin
      int unsigned t, best;
      a_sym = 8'($urandom); b_sym = 8'($urandom); c_sym = 8'($urandom);
      t = $urandom_range(0, 2047);
      srch_t = 12'(t);
      #1;
      check(a_q == 12'(q_ref(a_sym)) && a_n == 12'(16 * occ[a_sym] + 1), $sformatf("port a, sym %0d", a_sym));
      check(b_q == 12'(q_ref(b_sym)) && b_n == 12'(16 * occ[b_sym] + 1) && b_occ == 7'(occ[b_sym]),
            $sformatf("port b, sym %0d", b_sym));
      check(c_occ == 7'(occ[c_sym]), $sformatf("port c, sym %0d", c_sym));
      best = 0;
      for (int unsigned x = 0; x < 256; x++) if (q_ref(x) <= t) best = x;
      check(srch_sym == 8'(best), $sformatf("search %0d: %0d want %0d", t, srch_sym, best));
    end
  endtask

  initial begin
    int unsigned dn, up;
    foreach (occ[i]) occ[i] = 0;
    for (int i = 0; i < 112; i++) occ[(i * 256) / 112]++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    read_check();
    for (int n = 0; n < 400; n++) begin
      // pick a symbol that occurs, and a symbol to add (often a favourite)
      do dn = $urandom_range(0, 255); while (occ[dn] == 0);
      up = ($urandom_range(0, 1) == 0) ? $urandom_range(0, 255) : 8'd77 + $urandom_range(0, 3);
      @(negedge clk);
      upd_en = 1; upd_up = 0; upd_sym = 8'(dn);
      @(negedge clk);
      upd_up = 1; upd_sym = 8'(up);
      @(negedge clk);
      upd_en = 0;
      occ[dn]--; occ[up]++;
      read_check();
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    foreach (occ[i]) occ[i] = 0;
    for (int i = 0; i < 112; i++) occ[(i * 256) / 112]++;
    read_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
