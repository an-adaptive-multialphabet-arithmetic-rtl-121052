// tb_mps_tracker: drives the last-symbol tracker with the updates of a random
// symbol stream over a 16-symbol alphabet, using a reference history and
// occurrence array. Before each update it hands the tracker the
// reference counts. Its choice must match the reference rule: a new symbol
// takes over when it then occurs more often than the held one. The test also
// requires that the held symbol changed several times.
module tb_mps_tracker;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0;
  logic [7:0] cur = 0, prev = 0, mps;
  logic [6:0] occ_cur = 0, occ_mps = 0;
  int checks = 0, failures = 0, changes = 0;
  int unsigned occ[256], hist[$], ref_mps;

  always #5 clk = ~clk;
  mps_tracker dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned c, p;
    foreach (occ[i]) occ[i] = 0;
    for (int i = 0; i < 40; i++) begin hist.push_back(0); end
    occ[0] = 40;
    ref_mps = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      c = ((n / 200) % 2 == 0) ? (($urandom_range(0, 1) == 0) ? (n / 200) % 16 : $urandom_range(0, 15))
                               : $urandom_range(0, 15);
      p = hist[$];
      @(negedge clk);
      upd = 1; cur = 8'(c); prev = 8'(p); occ_cur = 7'(occ[c]); occ_mps = 7'(occ[ref_mps]);
      @(negedge clk);
      upd = 0;
      void'(hist.pop_back()); hist.push_front(c);
      occ[p]--; occ[c]++;
      if (c != ref_mps && occ[c] > occ[ref_mps]) begin ref_mps = c; changes++; end
      checks++;
      if (mps != 8'(ref_mps)) begin
        failures++;
        if (failures < 10) $display("FAIL: update %0d: mps %0d want %0d", n, mps, ref_mps);
      end
    end
    checks++;
    if (changes < 5) failures++;
    $display("%0d changes of the last symbol", changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
