// tb_hist_buf: checks the history buffer at its default size (256 symbols,
// 112 entries) against a queue. After reset the oldest entry must be the
// last of the uniform initial pattern. The buffer then takes random symbols
// with random idle cycles, and 'tail' must always be the symbol that entered
// 112 shifts earlier. 'clear' must restore the initial pattern.
module tb_hist_buf;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [7:0] sym_in = 0, tail;
  int checks = 0, failures = 0;
  int unsigned q[$];

  always #5 clk = ~clk;
  hist_buf dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 112; i++) q.push_back((i * 256) / 112);   // q[$] is the oldest
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      check(tail == 8'(q[$]), $sformatf("tail at step %0d: %0d want %0d", k, tail, q[$]));
      shift = ($urandom_range(0, 3) != 0);
      sym_in = 8'($urandom);
      if (shift) begin
        void'(q.pop_back());
        q.push_front(sym_in);
      end
    end
    @(negedge clk);
    shift = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    check(tail == 8'((111 * 256) / 112), "tail after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
