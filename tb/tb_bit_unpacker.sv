// tb_bit_unpacker: random 16-bit words enter the unpacker with random gaps;
// the consumer takes random counts of 0..16 bits whenever that many are
// available. At each step the window's first 'avail' bits (up to 16) must be
// the next bits of the word stream. At the end every bit must have been
// seen in order.
module tb_bit_unpacker;
  logic clk = 0, rst_n = 0, clear = 0;
  logic wd_valid = 0, wd_ready, take = 0;
  logic [15:0] wd_data = 0, window;
  logic [5:0] avail;
  logic [4:0] take_cnt = 0;
  int checks = 0, failures = 0;
  bit stream[$];
  int unsigned pos = 0;

  always #5 clk = ~clk;
  bit_unpacker dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer
  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wd_valid = 0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      wd_valid = 1; wd_data = 16'($urandom);
      for (int i = 15; i >= 0; i--) stream.push_back(wd_data[i]);
      #1;
      while (!wd_ready) @(negedge clk);
    end
    @(negedge clk);
    wd_valid = 0;
  end

  // Consumer
  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (pos < 16000) begin
      @(negedge clk);
      #2;
      for (int i = 0; i < 16 && i < int'(avail); i++) begin
        checks++;
        if (window[15-i] != stream[pos + i]) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d", pos + i);
        end
      end
      c = $urandom_range(0, 16);
      if (c <= int'(avail)) begin
        take = 1; take_cnt = 5'(c);
      end else take = 0;
      @(posedge clk);
      if (take) pos += c;
      #1 take = 0;
    end
    checks++;
    if (pos != 16000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
