// tb_bit_packer: random groups of 0..16 bits (with junk below the valid
// bits) are pushed into the packer with random word back-pressure; the last
// group is marked as padding. The words that leave must hold exactly the
// pushed bits in order, zero-padded to a whole word, and in_ready must drop
// whenever more than 16 bits are held.
module tb_bit_packer;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_pad = 0, in_ready, wd_valid, wd_ready = 0;
  logic [15:0] in_bits = 0, wd_data;
  logic [4:0] in_cnt = 0;
  int checks = 0, failures = 0, stalls = 0;
  bit sent[$], recv[$];

  always #5 clk = ~clk;
  bit_packer dut (.*);

  always @(posedge clk) begin
    if (rst_n && wd_valid && wd_ready) for (int i = 15; i >= 0; i--) recv.push_back(wd_data[i]);
    if (rst_n && in_valid && !in_ready) stalls++;
    wd_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      c = $urandom_range(0, 16);
      in_valid = 1; in_cnt = 5'(c); in_bits = 16'($urandom); in_pad = (n == 2999);
      for (int i = 0; i < c; i++) sent.push_back(in_bits[15-i]);
      #1;
      checks++;
      if (in_ready != (dut.fill_q <= 16)) failures++;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    while (sent.size() % 16 != 0) sent.push_back(1'b0);
    repeat (20) @(negedge clk);
    checks++;
    if (recv.size() != sent.size()) begin
      failures++;
      $display("FAIL: %0d bits out, %0d expected", recv.size(), sent.size());
    end
    for (int i = 0; i < recv.size() && i < sent.size(); i++) begin
      checks++;
      if (recv[i] != sent[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: bit %0d", i);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
