// tb_renorm: checks the renormalizer. For every A from 1 to 16'hBFFF (with
// random C and fill words) the shift must be the smallest one that brings A
// to 0.75 or more, A and C must be shifted by it, the fill bits must enter
// C from the right, and out_bits must be C's top 16 bits. Both the
// encoder's 64-bit and the decoder's 16-bit versions are checked.
module tb_renorm;
  logic [15:0] a, fill, a64, a16, ob64, ob16, c16, c16o;
  logic [63:0] c64, c64o;
  logic [3:0]  s64, s16;
  int checks = 0, failures = 0;

  renorm #(.CW(64)) u64 (.a_in(a), .c_in(c64), .fill(16'h0), .shift(s64), .a_out(a64), .c_out(c64o), .out_bits(ob64));
  renorm #(.CW(16)) u16 (.a_in(a), .c_in(c16), .fill(fill), .shift(s16), .a_out(a16), .c_out(c16o), .out_bits(ob16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned es, ea;
    logic [63:0] ec;
    logic [15:0] ec16;
    for (int v = 1; v < 'hC000; v++) begin
      a = 16'(v);
      c64 = {$urandom, $urandom};
      c16 = 16'($urandom);
      fill = 16'($urandom);
      #1;
      es = 0; ea = v;
      while (ea < 'h6000) begin ea = ea * 2; es++; end
      ec = c64;
      ec16 = c16;
      for (int k = 0; k < int'(es); k++) begin
        ec = {ec[62:0], 1'b0};
        ec16 = {ec16[14:0], fill[15-k]};
      end
      check(s64 == 4'(es) && s16 == 4'(es), $sformatf("shift for A=%h: %0d want %0d", a, s64, es));
      check(a64 == 16'(ea) && a16 == 16'(ea), $sformatf("A out for %h", a));
      check(c64o == ec, $sformatf("C64 out for A=%h", a));
      check(c16o == ec16, $sformatf("C16 out for A=%h", a));
      check(ob64 == c64[63:48] && ob16 == c16, "out_bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
