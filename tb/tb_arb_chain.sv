// tb_arb_chain: exhaustive check of the 16-cell arbitration chain. For every
// 16-bit request word the grant must be one-hot on the highest set bit (zero
// for an all-zero word) and 'any' must tell whether a bit was set.
module tb_arb_chain;
  logic [15:0] req, grant, exp_grant;
  logic        any;
  int checks = 0, failures = 0;

  arb_chain #(.W(16)) dut (.req, .grant, .any);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      req = 16'(v);
      #1;
      exp_grant = '0;
      for (int b = 0; b < 16; b++) if (req[b]) exp_grant = 16'(1) << b;
      checks++;
      if (grant !== exp_grant || any !== (v != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: req=%h grant=%h any=%b", req, grant, any);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
