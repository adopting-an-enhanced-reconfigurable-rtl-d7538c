// tb_msic_xor_net: random operands, output compared bit by bit with the
// XOR worked out here.
module tb_msic_xor_net;
  logic [9:0] a, b, y;
  int checks = 0, failures = 0;
  msic_xor_net dut (.a, .b, .y);
  initial begin
    for (int t = 0; t < 200; t++) begin
      a = 10'($urandom); b = 10'($urandom); #1;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (y[i] !== (a[i] != b[i])) begin failures++; $display("FAIL bit %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
