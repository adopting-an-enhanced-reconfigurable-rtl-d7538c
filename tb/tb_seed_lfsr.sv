// tb_seed_lfsr: checks the seed generators of width 8, 10 and the default 20:
// starting from the reset state 1, each step shifts the register by one
// towards the MSB, the state never becomes zero, and it first returns to 1
// after exactly 2^W-1 steps (a maximal-length, primitive polynomial). Steps
// are only taken with step high.
module tb_seed_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step;
  logic [7:0] s8; logic [9:0] s10; logic [19:0] s20;
  int checks = 0, failures = 0;

  seed_lfsr #(.W(8))  u8  (.clk, .rst_n, .step, .seed(s8));
  seed_lfsr #(.W(10)) u10 (.clk, .rst_n, .step, .seed(s10));
  seed_lfsr dut (.clk, .rst_n, .step, .seed(s20));

  initial begin
    repeat (1100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int per8 = 0, per10 = 0, per20 = 0, n = 0, shift_bad = 0;
  logic [19:0] prev20;
  initial begin
    step = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (s8 != 1 || s10 != 1 || s20 != 1) begin failures++; $display("FAIL reset state"); end
    @(negedge clk);
    checks++; if (s20 != 1) begin failures++; $display("FAIL moved without step"); end
    step = 1;
    while (per20 == 0) begin
      prev20 = s20;
      @(negedge clk); n++;
      if (s20[19:1] != prev20[18:0] || s20 == 0) shift_bad++;
      if (per8 == 0 && s8 == 1) per8 = n;
      if (per10 == 0 && s10 == 1) per10 = n;
      if (s20 == 1) per20 = n;
    end
    checks++; if (per8 != 255)     begin failures++; $display("FAIL period8 %0d", per8); end
    checks++; if (per10 != 1023)   begin failures++; $display("FAIL period10 %0d", per10); end
    checks++; if (per20 != 1048575) begin failures++; $display("FAIL period20 %0d", per20); end
    checks++; if (shift_bad != 0)  begin failures++; $display("FAIL shift %0d", shift_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
