// tb_reconfig_johnson: checks the 64-stage reconfigurable Johnson counter
// against a model in this test bench, in all three modes: initialisation
// (64 steps from a random state give all zeros), Johnson counter mode (2L
// distinct vectors, neighbours differing in one bit, period 2L) and circular
// shift (each step rotates by one, L steps give the vector back). A step
// only happens with step high.
module tb_reconfig_johnson;
  localparam int L = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step, rj_mode, init;
  logic [L-1:0] q, m;
  int checks = 0, failures = 0;

  reconfig_johnson dut (.clk, .rst_n, .step, .rj_mode, .init, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_step(input logic mode, input logic in_init);
    @(negedge clk); step = 1; rj_mode = mode; init = in_init;
    @(negedge clk); step = 0;
    if (!mode)       m = {m[L-2:0], ~m[L-1]};
    else if (in_init) m = {m[L-2:0], m[L-1]};
    else             m = {m[L-2:0], 1'b0};
    checks++; if (q !== m) begin failures++; $display("FAIL mode %b init %b q %h exp %h", mode, in_init, q, m); end
  endtask

  initial begin
    logic [L-1:0] seen [$];
    logic [L-1:0] prev, v0;
    int sic_bad = 0;
    step = 0; rj_mode = 0; init = 0;
    repeat (2) @(negedge clk); rst_n = 1; m = '0;
    // scramble with Johnson and circular steps
    for (int i = 0; i < 37; i++) do_step(1'($urandom), 1);
    // initialisation mode clears in L steps
    for (int i = 0; i < L; i++) do_step(1, 0);
    checks++; if (q !== '0) begin failures++; $display("FAIL not cleared"); end
    // Johnson mode: 2L distinct single-input-change vectors
    for (int i = 0; i < 2 * L; i++) begin
      prev = q; do_step(0, 1);
      if ($countones(q ^ prev) != 1) sic_bad++;
      foreach (seen[k]) if (seen[k] == q) begin failures++; $display("FAIL repeat at %0d", i); end
      if (i < 2 * L - 1) seen.push_back(q);
    end
    checks++; if (sic_bad != 0) begin failures++; $display("FAIL SIC %0d", sic_bad); end
    checks++; if (q !== '0) begin failures++; $display("FAIL period"); end
    // circular mode: rotation, L steps restore
    for (int i = 0; i < 20; i++) do_step(0, 1);
    v0 = q;
    for (int i = 0; i < L; i++) do_step(1, 1);
    checks++; if (q !== v0) begin failures++; $display("FAIL circular"); end
    // no step, no change
    prev = q; @(negedge clk); rj_mode = 0; @(negedge clk);
    checks++; if (q !== prev) begin failures++; $display("FAIL moved without step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
