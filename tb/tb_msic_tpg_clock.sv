// tb_msic_tpg_clock: runs the 8 x 8 test-per-clock MSIC generator for three
// seeds. With a Johnson counter model here (cleared, then one counter step
// per valid cycle) it recovers the seed from each pattern as
// S_j = pi(i,j) XOR J_i and checks that every row gives the same seed, that
// the seed is constant over the 16 patterns of a seed and non-zero, that the
// next seed is the previous one shifted by one stage, that the 16 patterns
// of a seed are all different and neighbours differ in exactly one row of 8
// inputs, and that the run takes 8 + 3*17 cycles.
module tb_msic_tpg_clock;
  localparam int N = 8, M = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, valid, busy, done;
  logic [15:0] ns;
  logic [N*M-1:0] pi;

  msic_tpg_clock dut (.clk, .rst_n, .start, .num_seeds(ns), .pi, .valid, .busy, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] J; logic [M-1:0] S, Sseed, Sprev;
    logic [N*M-1:0] pats [$]; logic [N*M-1:0] prevp;
    int cyc = 0, k = 0, bad_row = 0, bad_seed = 0, bad_next = 0, dup = 0, bad_sic = 0, nseeds = 0;
    start = 0; ns = 3; J = '0; Sprev = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 1000) begin
      if (valid) begin
        if (k == 0) begin pats.delete(); end
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < M; j++) S[j] = pi[i*M + j] ^ J[i];
          if (i == 0 && k == 0) begin
            Sseed = S; nseeds++;
            if (nseeds > 1 && S[M-1:1] != Sprev[M-2:0]) bad_next++;
            if (S == '0) bad_seed++;
          end
          if (S != Sseed) bad_row++;
        end
        foreach (pats[h]) if (pats[h] == pi) dup++;
        if (k > 0 && $countones(pi ^ prevp) != M) bad_sic++;
        pats.push_back(pi); prevp = pi;
        J = {J[N-2:0], ~J[N-1]};
        k++;
        if (k == 2 * N) begin k = 0; Sprev = Sseed; end
      end
      @(negedge clk); cyc++;
    end
    checks++; if (bad_row != 0)  begin failures++; $display("FAIL rows disagree %0d", bad_row); end
    checks++; if (bad_seed != 0) begin failures++; $display("FAIL zero seed"); end
    checks++; if (bad_next != 0) begin failures++; $display("FAIL seed sequence"); end
    checks++; if (dup != 0)      begin failures++; $display("FAIL repeated patterns %0d", dup); end
    checks++; if (bad_sic != 0)  begin failures++; $display("FAIL not one-row change %0d", bad_sic); end
    checks++; if (nseeds != 3)   begin failures++; $display("FAIL seeds %0d", nseeds); end
    checks++; if (cyc != N + 3 * (2 * N + 1)) begin failures++; $display("FAIL cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
