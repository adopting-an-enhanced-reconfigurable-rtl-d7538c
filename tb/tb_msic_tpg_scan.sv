// tb_msic_tpg_scan: runs both test-per-scan MSIC generators at the default
// size (10 chains of 64 cells, 20-bit seed) for two seeds.
// Johnson-counter form: a model of the Johnson counter here predicts every
// scan-in bit as J_i XOR S_i (S from the primary-input outputs); each load
// must give the 10 chains 10 different contents (except for the all-0 and
// all-1 Johnson vectors, where a chain's word is its constant seed bit), each chain must get 128
// different contents per seed, the PIs must stay fixed within a seed and
// change between seeds, and the run must take 64 + 2*(1 + 128*66) cycles.
// Scalable-counter form: a model of the SIC stream and shift register
// predicts every scan-in bit.
module tb_msic_tpg_scan;
  localparam int M = 10, L = 64, W = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start; logic [15:0] ns;
  logic [M-1:0] si_j, si_s; logic [W-1:0] pi_j, pi_s;
  logic se_j, cp_j, b_j, d_j, se_s, cp_s, b_s, d_s;

  msic_tpg_scan dut (.clk, .rst_n, .start, .num_seeds(ns), .scan_in(si_j), .pi(pi_j),
    .se(se_j), .capture(cp_j), .busy(b_j), .done(d_j));
  msic_tpg_scan #(.USE_SCALABLE(1'b1)) u_sc (.clk, .rst_n, .start, .num_seeds(ns), .scan_in(si_s), .pi(pi_s),
    .se(se_s), .capture(cp_s), .busy(b_s), .done(d_s));

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [L-1:0] J;
    logic [L-1:0] chain [M];
    logic [L-1:0] hist [M][$];
    logic [W-1:0] seed_prev;
    int cyc = 0, loads = 0, t = 0, bad_j = 0, bad_s = 0, dup_in_load = 0, dup_hist = 0, pi_bad = 0, seeds_seen = 0;
    // scalable model
    logic [M-1:0] mq; int sn = 0, st = 0;
    start = 0; ns = 2; J = '0; mq = '0; seed_prev = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!d_j && cyc < 30000) begin
      // Johnson form: act on the control visible this cycle
      if (dut.seed_step) begin
        foreach (hist[i]) hist[i].delete();
      end
      if (dut.jc_step && !dut.rj_mode) J = {J[L-2:0], ~J[L-1]};
      if (se_j) begin
        if (t == 0 && loads % (2 * L) == 0) begin
          seeds_seen++;
          if (pi_j == seed_prev) pi_bad++;
          seed_prev = pi_j;
        end
        if (pi_j != seed_prev) pi_bad++;
        for (int i = 0; i < M; i++) begin
          if (si_j[i] !== (J[i] ^ pi_j[i])) bad_j++;
          chain[i] = {chain[i][L-2:0], si_j[i]};
        end
        J = {J[L-2:0], J[L-1]};
        t++;
      end
      if (cp_j) begin
        // all-0 and all-1 Johnson vectors give every chain a constant word
        if (J != '0 && J != '1)
          for (int i = 0; i < M; i++) for (int k = i + 1; k < M; k++) if (chain[i] == chain[k]) dup_in_load++;
        for (int i = 0; i < M; i++) begin
          foreach (hist[i][h]) if (hist[i][h] == chain[i]) dup_hist++;
          hist[i].push_back(chain[i]);
        end
        loads++; t = 0;
      end
      // scalable form
      if (se_s) begin
        int c; logic pol, b;
        c = sn % L; pol = ((sn / L) % 2) == 0;
        b = (st < c) ? pol : !pol;
        mq = {mq[M-2:0], b};
        st++;
      end
      if (cp_s) begin sn++; st = 0; end
      @(negedge clk); cyc++;
      if (se_s && st > 0 && si_s !== (mq ^ pi_s[M-1:0])) bad_s++;
    end
    checks++; if (bad_j != 0) begin failures++; $display("FAIL johnson scan-in %0d", bad_j); end
    checks++; if (bad_s != 0) begin failures++; $display("FAIL scalable scan-in %0d", bad_s); end
    checks++; if (dup_in_load != 0) begin failures++; $display("FAIL chains alike %0d", dup_in_load); end
    checks++; if (dup_hist != 0) begin failures++; $display("FAIL repeated codewords %0d", dup_hist); end
    checks++; if (pi_bad != 0 || seeds_seen != 2) begin failures++; $display("FAIL pi %0d seeds %0d", pi_bad, seeds_seen); end
    checks++; if (loads != 2 * 2 * L) begin failures++; $display("FAIL loads %0d", loads); end
    checks++; if (cyc != L + 2 * (1 + 2 * L * (L + 2))) begin failures++; $display("FAIL cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
