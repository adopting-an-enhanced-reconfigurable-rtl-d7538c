// tb_msic_workloads: runs the Johnson-counter test-per-scan MSIC generator
// at the two ends of the ISCAS'89 size range the scheme is sized for: a
// 20-bit seed with 54-cell chains and a 38-bit seed with 87-cell chains,
// 10 chains each, one seed. For each it predicts every scan-in bit with a
// Johnson-counter model, counts the 2L scan loads of the seed, checks that
// each chain receives 2L different words, and checks the cycle count
// L + 1 + 2L(L+2).
module tb_msic_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic start;
  logic [15:0] ns;
  logic [9:0] si_a, si_b; logic [19:0] pi_a; logic [37:0] pi_b;
  logic se_a, cp_a, bu_a, dn_a, se_b, cp_b, bu_b, dn_b;

  msic_tpg_scan #(.M(10), .L(54), .SEED_W(20)) u_a (.clk, .rst_n, .start, .num_seeds(ns),
    .scan_in(si_a), .pi(pi_a), .se(se_a), .capture(cp_a), .busy(bu_a), .done(dn_a));
  msic_tpg_scan #(.M(10), .L(87), .SEED_W(38)) u_b (.clk, .rst_n, .start, .num_seeds(ns),
    .scan_in(si_b), .pi(pi_b), .se(se_b), .capture(cp_b), .busy(bu_b), .done(dn_b));

  // one checker per instance, written for the larger size and masked down
  task automatic check_run(input int L, input int which);
    logic [86:0] J; logic [86:0] chain [10]; logic [86:0] hist [10][$];
    int cyc = 0, loads = 0, bad = 0, dup = 0;
    logic jstep, rjm, ini, se, cp, dn; logic [9:0] si, pi10;
    J = '0;
    while (cyc < 20000) begin
      if (which == 0) begin jstep = u_a.jc_step; rjm = u_a.rj_mode; ini = u_a.init; se = se_a; cp = cp_a; dn = dn_a; si = si_a; pi10 = pi_a[9:0]; end
      else            begin jstep = u_b.jc_step; rjm = u_b.rj_mode; ini = u_b.init; se = se_b; cp = cp_b; dn = dn_b; si = si_b; pi10 = pi_b[9:0]; end
      if (dn) break;
      if (se) for (int i = 0; i < 10; i++) begin
        if (si[i] !== (J[i] ^ pi10[i])) bad++;
        chain[i] = {chain[i][85:0], si[i]};
      end
      if (jstep) begin
        if (!rjm) J = {J[85:0], ~J[L-1]};
        else if (ini) J = {J[85:0], J[L-1]};
        else J = {J[85:0], 1'b0};
        J &= (87'd1 << L) - 1;
      end
      if (cp) begin
        for (int i = 0; i < 10; i++) begin
          logic [86:0] w;
          w = chain[i] & ((87'd1 << L) - 1);
          foreach (hist[i][h]) if (hist[i][h] == w) dup++;
          hist[i].push_back(w);
        end
        loads++;
      end
      @(negedge clk); cyc++;
    end
    checks++; if (bad != 0)  begin failures++; $display("FAIL L=%0d scan-in %0d", L, bad); end
    checks++; if (dup != 0)  begin failures++; $display("FAIL L=%0d repeated words %0d", L, dup); end
    checks++; if (loads != 2 * L) begin failures++; $display("FAIL L=%0d loads %0d", L, loads); end
    checks++; if (cyc != L + 1 + 2 * L * (L + 2)) begin failures++; $display("FAIL L=%0d cycles %0d", L, cyc); end
    $display("L=%0d: %0d loads in %0d cycles", L, loads, cyc);
  endtask

  initial begin
    start = 0; ns = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      check_run(54, 0);
      check_run(87, 1);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
