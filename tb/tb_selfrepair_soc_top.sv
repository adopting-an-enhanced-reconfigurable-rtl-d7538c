// tb_selfrepair_soc_top: end-to-end test of the whole design at its default
// sizes (no parameter is overridden).
// Self-repair: RAM 0 gets a defective row and one more bad cell, RAM 1 a
// defective column and one more bad cell; after start_test, repair_ok must
// be high and every logical cell of both RAMs must store a random pattern.
// After a reset a start_load alone must restore the repair from the fuses.
// Pattern generators: the three MSIC generators run at the same time (one
// seed for each test-per-scan form, four for test-per-clock). Scan-in bits
// of the Johnson form are predicted by a model here; each form must give
// 2L = 128 scan loads per seed and a capture after each; the test-per-clock
// patterns of a seed must all differ.
// Every mechanism must occur at least once: fault report, BIST hold, spare
// row used, spare column used, fuse-to-wrapper transfer, reload after reset,
// Johnson-counter initialisation, counter and circular-shift modes, seed
// step, scalable-counter fill flip, test-per-clock pattern.
module tb_selfrepair_soc_top;
  import bisr_pkg::*;
  localparam int L = 64, M = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bst, bld, bbusy, bdone, bok, bfail, bhold;
  logic r0_en, r0_we, r0_wd, r0_rd, r1_en, r1_we, r1_wd, r1_rd;
  logic [2:0] r0_row, r0_col, r1_col; logic [3:0] r1_row;
  logic [80:0] d0m, d0v; logic [152:0] d1m, d1v;
  logic [7:0] fcnt; repair_sig_t s0, s1;
  logic tps_start, sic_start, tpc_start;
  logic [15:0] tps_ns, sic_ns, tpc_ns;
  logic [9:0] tps_si, sic_si; logic [19:0] tps_pi, sic_pi; logic [63:0] tpc_pi;
  logic tps_se, tps_cp, tps_busy, tps_done, sic_se, sic_cp, sic_busy, sic_done, tpc_valid, tpc_busy, tpc_done;

  selfrepair_soc_top dut (
    .clk, .rst_n, .bisr_start_test(bst), .bisr_start_load(bld), .bisr_busy(bbusy), .bisr_done(bdone),
    .bisr_repair_ok(bok),
    .ram0_en(r0_en), .ram0_we(r0_we), .ram0_row(r0_row), .ram0_col(r0_col), .ram0_wdata(r0_wd), .ram0_rdata(r0_rd),
    .defect0_mask(d0m), .defect0_val(d0v),
    .ram1_en(r1_en), .ram1_we(r1_we), .ram1_row(r1_row), .ram1_col(r1_col), .ram1_wdata(r1_wd), .ram1_rdata(r1_rd),
    .defect1_mask(d1m), .defect1_val(d1v),
    .bist_fail(bfail), .bira_hold(bhold), .bira_fault_cnt(fcnt), .ram0_sig(s0), .ram1_sig(s1),
    .tps_start, .tps_num_seeds(tps_ns), .tps_scan_in(tps_si), .tps_pi, .tps_se, .tps_capture(tps_cp),
    .tps_busy, .tps_done,
    .sic_start, .sic_num_seeds(sic_ns), .sic_scan_in(sic_si), .sic_pi, .sic_se, .sic_capture(sic_cp),
    .sic_busy, .sic_done,
    .tpc_start, .tpc_num_seeds(tpc_ns), .tpc_pi, .tpc_valid, .tpc_busy, .tpc_done);

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_fault = 0, n_hold = 0, n_xfer = 0, n_reload = 0, n_row = 0, n_col = 0;
  int n_init = 0, n_jstep = 0, n_circ = 0, n_seed = 0, n_flip = 0, n_tpc = 0;
  int tps_loads = 0, sic_loads = 0, tps_bad = 0, tpc_dup = 0;
  logic bfail_q = 0, pol_q = 1;
  logic [L-1:0] J = '0;
  logic [63:0] tpc_seen [$];

  always @(posedge clk) if (rst_n) begin
    bfail_q <= bfail;
    if (bfail && !bfail_q) n_fault++;
    if (bhold) n_hold++;
    if (bdone) n_xfer++;
    // Johnson-counter test-per-scan generator, checked against a model
    if (dut.u_tpg_scan.jc_step) begin
      if (dut.u_tpg_scan.rj_mode && !dut.u_tpg_scan.init) n_init++;
      if (!dut.u_tpg_scan.rj_mode) n_jstep++;
      if (dut.u_tpg_scan.rj_mode && dut.u_tpg_scan.init) n_circ++;
    end
    if (dut.u_tpg_scan.seed_step) n_seed++;
    if (tps_se)
      for (int i = 0; i < M; i++) if (tps_si[i] !== (J[i] ^ tps_pi[i])) tps_bad++;
    if (dut.u_tpg_scan.jc_step) begin
      if (!dut.u_tpg_scan.rj_mode) J = {J[L-2:0], ~J[L-1]};
      else if (dut.u_tpg_scan.init) J = {J[L-2:0], J[L-1]};
      else J = {J[L-2:0], 1'b0};
    end
    if (tps_cp) tps_loads++;
    if (sic_cp) sic_loads++;
    pol_q <= dut.u_tpg_sic.g_scalable.u_sic.pol;
    if (pol_q != dut.u_tpg_sic.g_scalable.u_sic.pol) n_flip++;
    if (tpc_valid) begin
      n_tpc++;
      foreach (tpc_seen[h]) if (tpc_seen[h] == tpc_pi) tpc_dup++;
      tpc_seen.push_back(tpc_pi);
      if (tpc_seen.size() == 16) tpc_seen.delete();
    end
  end

  task automatic defect(input int ram, input int r, input int c);
    if (ram == 0) begin d0m[r*9+c] = 1; d0v[r*9+c] = 1'($urandom); end
    else          begin d1m[r*9+c] = 1; d1v[r*9+c] = 1'($urandom); end
  endtask

  task automatic mem_check(input int ram, output int bad);
    int nr; logic pat [16][8];
    nr = (ram != 0) ? 16 : 8; bad = 0;
    for (int r = 0; r < nr; r++) for (int c = 0; c < 8; c++) begin
      pat[r][c] = 1'($urandom);
      @(negedge clk);
      if (ram == 0) begin r0_en = 1; r0_we = 1; r0_row = 3'(r); r0_col = 3'(c); r0_wd = pat[r][c]; end
      else          begin r1_en = 1; r1_we = 1; r1_row = 4'(r); r1_col = 3'(c); r1_wd = pat[r][c]; end
    end
    for (int r = 0; r < nr; r++) for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      if (ram == 0) begin r0_en = 1; r0_we = 0; r0_row = 3'(r); r0_col = 3'(c); end
      else          begin r1_en = 1; r1_we = 0; r1_row = 4'(r); r1_col = 3'(c); end
      @(negedge clk); r0_en = 0; r1_en = 0;
      if (((ram != 0) ? r1_rd : r0_rd) !== pat[r][c]) bad++;
    end
    @(negedge clk); r0_en = 0; r1_en = 0;
  endtask

  task automatic bisr(input bit test);
    @(negedge clk); if (test) bst = 1; else bld = 1;
    @(negedge clk); bst = 0; bld = 0;
    while (!bdone) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int bad;
    bst = 0; bld = 0; r0_en = 0; r0_we = 0; r0_wd = 0; r0_row = 0; r0_col = 0;
    r1_en = 0; r1_we = 0; r1_wd = 0; r1_row = 0; r1_col = 0;
    d0m = '0; d0v = '0; d1m = '0; d1v = '0;
    tps_start = 0; sic_start = 0; tpc_start = 0; tps_ns = 1; sic_ns = 1; tpc_ns = 4;
    repeat (3) @(negedge clk); rst_n = 1;

    // start the pattern generators; they run alongside the repair flow
    @(negedge clk); tps_start = 1; sic_start = 1; tpc_start = 1;
    @(negedge clk); tps_start = 0; sic_start = 0; tpc_start = 0;

    defect(0, 5, 1); defect(0, 5, 6); defect(0, 2, 3);
    defect(1, 4, 6); defect(1, 13, 6); defect(1, 8, 1);
    bisr(1);
    checks++; if (!bok) begin failures++; $display("FAIL repair_ok"); end
    if (s0.rae) n_row++; if (s0.cae) n_col++; if (s1.rae) n_row++; if (s1.cae) n_col++;
    mem_check(0, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram0 %0d", bad); end
    mem_check(1, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram1 %0d", bad); end

    // reset keeps the fuses; reload restores the repair
    wait (tps_done && sic_done);   // do not reset the generators mid-run
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    bisr(0); n_reload++;
    mem_check(0, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram0 after reload %0d", bad); end
    mem_check(1, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram1 after reload %0d", bad); end

    checks++; if (tps_bad != 0) begin failures++; $display("FAIL johnson scan-in %0d", tps_bad); end
    checks++; if (tps_loads != 2 * L || sic_loads != 2 * L) begin failures++; $display("FAIL loads %0d %0d", tps_loads, sic_loads); end
    checks++; if (tpc_dup != 0) begin failures++; $display("FAIL tpc repeats %0d", tpc_dup); end

    $display("faults %0d holds %0d transfers %0d reloads %0d spare rows %0d spare cols %0d",
             n_fault, n_hold, n_xfer, n_reload, n_row, n_col);
    $display("jc init %0d jc steps %0d circular %0d seeds %0d fill flips %0d tpc patterns %0d",
             n_init, n_jstep, n_circ, n_seed, n_flip, n_tpc);
    begin
      int cnt [12];
      cnt = '{n_fault, n_hold, n_xfer, n_reload, n_row, n_col, n_init, n_jstep, n_circ, n_seed, n_flip, n_tpc};
      foreach (cnt[i]) begin
        checks++; if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
