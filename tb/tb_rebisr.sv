// tb_rebisr: end-to-end test of the self-repair subsystem.
//  0. Fault-free RAMs: repair_ok, empty signatures, and the run length.
//  1. Both RAMs get stuck-at defects that one spare row and one spare column
//     can cover (RAM 0: a bad row plus one more cell; RAM 1: a bad column
//     plus one more cell). start_test must end with repair_ok, signatures
//     that cover the defects, and both RAMs must then store and return a
//     random pattern in every logical cell.
//  2. A reset clears the repair registers (the fuses keep their state): the
//     RAMs fail again; start_load alone restores the repair.
//  3. RAM 1 gets a diagonal of three defects: repair_ok must be low.
// It counts fault reports, hold cycles and fuse-to-wrapper transfers.
module tb_rebisr;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_test, start_load, busy, done, repair_ok, bist_fail, bira_hold;
  logic r0_en, r0_we, r0_wd, r0_rd, r1_en, r1_we, r1_wd, r1_rd;
  logic [2:0] r0_row, r0_col, r1_col; logic [3:0] r1_row;
  logic [80:0] d0m, d0v; logic [152:0] d1m, d1v;
  logic [7:0] fcnt; repair_sig_t s0, s1;
  int checks = 0, failures = 0;
  int n_fail = 0, n_hold = 0, n_load = 0;
  // March C- on 64 and 128 cells (15N+1 each) plus 34 cycles of sequencing,
  // one-cycle allocation, fuse programming and the 21-cycle transfer
  localparam int EXP_CLEAN = (15 * 64 + 1) + (15 * 128 + 1) + 34;

  rebisr dut (
    .clk, .rst_n, .start_test, .start_load, .busy, .done, .repair_ok,
    .ram0_en(r0_en), .ram0_we(r0_we), .ram0_row(r0_row), .ram0_col(r0_col), .ram0_wdata(r0_wd), .ram0_rdata(r0_rd),
    .defect0_mask(d0m), .defect0_val(d0v),
    .ram1_en(r1_en), .ram1_we(r1_we), .ram1_row(r1_row), .ram1_col(r1_col), .ram1_wdata(r1_wd), .ram1_rdata(r1_rd),
    .defect1_mask(d1m), .defect1_val(d1v),
    .bist_fail, .bira_hold, .bira_fault_cnt(fcnt), .ram0_sig(s0), .ram1_sig(s1));

  logic fail_q;
  always @(posedge clk) if (rst_n) begin
    fail_q <= bist_fail;
    if (bist_fail && !fail_q) n_fail++;
    if (bira_hold) n_hold++;
    if (done) n_load++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic defect(input int ram, input int r, input int c);
    if (ram == 0) begin d0m[r*9+c] = 1; d0v[r*9+c] = 1'($urandom); end
    else          begin d1m[r*9+c] = 1; d1v[r*9+c] = 1'($urandom); end
  endtask

  // write a random pattern in every logical cell, read back; return mismatches
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

  task automatic go(input bit test);
    @(negedge clk); if (test) start_test = 1; else start_load = 1;
    @(negedge clk); start_test = 0; start_load = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int bad;
    start_test = 0; start_load = 0; r0_en = 0; r0_we = 0; r0_wd = 0; r0_row = 0; r0_col = 0;
    r1_en = 0; r1_we = 0; r1_wd = 0; r1_row = 0; r1_col = 0;
    d0m = '0; d0v = '0; d1m = '0; d1v = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 0. fault-free RAMs: repair_ok, no spare used, and the run length
    begin
      int cyc = 0;
      @(negedge clk); start_test = 1;
      @(negedge clk); start_test = 0;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      $display("fault-free run: %0d cycles", cyc);
      checks++; if (!repair_ok || s0 != '0 || s1 != '0) begin failures++; $display("FAIL fault-free"); end
      checks++; if (cyc != EXP_CLEAN) begin failures++; $display("FAIL run took %0d, expected %0d", cyc, EXP_CLEAN); end
    end

    // 1. repairable defects
    defect(0, 3, 0); defect(0, 3, 4); defect(0, 3, 7); defect(0, 6, 5);
    defect(1, 1, 2); defect(1, 9, 2); defect(1, 14, 2); defect(1, 11, 0);
    go(1);
    checks++; if (!repair_ok) begin failures++; $display("FAIL repair_ok low"); end
    checks++; if (!(s0.rae && s0.rra == 3 && s0.cae && s0.cra == 5)) begin failures++; $display("FAIL sig0 %p", s0); end
    checks++; if (!(s1.cae && s1.cra == 2 && s1.rae && s1.rra == 11)) begin failures++; $display("FAIL sig1 %p", s1); end
    mem_check(0, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram0 %0d bad after repair", bad); end
    mem_check(1, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram1 %0d bad after repair", bad); end

    // 2. reset loses the repair registers, the fuses keep the signatures
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    mem_check(0, bad); checks++; if (bad == 0) begin failures++; $display("FAIL ram0 good without repair"); end
    go(0);
    checks++; if (!(s0.rae && s0.rra == 3 && s1.cae && s1.cra == 2)) begin failures++; $display("FAIL reload"); end
    mem_check(0, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram0 %0d bad after reload", bad); end
    mem_check(1, bad); checks++; if (bad != 0) begin failures++; $display("FAIL ram1 %0d bad after reload", bad); end

    // 3. irreparable RAM 1 (fresh reset so that the BIST sees raw arrays)
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    d1m = '0; defect(1, 0, 0); defect(1, 5, 5); defect(1, 10, 7);
    go(1);
    checks++; if (repair_ok) begin failures++; $display("FAIL irreparable reported ok"); end

    $display("fault reports %0d, hold cycles %0d, transfers %0d", n_fail, n_hold, n_load);
    checks++; if (n_fail == 0) begin failures++; $display("FAIL no fault report"); end
    checks++; if (n_hold != 2 * n_fail) begin failures++; $display("FAIL hold cycles %0d for %0d faults", n_hold, n_fail); end
    checks++; if (n_load != 4) begin failures++; $display("FAIL transfers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
