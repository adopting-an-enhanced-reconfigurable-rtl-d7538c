// tb_re_bira: drives the Re-BIRA with fault reports as the BIST gives them
// (a fail bit held until two cycles after hold was raised) and checks:
// hold_l rises in the same cycle as the fail bit and lasts exactly two
// cycles; the bitmap holds exactly the reported cells; the fault count; and,
// for random fault sets in 8x8 and 16x8 RAMs, that the allocation's verdict
// matches an exhaustive search (some row r and column c cover all faults),
// that a repairable signature covers every fault and uses no spare without
// need, and that the allocation ends within 2^row_aw + 1 cycles.
module tb_re_bira;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bira_en, clear, hold_l, analyze, repairable, busy, done;
  logic [1:0] fail_h;
  logic [3:0] frow, fcol;
  logic [2:0] row_aw, col_aw;
  repair_sig_t sig;
  logic [7:0] fault_cnt;
  logic [255:0] bitmap;
  int checks = 0, failures = 0;
  logic [255:0] ref_bm;

  re_bira #(.NUM_RAM(2)) dut (
    .clk, .rst_n, .bira_en, .clear, .fail_h, .fail_row(frow), .fail_col(fcol), .hold_l,
    .row_aw, .col_aw, .analyze, .sig, .repairable, .fault_cnt, .busy, .done, .bitmap);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic report(input int r, input int c);
    int hc;
    @(negedge clk); fail_h = 2'b01; frow = 4'(r); fcol = 4'(c);
    #1; checks++; if (!hold_l) begin failures++; $display("FAIL hold not immediate"); end
    hc = 0;
    while (hold_l) begin @(negedge clk); hc++; end
    checks++; if (hc != 2) begin failures++; $display("FAIL hold lasted %0d", hc); end
    // BIST moves on in the cycle hold is low; the fail bit is gone after it
    @(negedge clk); fail_h = 2'b00;
  endtask

  function automatic bit exhaustive(input int nr, input int nc);
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
      bit ok = 1;
      for (int i = 0; i < nr; i++) for (int j = 0; j < nc; j++)
        if (ref_bm[i*16+j] && i != r && j != c) ok = 0;
      if (ok) return 1;
    end
    return 0;
  endfunction

  task automatic trial(input int raw, input int caw, input int nf);
    int nr, nc, cyc, distinct;
    bit exp_rep;
    nr = 1 << raw; nc = 1 << caw;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_bm = '0; distinct = 0;
    bira_en = 1; row_aw = 3'(raw); col_aw = 3'(caw);
    for (int k = 0; k < nf; k++) begin
      int r, c;
      // bias towards shared rows and columns so both verdicts occur
      r = ($urandom % 3 == 0) ? 1 : int'($urandom % nr);
      c = ($urandom % 3 == 0) ? 2 : int'($urandom % nc);
      if (!ref_bm[r*16+c]) distinct++;
      ref_bm[r*16+c] = 1;
      report(r, c);
    end
    bira_en = 0;
    checks++; if (bitmap !== ref_bm) begin failures++; $display("FAIL bitmap"); end
    checks++; if (fault_cnt != 8'(distinct)) begin failures++; $display("FAIL count %0d exp %0d", fault_cnt, distinct); end
    @(negedge clk); analyze = 1; @(negedge clk); analyze = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++; if (cyc > nr + 1) begin failures++; $display("FAIL analysis took %0d", cyc); end
    exp_rep = exhaustive(nr, nc);
    checks++; if (repairable != exp_rep) begin failures++; $display("FAIL verdict %b exp %b sig %p bm %h", repairable, exp_rep, sig, ref_bm); end
    if (repairable) begin
      bit rowneed = 0, colneed = 0;
      for (int i = 0; i < nr; i++) for (int j = 0; j < nc; j++) if (ref_bm[i*16+j]) begin
        bit cov = (sig.rae && sig.rra == 4'(i)) || (sig.cae && sig.cra == 4'(j));
        checks++; if (!cov) begin failures++; $display("FAIL fault %0d,%0d not covered", i, j); end
        if (sig.rae && sig.rra == 4'(i)) rowneed = 1;
        if (sig.cae && sig.cra == 4'(j)) colneed = 1;
      end
      checks++; if ((sig.rae && !rowneed) || (sig.cae && !colneed)) begin failures++; $display("FAIL unneeded spare"); end
    end
  endtask

  int nrep;
  initial begin
    bira_en = 0; clear = 0; analyze = 0; fail_h = 0; frow = 0; fcol = 0; row_aw = 3; col_aw = 3;
    repeat (3) @(negedge clk); rst_n = 1;
    // no faults: repairable with no spare
    trial(3, 3, 0);
    checks++; if (sig !== '0 || !repairable) begin failures++; $display("FAIL empty"); end
    // fail bits are ignored while bira_en is low
    @(negedge clk); fail_h = 2'b10; #1;
    checks++; if (hold_l) begin failures++; $display("FAIL hold without bira_en"); end
    @(negedge clk); fail_h = 0;
    nrep = 0;
    for (int t = 0; t < 60; t++) begin
      trial((t % 2) ? 4 : 3, 3, 1 + int'($urandom % 5));
      if (repairable) nrep++;
    end
    checks++; if (nrep == 0 || nrep == 60) begin failures++; $display("FAIL verdicts not mixed %0d", nrep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
