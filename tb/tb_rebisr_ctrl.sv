// tb_rebisr_ctrl: plays BIST, BIRA and fuse register to the repair
// sequencer with random response delays, and checks the order of its
// commands: for each RAM in turn a bitmap clear, one BIST start with the
// right ram_sel, test_mode until the BIST's done, one analyze, a fuse
// programming pulse only if that RAM is repairable; then one fuse register
// load, done, and repair_ok equal to "all RAMs repairable". A start_load
// alone must give just the load and done.
module tb_rebisr_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_test, start_load, bist_start, bist_done, test_mode, bira_en, bira_clear;
  logic bira_analyze, bira_done, bira_rep, fuse_prog_en, freg_load, freg_done, busy, done, repair_ok;
  logic [0:0] ram_sel;
  int checks = 0, failures = 0;

  rebisr_ctrl #(.NUM_RAM(2)) dut (
    .clk, .rst_n, .start_test, .start_load, .bist_start, .bist_done, .test_mode, .ram_sel,
    .bira_en, .bira_clear, .bira_analyze, .bira_done, .bira_repairable(bira_rep),
    .fuse_prog_en, .freg_load, .freg_done, .busy, .done, .repair_ok);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event log: letters for each command seen at a clock edge
  string log_s;
  logic rep_tab [2];
  int bist_wait, ana_wait, freg_wait;
  always @(posedge clk) if (rst_n) begin
    if (bira_clear)   log_s = {log_s, "C"};
    if (bist_start)   log_s = {log_s, $sformatf("B%0d", ram_sel)};
    if (bira_analyze) log_s = {log_s, "A"};
    if (fuse_prog_en) log_s = {log_s, $sformatf("P%0d", ram_sel)};
    if (freg_load)    log_s = {log_s, "L"};
    if (done)         log_s = {log_s, "D"};
    if (bira_en != test_mode) begin failures++; $display("FAIL bira_en"); end
  end

  // responders
  initial begin
    bist_done = 0; bira_done = 0; freg_done = 0; bira_rep = 0;
    forever begin
      @(posedge clk);
      if (bist_start) begin
        repeat (2 + $urandom % 10) begin
          @(posedge clk);
          if (!test_mode) begin failures++; $display("FAIL test_mode dropped"); end
        end
        @(negedge clk); bist_done = 1; @(negedge clk); bist_done = 0;
      end
      if (bira_analyze) begin
        repeat ($urandom % 5) @(posedge clk);
        @(negedge clk); bira_done = 1; bira_rep = rep_tab[ram_sel]; @(negedge clk); bira_done = 0;
      end
      if (freg_load) begin
        repeat (20) @(posedge clk);
        @(negedge clk); freg_done = 1; @(negedge clk); freg_done = 0;
      end
    end
  end

  task automatic run(input bit test, input logic r0, input logic r1, input string exp_log, input logic exp_ok);
    rep_tab[0] = r0; rep_tab[1] = r1; log_s = "";
    @(negedge clk); if (test) start_test = 1; else start_load = 1;
    @(negedge clk); start_test = 0; start_load = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++; if (log_s != exp_log) begin failures++; $display("FAIL log %s exp %s", log_s, exp_log); end
    checks++; if (repair_ok !== exp_ok) begin failures++; $display("FAIL repair_ok %b", repair_ok); end
    checks++; if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    start_test = 0; start_load = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 1, 1, "CB0AP0CB1AP1LD", 1);
    run(1, 1, 0, "CB0AP0CB1ALD", 0);
    run(1, 0, 1, "CB0ACB1AP1LD", 0);
    run(0, 1, 1, "LD", 0);
    run(1, 1, 1, "CB0AP0CB1AP1LD", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
