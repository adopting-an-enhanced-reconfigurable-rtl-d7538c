// tb_msic_ctrl: runs the test-per-scan controller with L=8 for three seeds
// and with the default L=64 for one seed, and checks the schedule cycle by
// cycle against the procedure: L initialisation cycles (rj_mode=1, init=0),
// then per seed one seed step, and 2L times {one Johnson step with
// rj_mode=0; L shift cycles with se=1, rj_mode=1, init=1; one capture}. The
// whole run must take L + seeds*(1 + 2L(L+2)) cycles before done.
module tb_msic_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start8, start64;
  logic [15:0] ns;
  logic ss8, js8, rm8, in8, se8, cp8, b8, d8;
  logic ss64, js64, rm64, in64, se64, cp64, b64, d64;

  msic_ctrl #(.L(8)) u8 (.clk, .rst_n, .start(start8), .num_seeds(ns), .seed_step(ss8), .jc_step(js8),
    .rj_mode(rm8), .init(in8), .se(se8), .capture(cp8), .busy(b8), .done(d8));
  msic_ctrl dut (.clk, .rst_n, .start(start64), .num_seeds(ns), .seed_step(ss64), .jc_step(js64),
    .rj_mode(rm64), .init(in64), .se(se64), .capture(cp64), .busy(b64), .done(d64));

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected control word {seed_step, jc_step, rj_mode, init, se, capture}
  function automatic logic [5:0] expect_word(input int L, input int cyc);
    int per, k, v;
    if (cyc < L) return 6'b011000;            // initialisation
    k = cyc - L;
    per = 1 + 2 * L * (L + 2);
    k = k % per;
    if (k == 0) return 6'b101100;             // seed step (rj_mode=1, init=1 idle)
    k = k - 1;
    v = k % (L + 2);
    if (v == 0) return 6'b010100;             // Johnson step, rj_mode=0
    if (v <= L) return 6'b011110;             // shift
    return 6'b001101;                         // capture
  endfunction

  task automatic run(input int L, input int seeds);
    int cyc = 0, bad = 0;
    logic [5:0] w;
    ns = 16'(seeds);
    @(negedge clk); if (L == 8) start8 = 1; else start64 = 1;
    @(negedge clk); start8 = 0; start64 = 0;
    while (!(L == 8 ? d8 : d64) && cyc < 100000) begin
      w = (L == 8) ? {ss8, js8, rm8, in8, se8, cp8} : {ss64, js64, rm64, in64, se64, cp64};
      if (w !== expect_word(L, cyc)) begin bad++; if (bad < 4) $display("FAIL L%0d cyc %0d w %b exp %b", L, cyc, w, expect_word(L, cyc)); end
      @(negedge clk); cyc++;
    end
    checks++; if (bad != 0) begin failures++; end
    checks++; if (cyc != L + seeds * (1 + 2 * L * (L + 2))) begin failures++; $display("FAIL L%0d took %0d", L, cyc); end
  endtask

  initial begin
    start8 = 0; start64 = 0; ns = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(8, 3);
    run(64, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
