// tb_march_bist: runs the March C- BIST against a behavioural bit-oriented
// RAM (registered read, configurable stuck-at cells) held in this test bench.
// A fault-free 8x8 RAM must pass with no fail and take 15*64+1 cycles from
// start to done; a stuck-at-1 cell must be reported three times and a
// stuck-at-0 cell twice (March C- reads each cell three times expecting 0
// and twice expecting 1), always with the right address and HS=1. The test
// bench answers each fail with a two-cycle hold, like the redundancy
// analyser, and checks that the BIST pauses: the run is then 2 cycles
// longer per fault. The 16x8 size is run too.
module tb_march_bist;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, hold_l, en, we, wdata, rdata, hs, busy, done;
  logic [0:0] sel;
  logic [2:0] row_aw, col_aw;
  logic [3:0] row, col, frow, fcol;
  logic [1:0] fail_h;
  int checks = 0, failures = 0;

  // behavioural RAM
  logic mem [16][16];
  logic sa_en [16][16];
  logic sa_v  [16][16];
  always_ff @(posedge clk) begin
    if (en && we) mem[row][col] <= wdata;
    if (en && !we) rdata <= sa_en[row][col] ? sa_v[row][col] : mem[row][col];
  end

  march_bist #(.NUM_RAM(2)) dut (
    .clk, .rst_n, .start, .ram_sel(sel), .row_aw, .col_aw, .hold_l,
    .ram_en(en), .ram_we(we), .ram_row(row), .ram_col(col), .ram_wdata(wdata),
    .ram_rdata(rdata), .fail_h, .fail_row(frow), .fail_col(fcol), .hs, .busy, .done);

  // hold responder: two cycles of hold per fault, then release
  int hcnt;
  always_comb hold_l = (fail_h != 0) && (hcnt < 2);
  always_ff @(posedge clk) hcnt <= (fail_h != 0) ? hcnt + 1 : 0;

  // fail log
  int nfail; logic [3:0] lrow [$]; logic [3:0] lcol [$];
  always_ff @(posedge clk) if (rst_n && fail_h != 0 && hcnt == 0) begin
    nfail++; lrow.push_back(frow); lcol.push_back(fcol);
    checks++;
    if (!hs || fail_h != (2'b01 << sel)) begin failures++; $display("FAIL hs/fail_h %b %b", hs, fail_h); end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int raw, input int caw, input int s, output int cycles);
    @(negedge clk); row_aw = 3'(raw); col_aw = 3'(caw); sel = 1'(s); start = 1;
    @(posedge clk); cycles = 0;
    @(negedge clk); start = 0;
    do begin @(posedge clk); cycles++; end while (!done);
  endtask

  task automatic scenario(input int raw, input int caw, input int fr, input int fc, input int sa, input int exp_fails);
    int cyc, n;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) sa_en[r][c] = 0;
    if (sa >= 0) begin sa_en[fr][fc] = 1; sa_v[fr][fc] = 1'(sa); end
    nfail = 0; lrow.delete(); lcol.delete();
    run(raw, caw, raw == 4 ? 1 : 0, cyc);
    n = 1 << (raw + caw);
    checks++;
    if (nfail != exp_fails) begin failures++; $display("FAIL fails=%0d exp %0d", nfail, exp_fails); end
    checks++;
    if (cyc != 15 * n + 1 + 2 * exp_fails) begin failures++; $display("FAIL cycles=%0d exp %0d", cyc, 15*n+1+2*exp_fails); end
    foreach (lrow[i]) begin
      checks++;
      if (lrow[i] != 4'(fr) || lcol[i] != 4'(fc)) begin failures++; $display("FAIL addr %0d,%0d", lrow[i], lcol[i]); end
    end
  endtask

  initial begin
    start = 0; sel = 0; row_aw = 3; col_aw = 3; hcnt = 0; nfail = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin mem[r][c] = 0; sa_en[r][c] = 0; sa_v[r][c] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    scenario(3, 3, 0, 0, -1, 0);   // fault free 8x8
    scenario(3, 3, 5, 2, 1, 3);    // SA1
    scenario(3, 3, 7, 7, 0, 2);    // SA0 in the last cell
    scenario(4, 3, 12, 6, 1, 3);   // 16x8, SA1
    scenario(4, 3, 0, 0, -1, 0);   // fault free 16x8
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
