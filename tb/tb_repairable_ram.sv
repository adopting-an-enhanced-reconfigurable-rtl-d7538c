// tb_repairable_ram: checks the 8x8 repairable RAM. It writes a random
// pattern, reads it back against a reference array, then injects a stuck-at
// cell, shows that a logical cell reads wrong, loads a repair signature
// (spare row and spare column) through the serial repair register and checks
// that every logical cell reads back correctly, including the last row and
// column which now live in the spares. Reads have one cycle of latency.
module tb_repairable_ram;
  import bisr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, we, wdata, rdata, sh, si, so;
  logic [2:0] row, col;
  repair_sig_t rq;
  logic [80:0] dmask, dval;
  int checks = 0, failures = 0;
  logic ref_mem [8][8];

  repairable_ram #(.ROW_AW(3), .COL_AW(3)) dut (
    .clk, .rst_n, .en, .we, .addr_row(row), .addr_col(col), .wdata, .rdata,
    .rr_shift_en(sh), .rr_si(si), .rr_so(so), .rr_q(rq),
    .defect_mask(dmask), .defect_val(dval));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int r, input int c, input logic d);
    @(negedge clk); en = 1; we = 1; row = 3'(r); col = 3'(c); wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd_check(input int r, input int c, input logic exp, input string what);
    @(negedge clk); en = 1; we = 0; row = 3'(r); col = 3'(c);
    @(negedge clk); en = 0;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s r%0d c%0d got %b exp %b", what, r, c, rdata, exp); end
  endtask
  task automatic load_sig(input repair_sig_t s);
    for (int i = 0; i < SIG_W; i++) begin
      @(negedge clk); sh = 1; si = s[i];
    end
    @(negedge clk); sh = 0;
  endtask
  task automatic fill_and_check(input string what);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      ref_mem[r][c] = 1'($urandom); wr(r, c, ref_mem[r][c]);
    end
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) rd_check(r, c, ref_mem[r][c], what);
  endtask

  initial begin
    repair_sig_t s;
    int bad;
    en = 0; we = 0; wdata = 0; row = 0; col = 0; sh = 0; si = 0; dmask = '0; dval = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    checks++; if (rq !== '0) begin failures++; $display("FAIL repair register not cleared"); end
    fill_and_check("plain");
    // defect: physical row 2, column 5 stuck at 1, and physical row 6 col 1 stuck at 0
    dmask[2*9+5] = 1'b1; dval[2*9+5] = 1'b1;
    dmask[6*9+1] = 1'b1; dval[6*9+1] = 1'b0;
    wr(2, 5, 1'b0); wr(6, 1, 1'b1);
    bad = 0;
    @(negedge clk); en = 1; we = 0; row = 2; col = 5; @(negedge clk); en = 0; if (rdata !== 1'b1) bad++;
    @(negedge clk); en = 1; we = 0; row = 6; col = 1; @(negedge clk); en = 0; if (rdata !== 1'b0) bad++;
    checks++; if (bad != 0) begin failures++; $display("FAIL defects not visible"); end
    // repair: spare row replaces row 2, spare column replaces column 1
    s = '0; s.rae = 1; s.rra = 4'd2; s.cae = 1; s.cra = 4'd1;
    load_sig(s);
    checks++; if (rq !== s) begin failures++; $display("FAIL repair register %h exp %h", rq, s); end
    fill_and_check("repaired");
    // serial out: shifting 10 more bits returns the signature on rr_so
    begin
      repair_sig_t got;
      for (int i = 0; i < SIG_W; i++) begin
        @(negedge clk); got[i] = so; sh = 1; si = 0;
      end
      @(negedge clk); sh = 0;
      checks++; if (got !== s) begin failures++; $display("FAIL serial out %h", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
