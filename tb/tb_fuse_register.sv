// tb_fuse_register: loads random fuse contents, collects the serial output
// during the shift_en cycles and checks that all 20 bits arrive LSB first,
// that shift_en lasts exactly TOTAL_W cycles, that done follows the last
// shift, and that a load request during shifting is ignored.
module tb_fuse_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, shift_en, so, done;
  logic [19:0] fq, q, got;
  int checks = 0, failures = 0;

  fuse_register #(.TOTAL_W(20)) dut (.clk, .rst_n, .load, .fuse_q(fq), .shift_en, .so, .done, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; fq = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int n, cyc;
      logic [19:0] exp_v;
      exp_v = 20'($urandom); fq = exp_v;
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      n = 0; cyc = 0;
      while (!done && cyc < 100) begin
        if (shift_en) begin got[n] = so; n++; end
        if (cyc == 3) begin load = 1; fq = ~exp_v; end   // must be ignored
        if (cyc == 4) load = 0;
        @(negedge clk); cyc++;
      end
      checks++; if (n != 20) begin failures++; $display("FAIL %0d shifts", n); end
      checks++; if (got !== exp_v) begin failures++; $display("FAIL got %h exp %h", got, exp_v); end
      checks++; if (cyc != 20) begin failures++; $display("FAIL done after %0d cycles", cyc); end
      @(negedge clk);
      checks++; if (shift_en || done) begin failures++; $display("FAIL not idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
