// tb_fuse_macro: checks the fuse box model: it starts unblown, programming
// sets the addressed word's bits, a second programming can only add bits
// (blown fuses never recover), other words are untouched, and nothing
// changes without prog_en. A reference copy of the fuses is kept here.
module tb_fuse_macro;
  logic clk = 0;
  always #5 clk = ~clk;
  logic pe; logic [0:0] pa; logic [9:0] pd; logic [19:0] q, ref_q;
  int checks = 0, failures = 0;

  fuse_macro #(.NUM_RAM(2), .SIG_W(10)) dut (.clk, .prog_en(pe), .prog_addr(pa), .prog_data(pd), .fuse_q(q));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pe = 0; pa = 0; pd = 0; ref_q = '0;
    @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL not blank"); end
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      pe = ($urandom % 2) == 0; pa = 1'($urandom); pd = 10'($urandom);
      @(negedge clk);
      if (pe) ref_q[pa*10 +: 10] |= pd;
      pe = 0; pd = 10'($urandom);
      @(negedge clk);
      checks++; if (q !== ref_q) begin failures++; $display("FAIL %h exp %h", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
