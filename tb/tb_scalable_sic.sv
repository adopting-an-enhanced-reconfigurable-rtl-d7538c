// tb_scalable_sic: drives the scalable SIC counter (10 chains, K=6, so 64-bit
// loads) through 130 scan loads of 64 shift cycles with se high, each
// followed by one capture cycle with se low. A model here builds the stream
// of each load (n mod 64 copies of the fill value, then its inverse; the
// fill value starts at 1 and flips every 64 loads) and a 10-bit shift
// register; the counter's outputs must match it in every cycle. It also
// checks that the 128 streams of loads 0..127 are all different and that
// consecutive streams differ in one bit (single input change), except where
// the fill value flips.
module tb_scalable_sic;
  localparam int M = 10, K = 6, L = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step, se;
  logic [M-1:0] q, mq;
  int checks = 0, failures = 0;

  scalable_sic dut (.clk, .rst_n, .step, .se, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [L-1:0] streams [128];
    int mism = 0, sic_bad = 0, dup = 0;
    step = 1; se = 0; mq = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 130; n++) begin
      int c; logic pol; logic [L-1:0] s;
      c = n % L; pol = ((n / L) % 2) == 0;
      for (int t = 0; t < L; t++) begin
        logic b;
        b = (t < c) ? pol : !pol;
        s[t] = b;
        se = 1;
        @(negedge clk);
        mq = {mq[M-2:0], b};
        checks++; if (q !== mq) begin mism++; failures++; if (mism < 5) $display("FAIL load %0d t %0d q %h exp %h", n, t, q, mq); end
      end
      if (n < 128) streams[n] = s;
      se = 0; @(negedge clk);
      checks++; if (q !== mq) begin failures++; $display("FAIL q moved during capture"); end
    end
    for (int i = 0; i < 128; i++) for (int j = i + 1; j < 128; j++) if (streams[i] == streams[j]) dup++;
    for (int i = 1; i < 128; i++) if (i != 64 && $countones(streams[i] ^ streams[i-1]) != 1) sic_bad++;
    checks++; if (dup != 0) begin failures++; $display("FAIL %0d duplicate streams", dup); end
    checks++; if (sic_bad != 0) begin failures++; $display("FAIL %0d non-SIC neighbours", sic_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
