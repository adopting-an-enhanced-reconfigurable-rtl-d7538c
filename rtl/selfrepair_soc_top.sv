// selfrepair_soc_top: on-chip self-test and self-repair for an SoC, made of
// two independent parts that stand side by side and share only clock and
// reset:
//   - u_rebisr: the reconfigurable built-in self-repair subsystem for two
//     embedded RAMs (8x8 and 16x8 bits, one spare row and one spare column
//     each), with BIST, Re-BIRA, fuse box and fuse register;
//   - the MSIC test pattern generators for logic under test: u_tpg_scan
//     (test-per-scan, reconfigurable Johnson counter, 10 chains x 64 cells,
//     20-bit seed), u_tpg_sic (the same with the scalable SIC counter) and
//     u_tpg_clk (test-per-clock, 8 x 8 input grid).
// Every port of the parts is brought out unchanged with a prefix; see the
// parts for interface and timing.
module selfrepair_soc_top
  import bisr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // Re-BISR
  input  logic          bisr_start_test,
  input  logic          bisr_start_load,
  output logic          bisr_busy,
  output logic          bisr_done,
  output logic          bisr_repair_ok,
  input  logic          ram0_en,
  input  logic          ram0_we,
  input  logic [2:0]    ram0_row,
  input  logic [2:0]    ram0_col,
  input  logic          ram0_wdata,
  output logic          ram0_rdata,
  input  logic [80:0]   defect0_mask,
  input  logic [80:0]   defect0_val,
  input  logic          ram1_en,
  input  logic          ram1_we,
  input  logic [3:0]    ram1_row,
  input  logic [2:0]    ram1_col,
  input  logic          ram1_wdata,
  output logic          ram1_rdata,
  input  logic [152:0]  defect1_mask,
  input  logic [152:0]  defect1_val,
  output logic          bist_fail,
  output logic          bira_hold,
  output logic [7:0]    bira_fault_cnt,
  output repair_sig_t   ram0_sig,
  output repair_sig_t   ram1_sig,
  // MSIC-TPG, test-per-scan, reconfigurable Johnson counter
  input  logic          tps_start,
  input  logic [15:0]   tps_num_seeds,
  output logic [9:0]    tps_scan_in,
  output logic [19:0]   tps_pi,
  output logic          tps_se,
  output logic          tps_capture,
  output logic          tps_busy,
  output logic          tps_done,
  // MSIC-TPG, test-per-scan, scalable SIC counter
  input  logic          sic_start,
  input  logic [15:0]   sic_num_seeds,
  output logic [9:0]    sic_scan_in,
  output logic [19:0]   sic_pi,
  output logic          sic_se,
  output logic          sic_capture,
  output logic          sic_busy,
  output logic          sic_done,
  // MSIC-TPG, test-per-clock
  input  logic          tpc_start,
  input  logic [15:0]   tpc_num_seeds,
  output logic [63:0]   tpc_pi,
  output logic          tpc_valid,
  output logic          tpc_busy,
  output logic          tpc_done
);
  rebisr u_rebisr (
    .clk, .rst_n, .start_test(bisr_start_test), .start_load(bisr_start_load),
    .busy(bisr_busy), .done(bisr_done), .repair_ok(bisr_repair_ok),
    .ram0_en, .ram0_we, .ram0_row, .ram0_col, .ram0_wdata, .ram0_rdata,
    .defect0_mask, .defect0_val,
    .ram1_en, .ram1_we, .ram1_row, .ram1_col, .ram1_wdata, .ram1_rdata,
    .defect1_mask, .defect1_val,
    .bist_fail, .bira_hold, .bira_fault_cnt, .ram0_sig, .ram1_sig
  );

  msic_tpg_scan #(.M(10), .L(64), .SEED_W(20), .USE_SCALABLE(1'b0)) u_tpg_scan (
    .clk, .rst_n, .start(tps_start), .num_seeds(tps_num_seeds),
    .scan_in(tps_scan_in), .pi(tps_pi), .se(tps_se), .capture(tps_capture),
    .busy(tps_busy), .done(tps_done)
  );

  msic_tpg_scan #(.M(10), .L(64), .SEED_W(20), .USE_SCALABLE(1'b1)) u_tpg_sic (
    .clk, .rst_n, .start(sic_start), .num_seeds(sic_num_seeds),
    .scan_in(sic_scan_in), .pi(sic_pi), .se(sic_se), .capture(sic_capture),
    .busy(sic_busy), .done(sic_done)
  );

  msic_tpg_clock #(.N(8), .M(8)) u_tpg_clk (
    .clk, .rst_n, .start(tpc_start), .num_seeds(tpc_num_seeds),
    .pi(tpc_pi), .valid(tpc_valid), .busy(tpc_busy), .done(tpc_done)
  );
endmodule
