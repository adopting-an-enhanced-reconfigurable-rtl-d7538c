// rebisr: reconfigurable built-in self-repair (Re-BISR) subsystem for two
// embedded bit-oriented RAMs of different sizes.
//
// RAM 0 has 8 rows x 8 columns, RAM 1 has 16 rows x 8 columns; each has one
// spare row and one spare column and a repair register in its wrapper. One
// March BIST engine and one Re-BIRA serve both RAMs, reconfigured for the
// size of the RAM under test. The controller tests the RAMs in turn, has the
// Re-BIRA allocate the spares, blows each repairable RAM's signature into
// the fuse box, and finally moves the signatures through the fuse register
// into the repair-register chain (fuse register -> RAM 1 -> RAM 0), after
// which both RAMs work through their normal-mode ports with the defective
// row and column skipped.
//
// Interface: pulse start_test for test-and-repair, or start_load to load
// signatures already in the fuses. busy is high until done pulses;
// repair_ok then tells whether every RAM could be repaired. Normal-mode
// ports (ramN_*) are ignored while the BIST owns the RAMs (test_mode);
// read data appear one cycle after a read. defectN_mask/val create stuck-at
// cells (see repairable_ram). bist_fail and bira_hold make the Fail_h and
// Hold_l handshake visible. Timing: with fault-free RAMs a start_test run
// takes 2916 cycles to done: March C- takes 961 cycles on RAM 0 and 1921 on
// RAM 1, the other 34 are sequencing, allocation and the 21-cycle signature
// transfer. Each fault adds two hold cycles; allocation of a faulty RAM
// takes up to 9 (RAM 0) or 17 (RAM 1) cycles.
module rebisr
  import bisr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_test,
  input  logic          start_load,
  output logic          busy,
  output logic          done,
  output logic          repair_ok,
  // RAM 0: 8 x 8
  input  logic          ram0_en,
  input  logic          ram0_we,
  input  logic [2:0]    ram0_row,
  input  logic [2:0]    ram0_col,
  input  logic          ram0_wdata,
  output logic          ram0_rdata,
  input  logic [80:0]   defect0_mask,
  input  logic [80:0]   defect0_val,
  // RAM 1: 16 x 8
  input  logic          ram1_en,
  input  logic          ram1_we,
  input  logic [3:0]    ram1_row,
  input  logic [2:0]    ram1_col,
  input  logic          ram1_wdata,
  output logic          ram1_rdata,
  input  logic [152:0]  defect1_mask,
  input  logic [152:0]  defect1_val,
  // observation
  output logic          bist_fail,
  output logic          bira_hold,
  output logic [7:0]    bira_fault_cnt,
  output repair_sig_t   ram0_sig,
  output repair_sig_t   ram1_sig
);
  localparam int unsigned NUM_RAM = 2;
  localparam int unsigned TOTAL_W = NUM_RAM * SIG_W;

  // size table: address widths of each RAM
  localparam logic [2:0] RAW [NUM_RAM] = '{3'd3, 3'd4};
  localparam logic [2:0] CAW [NUM_RAM] = '{3'd3, 3'd3};

  logic               bist_start, bist_done, test_mode, bist_busy;
  logic [0:0]         ram_sel;
  logic               b_en, b_we, b_wdata, b_rdata, hs;
  logic [MAX_RAW-1:0] b_row, f_row;
  logic [MAX_CAW-1:0] b_col, f_col;
  logic [NUM_RAM-1:0] fail_h;
  logic               hold_l, bira_en, bira_clear, bira_analyze, bira_done;
  logic               bira_repairable, bira_busy;
  repair_sig_t        sig;
  logic               fuse_prog_en, freg_load, freg_done, freg_shift, freg_so;
  logic [TOTAL_W-1:0] fuse_q, freg_q;
  logic               rr1_so, rr0_so;
  logic               r0_rdata, r1_rdata;
  logic [(1<<MAX_RAW)*(1<<MAX_CAW)-1:0] bitmap;

  rebisr_ctrl #(.NUM_RAM(NUM_RAM)) u_ctrl (
    .clk, .rst_n, .start_test, .start_load,
    .bist_start, .bist_done, .test_mode, .ram_sel,
    .bira_en, .bira_clear, .bira_analyze, .bira_done, .bira_repairable,
    .fuse_prog_en, .freg_load, .freg_done,
    .busy, .done, .repair_ok
  );

  march_bist #(.NUM_RAM(NUM_RAM)) u_bist (
    .clk, .rst_n, .start(bist_start), .ram_sel,
    .row_aw(RAW[ram_sel]), .col_aw(CAW[ram_sel]), .hold_l,
    .ram_en(b_en), .ram_we(b_we), .ram_row(b_row), .ram_col(b_col),
    .ram_wdata(b_wdata), .ram_rdata(b_rdata),
    .fail_h, .fail_row(f_row), .fail_col(f_col), .hs,
    .busy(bist_busy), .done(bist_done)
  );

  re_bira #(.NUM_RAM(NUM_RAM)) u_bira (
    .clk, .rst_n, .bira_en, .clear(bira_clear), .fail_h,
    .fail_row(f_row), .fail_col(f_col), .hold_l,
    .row_aw(RAW[ram_sel]), .col_aw(CAW[ram_sel]), .analyze(bira_analyze),
    .sig, .repairable(bira_repairable), .fault_cnt(bira_fault_cnt),
    .busy(bira_busy), .done(bira_done), .bitmap
  );

  fuse_macro #(.NUM_RAM(NUM_RAM), .SIG_W(SIG_W)) u_fuse (
    .clk, .prog_en(fuse_prog_en), .prog_addr(ram_sel), .prog_data(sig), .fuse_q
  );

  fuse_register #(.TOTAL_W(TOTAL_W)) u_freg (
    .clk, .rst_n, .load(freg_load), .fuse_q, .shift_en(freg_shift),
    .so(freg_so), .done(freg_done), .q(freg_q)
  );

  // RAM 0 access: BIST in test mode, normal port otherwise.
  logic t0, t1;
  assign t0 = test_mode && (ram_sel == 1'b0);
  assign t1 = test_mode && (ram_sel == 1'b1);

  repairable_ram #(.ROW_AW(3), .COL_AW(3)) u_ram0 (
    .clk, .rst_n,
    .en(t0 ? b_en : ram0_en), .we(t0 ? b_we : ram0_we),
    .addr_row(t0 ? b_row[2:0] : ram0_row), .addr_col(t0 ? b_col[2:0] : ram0_col),
    .wdata(t0 ? b_wdata : ram0_wdata), .rdata(r0_rdata),
    .rr_shift_en(freg_shift), .rr_si(rr1_so), .rr_so(rr0_so), .rr_q(ram0_sig),
    .defect_mask(defect0_mask), .defect_val(defect0_val)
  );

  repairable_ram #(.ROW_AW(4), .COL_AW(3)) u_ram1 (
    .clk, .rst_n,
    .en(t1 ? b_en : ram1_en), .we(t1 ? b_we : ram1_we),
    .addr_row(t1 ? b_row[3:0] : ram1_row), .addr_col(t1 ? b_col[2:0] : ram1_col),
    .wdata(t1 ? b_wdata : ram1_wdata), .rdata(r1_rdata),
    .rr_shift_en(freg_shift), .rr_si(freg_so), .rr_so(rr1_so), .rr_q(ram1_sig),
    .defect_mask(defect1_mask), .defect_val(defect1_val)
  );

  assign b_rdata    = ram_sel ? r1_rdata : r0_rdata;
  assign ram0_rdata = r0_rdata;
  assign ram1_rdata = r1_rdata;
  assign bist_fail  = |fail_h;
  assign bira_hold  = hold_l;

  // Signals only kept for observation in simulation.
  logic unused;
  assign unused = ^{hs, bist_busy, bira_busy, freg_q, rr0_so, bitmap, b_col[3]};
endmodule
