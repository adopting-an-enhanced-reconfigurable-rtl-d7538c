// re_bira: reconfigurable built-in redundancy analysis (Re-BIRA) for RAMs
// with one spare row and one spare column, sized at run time.
//
// Collection: while bira_en is high the block watches fail_h from the BIST.
// In the cycle a fail bit rises it raises hold_l (combinationally, so the
// BIST pauses in that same cycle) and latches the fault address; in the next
// cycle it keeps hold_l high and sets the fault's bit in the fail bitmap; in
// the third cycle it drops hold_l, lets the BIST move on and ignores the
// still-present fail bit. Each fault therefore costs the BIST two cycles.
// clear empties the bitmap before the next RAM is tested.
//
// Allocation (started by analyze, row_aw/col_aw giving the RAM's size): the
// rows are tried in turn as the spare-row candidate r, one per cycle. If the
// faults outside row r all lie in one column c (or there are none), the
// signature takes row r (RAE set only if row r has faults) and column c (CAE
// set only if such faults exist), repairable is set, and done pulses. If no
// candidate works the RAM cannot be repaired with one spare row and one
// spare column: repairable is cleared and the signature is all zero. This
// search is exact for one spare row and one spare column; the bitmap form
// follows the design, the search order is this design's choice. It ends
// after at most 2^row_aw cycles. sig, repairable and fault_cnt stay valid
// until the next clear.
module re_bira
  import bisr_pkg::*;
#(
  parameter int unsigned NUM_RAM = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bira_en,
  input  logic                clear,
  input  logic [NUM_RAM-1:0]  fail_h,
  input  logic [MAX_RAW-1:0]  fail_row,
  input  logic [MAX_CAW-1:0]  fail_col,
  output logic                hold_l,
  input  logic [2:0]          row_aw,
  input  logic [2:0]          col_aw,
  input  logic                analyze,
  output repair_sig_t         sig,
  output logic                repairable,
  output logic [7:0]          fault_cnt,
  output logic                busy,
  output logic                done,
  output logic [(1<<MAX_RAW)*(1<<MAX_CAW)-1:0] bitmap
);
  localparam int unsigned MROWS = 1 << MAX_RAW;
  localparam int unsigned MCOLS = 1 << MAX_CAW;

  typedef enum logic [2:0] {S_IDLE, S_UPD, S_REL, S_ANA, S_DONE} state_t;

  state_t             state;
  logic [MROWS-1:0][MCOLS-1:0] bm;
  logic [MAX_RAW-1:0] f_row, cand;
  logic [MAX_CAW-1:0] f_col;
  logic [MAX_RAW-1:0] row_max;

  logic capture;
  assign capture = (state == S_IDLE) && bira_en && (|fail_h);
  assign hold_l  = capture || (state == S_UPD);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);

  for (genvar r = 0; r < MROWS; r++) begin : g_bm
    assign bitmap[r*MCOLS +: MCOLS] = bm[r];
  end

  // Faults outside the candidate row, folded onto the columns.
  logic [MCOLS-1:0]   col_vec;
  logic               cand_row_faulty;
  logic               col_ok;
  logic [MAX_CAW-1:0] col_idx;
  always_comb begin
    col_vec = '0;
    for (int r = 0; r < MROWS; r++)
      if (MAX_RAW'(r) != cand) col_vec |= bm[r];
    col_vec &= MCOLS'((33'd1 << (6'd1 << col_aw)) - 1);  // only the 2^col_aw columns of this RAM
    cand_row_faulty = |bm[cand];
    col_ok  = ($countones(col_vec) <= 1);
    col_idx = '0;
    for (int c = 0; c < MCOLS; c++)
      if (col_vec[c]) col_idx = MAX_CAW'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; f_row <= '0; f_col <= '0; cand <= '0; row_max <= '0;
      sig <= '0; repairable <= 1'b0; fault_cnt <= '0;
      for (int r = 0; r < MROWS; r++) bm[r] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (clear) begin
            for (int r = 0; r < MROWS; r++) bm[r] <= '0;
            fault_cnt <= '0; sig <= '0; repairable <= 1'b0;
          end else if (capture) begin
            f_row <= fail_row; f_col <= fail_col;
            state <= S_UPD;
          end else if (analyze) begin
            cand    <= '0;
            row_max <= MAX_RAW'((1 << row_aw) - 1);
            state   <= S_ANA;
          end
        end
        S_UPD: begin
          bm[f_row][f_col] <= 1'b1;
          if (!bm[f_row][f_col] && fault_cnt != 8'hFF) fault_cnt <= fault_cnt + 1'b1;
          state <= S_REL;
        end
        S_REL: state <= S_IDLE;
        S_ANA: begin
          if (col_ok) begin
            sig.rae    <= cand_row_faulty;
            sig.rra    <= cand_row_faulty ? cand : '0;
            sig.cae    <= |col_vec;
            sig.cra    <= col_idx;
            repairable <= 1'b1;
            state      <= S_DONE;
          end else if (cand == row_max) begin
            sig        <= '0;
            repairable <= 1'b0;
            state      <= S_DONE;
          end else begin
            cand <= cand + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold_one_fault: assert property (@(posedge clk) disable iff (!rst_n)
    capture |=> (state == S_UPD && hold_l));
endmodule
