// march_bist: memory BIST engine for bit-oriented RAMs of run-time size.
//
// It runs the March C- algorithm on the RAM selected by ram_sel:
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// over all 2^(row_aw+col_aw) cells, the column being the fast address. The
// algorithm choice is this design's; the BISR scheme only requires a BIST
// that generates patterns, detects faults and hands them to the BIRA.
//
// Timing: a write takes one cycle; a read takes two (issue, then compare with
// the RAM's registered rdata). A complete run takes 15*N cycles for N cells
// plus two cycles of start and finish: 960 + 2 for an 8x8 RAM.
//
// Fault reporting: in a compare cycle whose read data differ from the
// expected value, fail_h has the bit of the RAM under test set, and fail_row,
// fail_col and hs (failing-bit syndrome, read XOR expected) give the fault.
// While hold_l is high in such a cycle the BIST stays paused in it, its
// outputs stable, so the redundancy analyser can take the fault; it resumes
// in the first cycle hold_l is low. done pulses for one cycle at the end.
module march_bist
  import bisr_pkg::*;
#(
  parameter int unsigned NUM_RAM = 2,
  parameter int unsigned SEL_W   = (NUM_RAM > 1) ? $clog2(NUM_RAM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SEL_W-1:0]   ram_sel,
  input  logic [2:0]         row_aw,     // 1..MAX_RAW
  input  logic [2:0]         col_aw,     // 1..MAX_CAW
  input  logic               hold_l,
  // RAM access
  output logic               ram_en,
  output logic               ram_we,
  output logic [MAX_RAW-1:0] ram_row,
  output logic [MAX_CAW-1:0] ram_col,
  output logic               ram_wdata,
  input  logic               ram_rdata,
  // fault information
  output logic [NUM_RAM-1:0] fail_h,
  output logic [MAX_RAW-1:0] fail_row,
  output logic [MAX_CAW-1:0] fail_col,
  output logic               hs,
  output logic               busy,
  output logic               done
);
  typedef enum logic [1:0] {S_IDLE, S_OP, S_CMP, S_DONE} state_t;

  state_t             state;
  logic [2:0]         elem;      // March element 0..5
  logic               opi;       // operation index inside the element
  logic [MAX_RAW-1:0] row;
  logic [MAX_CAW-1:0] col;
  logic [MAX_RAW-1:0] row_max;
  logic [MAX_CAW-1:0] col_max;
  logic [SEL_W-1:0]   sel_q;

  // Operation table of March C-.
  logic op_read, op_data, elem_down, last_op;
  always_comb begin
    elem_down = (elem == 3'd3) || (elem == 3'd4);
    unique case (elem)
      3'd0:    begin op_read = 1'b0;  op_data = 1'b0;  last_op = 1'b1;  end
      3'd1:    begin op_read = !opi;  op_data = opi;   last_op = opi;   end
      3'd2:    begin op_read = !opi;  op_data = !opi;  last_op = opi;   end
      3'd3:    begin op_read = !opi;  op_data = opi;   last_op = opi;   end
      3'd4:    begin op_read = !opi;  op_data = !opi;  last_op = opi;   end
      default: begin op_read = 1'b1;  op_data = 1'b0;  last_op = 1'b1;  end
    endcase
  end

  logic last_addr;
  assign last_addr = elem_down ? (row == '0 && col == '0)
                               : (row == row_max && col == col_max);

  logic mismatch;
  assign mismatch = (state == S_CMP) && (ram_rdata != op_data);

  assign ram_en    = (state == S_OP);
  assign ram_we    = (state == S_OP) && !op_read;
  assign ram_row   = row;
  assign ram_col   = col;
  assign ram_wdata = op_data;
  assign fail_h    = mismatch ? (NUM_RAM'(1) << sel_q) : '0;
  assign fail_row  = row;
  assign fail_col  = col;
  assign hs        = (state == S_CMP) && (ram_rdata ^ op_data);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);

  // Step to the next operation, address or element.
  logic advance;
  assign advance = ((state == S_OP) && !op_read) ||
                   ((state == S_CMP) && !(mismatch && hold_l));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; elem <= '0; opi <= 1'b0; row <= '0; col <= '0;
      row_max <= '0; col_max <= '0; sel_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_OP;
          elem    <= '0; opi <= 1'b0; row <= '0; col <= '0;
          row_max <= MAX_RAW'((1 << row_aw) - 1);
          col_max <= MAX_CAW'((1 << col_aw) - 1);
          sel_q   <= ram_sel;
        end
        S_OP: if (op_read) state <= S_CMP;
        S_CMP: ;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (advance) begin
        state <= S_OP;
        if (!last_op) opi <= 1'b1;
        else begin
          opi <= 1'b0;
          if (last_addr) begin
            if (elem == 3'd5) state <= S_DONE;
            elem <= elem + 1'b1;
            // elements 3 and 4 run downwards from the last cell
            if (elem == 3'd2 || elem == 3'd3) begin row <= row_max; col <= col_max; end
            else begin row <= '0; col <= '0; end
          end else if (elem_down) begin
            if (col == '0) begin col <= col_max; row <= row - 1'b1; end
            else col <= col - 1'b1;
          end else begin
            if (col == col_max) begin col <= '0; row <= row + 1'b1; end
            else col <= col + 1'b1;
          end
        end
      end
    end
  end

  // A fault report must stay stable while the analyser holds the BIST.
  a_hold_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mismatch && hold_l) |=> (state == S_CMP && $stable(row) && $stable(col)));
endmodule
