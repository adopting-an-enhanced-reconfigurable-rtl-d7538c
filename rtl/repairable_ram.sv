// repairable_ram: bit-oriented RAM of 2^ROW_AW rows x 2^COL_AW columns with one
// spare row and one spare column, plus the wrapper's repair register.
//
// The physical array has ROWS+1 rows and COLS+1 columns; the last row and the
// last column are the spares. When RAE is set, every logical row at or above
// RRA is steered one physical row further, so the defective row RRA is
// skipped and the last logical row lands on the spare row. Columns are
// steered the same way by CRA/CAE. This shifting multiplexer arrangement is
// how the row and column multiplexers "skip the defective row"; the choice of
// shifting (rather than a direct spare substitution) is this design's.
//
// Interface: one access port. en with we=1 writes wdata at the next clock;
// en with we=0 returns the cell on rdata one cycle later. The repair register
// (bisr_pkg::repair_sig_t, SIG_W bits) is loaded serially: while rr_shift_en
// is high it shifts right by one per clock, taking rr_si into the MSB and
// giving its LSB on rr_so, so several RAM wrappers chain into one scan path.
//
// Manufacturing defects are modelled by defect_mask/defect_val: a physical
// cell whose mask bit is set reads as its defect_val bit (stuck-at fault).
// Index of a physical cell = prow*(COLS+1)+pcol. Reset clears the repair
// register only; the array content is undefined until written.
module repairable_ram
  import bisr_pkg::*;
#(
  parameter int unsigned ROW_AW = 3,
  parameter int unsigned COL_AW = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic [ROW_AW-1:0] addr_row,
  input  logic [COL_AW-1:0] addr_col,
  input  logic              wdata,
  output logic              rdata,
  input  logic              rr_shift_en,
  input  logic              rr_si,
  output logic              rr_so,
  output repair_sig_t       rr_q,
  input  logic [((1<<ROW_AW)+1)*((1<<COL_AW)+1)-1:0] defect_mask,
  input  logic [((1<<ROW_AW)+1)*((1<<COL_AW)+1)-1:0] defect_val
);
  localparam int unsigned ROWS  = 1 << ROW_AW;
  localparam int unsigned COLS  = 1 << COL_AW;
  localparam int unsigned PROWS = ROWS + 1;
  localparam int unsigned PCOLS = COLS + 1;
  localparam int unsigned PRW   = $clog2(PROWS);
  localparam int unsigned PCW   = $clog2(PCOLS);

  logic [PCOLS-1:0] mem [PROWS];
  repair_sig_t      rr;
  logic [PRW-1:0]   prow;
  logic [PCW-1:0]   pcol;
  int unsigned      cell_idx;

  // Repair register: serial load, LSB first out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           rr <= '0;
    else if (rr_shift_en) rr <= {rr_si, rr[SIG_W-1:1]};
  end
  assign rr_so = rr[0];
  assign rr_q  = rr;

  // Row and column steering.
  always_comb begin
    prow = PRW'(addr_row);
    pcol = PCW'(addr_col);
    if (rr.rae && (addr_row >= rr.rra[ROW_AW-1:0])) prow = PRW'(addr_row) + 1'b1;
    if (rr.cae && (addr_col >= rr.cra[COL_AW-1:0])) pcol = PCW'(addr_col) + 1'b1;
    cell_idx = 32'(prow) * PCOLS + 32'(pcol);
  end

  // Physical array with stuck-at defects applied on read.
  always_ff @(posedge clk) begin
    if (en && we) mem[prow][pcol] <= wdata;
    if (en && !we) begin
      if (defect_mask[cell_idx]) rdata <= defect_val[cell_idx];
      else                                rdata <= mem[prow][pcol];
    end
  end
endmodule
