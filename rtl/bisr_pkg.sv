// bisr_pkg: types and constants shared by the built-in self-repair (BISR)
// blocks. A repair signature holds, for one RAM with one spare row and one
// spare column, the row repair address (RRA) with its enable (RAE) and the
// column repair address (CRA) with its enable (CAE). Every RAM uses the same
// fixed signature width, sized for the largest RAM the subsystem supports
// (16 rows x 16 columns); a smaller RAM ignores the upper address bits.
package bisr_pkg;
  localparam int unsigned MAX_RAW = 4;          // widest row address
  localparam int unsigned MAX_CAW = 4;          // widest column address
  localparam int unsigned SIG_W   = 2 + MAX_RAW + MAX_CAW;

  // Packed so that bit 0 is RAE: the serial repair register fills LSB first.
  typedef struct packed {
    logic [MAX_CAW-1:0] cra;
    logic               cae;
    logic [MAX_RAW-1:0] rra;
    logic               rae;
  } repair_sig_t;
endpackage
