// fuse_macro: behavioural model of the one-time-programmable fuse box that
// keeps the repair signatures of the RAMs. A real fuse box is a process
// macro (laser-blown fuses or electrically programmable e-fuses); this model
// has its ports and its one property that matters to the repair flow: a
// fuse, once blown, stays blown, so programming can only set bits.
//
// Interface: the box holds NUM_RAM words of SIG_W bits. With prog_en high at
// a clock edge, the word at prog_addr becomes (old word OR prog_data). All
// fuses are read in parallel on fuse_q. Fuses do not depend on reset: they
// start unblown at power-up of the simulation and keep their state.
module fuse_macro #(
  parameter int unsigned NUM_RAM = 2,
  parameter int unsigned SIG_W   = 10,
  parameter int unsigned AW      = (NUM_RAM > 1) ? $clog2(NUM_RAM) : 1
) (
  input  logic                       clk,
  input  logic                       prog_en,
  input  logic [AW-1:0]              prog_addr,
  input  logic [SIG_W-1:0]           prog_data,
  output logic [NUM_RAM*SIG_W-1:0]   fuse_q
);
  logic [SIG_W-1:0] fuse [NUM_RAM];

  initial for (int i = 0; i < NUM_RAM; i++) fuse[i] = '0;

  always @(posedge clk)
    if (prog_en) fuse[prog_addr] <= fuse[prog_addr] | prog_data;

  always_comb
    for (int i = 0; i < NUM_RAM; i++) fuse_q[i*SIG_W +: SIG_W] = fuse[i];
endmodule
