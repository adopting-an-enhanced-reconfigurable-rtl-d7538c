// msic_ctrl: clock and control block of the MSIC test pattern generator for
// test-per-scan. CLK1 (seed clock) and CLK2 (test clock) are clock enables
// on one clock: seed_step and jc_step.
//
// After start it
//   1. initialises the Johnson counter: L steps with rj_mode=1, init=0;
//   2. steps the seed generator once (seed_step);
//   3. steps the Johnson counter once in counter mode (rj_mode=0): a new
//      Johnson vector;
//   4. shifts for L cycles with rj_mode=1, init=1 and se=1: the counter
//      rotates and every scan chain takes one bit per cycle, so each chain is
//      loaded with one Johnson codeword;
//   5. inserts one capture cycle (capture=1, se=0);
//   6. repeats 3-5 until 2L Johnson vectors have been used, and 2-6 for
//      num_seeds seeds; then done pulses.
// The sequence is the MSIC test-per-scan procedure. One seed takes
// 1 + 2L(L+2) cycles; a whole run L + num_seeds*(1 + 2L(L+2)) + 1 cycles.
module msic_ctrl #(
  parameter int unsigned L = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] num_seeds,
  output logic        seed_step,
  output logic        jc_step,
  output logic        rj_mode,
  output logic        init,
  output logic        se,
  output logic        capture,
  output logic        busy,
  output logic        done
);
  localparam int unsigned CW = $clog2(2 * L + 1);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SEED, S_JVEC, S_SHIFT, S_CAPT, S_DONE} state_t;

  state_t        state;
  logic [CW-1:0] cyc;    // cycle inside INIT / SHIFT
  logic [CW-1:0] vec;    // Johnson vector of the current seed
  logic [15:0]   seeds;  // seeds used

  assign seed_step = (state == S_SEED);
  assign jc_step   = (state == S_INIT) || (state == S_JVEC) || (state == S_SHIFT);
  assign rj_mode   = (state != S_JVEC);
  assign init      = (state != S_INIT);
  assign se        = (state == S_SHIFT);
  assign capture   = (state == S_CAPT);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cyc <= '0; vec <= '0; seeds <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && num_seeds != '0) begin
          state <= S_INIT; cyc <= '0; seeds <= '0;
        end
        S_INIT: begin
          cyc <= cyc + 1'b1;
          if (cyc == CW'(L - 1)) state <= S_SEED;
        end
        S_SEED: begin
          vec   <= '0;
          seeds <= seeds + 1'b1;
          state <= S_JVEC;
        end
        S_JVEC: begin
          cyc   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          cyc <= cyc + 1'b1;
          if (cyc == CW'(L - 1)) state <= S_CAPT;
        end
        S_CAPT: begin
          vec <= vec + 1'b1;
          if (vec != CW'(2 * L - 1)) state <= S_JVEC;
          else if (seeds != num_seeds) state <= S_SEED;
          else state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
