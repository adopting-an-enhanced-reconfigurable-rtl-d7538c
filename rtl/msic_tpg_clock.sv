// msic_tpg_clock: MSIC test pattern generator for a test-per-clock circuit.
// The circuit's N*M primary inputs form an N x M grid; input (i, j), at
// pi[i*M + j], is driven by a two-input XOR of Johnson counter stage J_i and
// seed bit S_j.
//
// After start the generator clears the N-stage Johnson counter (N cycles in
// initialisation mode), then for each seed: steps the M-stage seed LFSR
// (CLK1), and steps the Johnson counter in counter mode 2N times (CLK2),
// one new pattern per cycle, flagged by valid; then done pulses after
// num_seeds seeds. One seed takes 2N+1 cycles. The procedure follows the
// MSIC test-per-clock scheme; grid size defaults (8 x 8) are this design's
// choice as the scheme gives none.
module msic_tpg_clock #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [15:0]    num_seeds,
  output logic [N*M-1:0] pi,
  output logic           valid,
  output logic           busy,
  output logic           done
);
  localparam int unsigned CW = $clog2(2 * N + 1);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SEED, S_RUN, S_DONE} state_t;

  state_t        state;
  logic [CW-1:0] cyc;
  logic [15:0]   seeds;
  logic [M-1:0]  seed;
  logic [N-1:0]  jq;

  seed_lfsr #(.W(M)) u_seed (.clk, .rst_n, .step(state == S_SEED), .seed);

  reconfig_johnson #(.L(N)) u_jc (
    .clk, .rst_n, .step(state == S_INIT || state == S_RUN),
    .rj_mode(state == S_INIT), .init(1'b0), .q(jq)
  );

  for (genvar i = 0; i < N; i++) begin : g_row
    msic_xor_net #(.N(M)) u_xor (.a({M{jq[i]}}), .b(seed), .y(pi[i*M +: M]));
  end

  assign valid = (state == S_RUN);
  assign busy  = (state != S_IDLE);
  assign done  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cyc <= '0; seeds <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && num_seeds != '0) begin
          state <= S_INIT; cyc <= '0; seeds <= '0;
        end
        S_INIT: begin
          cyc <= cyc + 1'b1;
          if (cyc == CW'(N - 1)) state <= S_SEED;
        end
        S_SEED: begin
          cyc <= '0; seeds <= seeds + 1'b1; state <= S_RUN;
        end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          if (cyc == CW'(2 * N - 1)) state <= (seeds == num_seeds) ? S_DONE : S_SEED;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
