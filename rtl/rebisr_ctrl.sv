// rebisr_ctrl: sequencer of the reconfigurable built-in self-repair flow.
//
// start_test runs, for RAM 0 .. NUM_RAM-1 in turn: clear the BIRA bitmap,
// start the BIST on that RAM (test_mode high, ram_sel naming it), wait for
// the BIST's done, start the BIRA allocation, wait for its done, and blow
// the RAM's signature into its word of the fuse box. After the last RAM it
// loads the fuse register and waits while the signatures are shifted into
// the repair registers; then done pulses and the RAMs are in normal mode.
// start_load performs only that last step, as at power-up of a part whose
// fuses were blown earlier. repair_ok is low if any RAM of the last test was
// found irreparable. The order of steps follows the repair flow of the BISR
// scheme; the one-cycle pulse handshakes are this design's choice.
module rebisr_ctrl #(
  parameter int unsigned NUM_RAM = 2,
  parameter int unsigned SEL_W   = (NUM_RAM > 1) ? $clog2(NUM_RAM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_test,
  input  logic             start_load,
  // BIST
  output logic             bist_start,
  input  logic             bist_done,
  output logic             test_mode,
  output logic [SEL_W-1:0] ram_sel,
  // BIRA
  output logic             bira_en,
  output logic             bira_clear,
  output logic             bira_analyze,
  input  logic             bira_done,
  input  logic             bira_repairable,
  // fuses
  output logic             fuse_prog_en,
  output logic             freg_load,
  input  logic             freg_done,
  // status
  output logic             busy,
  output logic             done,
  output logic             repair_ok
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_BIST, S_BWAIT, S_ANA, S_AWAIT, S_PROG, S_LOAD, S_LWAIT, S_DONE
  } state_t;

  state_t state;
  logic   irreparable;

  assign bist_start   = (state == S_BIST);
  assign test_mode    = (state == S_BIST) || (state == S_BWAIT);
  assign bira_en      = test_mode;
  assign bira_clear   = (state == S_CLR);
  assign bira_analyze = (state == S_ANA);
  assign fuse_prog_en = (state == S_PROG) && bira_repairable;
  assign freg_load    = (state == S_LOAD);
  assign busy         = (state != S_IDLE);
  assign done         = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ram_sel <= '0; irreparable <= 1'b0; repair_ok <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_test) begin
                  ram_sel <= '0; irreparable <= 1'b0; state <= S_CLR;
                end else if (start_load) state <= S_LOAD;
        S_CLR:   state <= S_BIST;
        S_BIST:  state <= S_BWAIT;
        S_BWAIT: if (bist_done) state <= S_ANA;
        S_ANA:   state <= S_AWAIT;
        S_AWAIT: if (bira_done) state <= S_PROG;
        S_PROG: begin
          if (!bira_repairable) irreparable <= 1'b1;
          if (ram_sel == SEL_W'(NUM_RAM - 1)) state <= S_LOAD;
          else begin
            ram_sel <= ram_sel + 1'b1;
            state   <= S_CLR;
          end
        end
        S_LOAD:  state <= S_LWAIT;
        S_LWAIT: if (freg_done) state <= S_DONE;
        S_DONE: begin
          repair_ok <= !irreparable;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
