// reconfig_johnson: L-stage reconfigurable Johnson counter, the single-input-
// change (SIC) generator of the MSIC test pattern generator for short scan
// chains. q[i] is stage J_i.
//
// On each clock with step high (test clock CLK2 as an enable) it does one of
// three things, chosen by RJ_Mode and Init as the MSIC scheme defines them:
//   rj_mode=1, init=0  initialisation: a 0 enters J_0, so L steps clear it;
//   rj_mode=1, init=1  circular shift: J_0 <= J_{L-1}, J_i <= J_{i-1}; each
//                      stage then shows one Johnson codeword over L steps,
//                      and L steps bring the vector back unchanged;
//   rj_mode=0          Johnson counter: J_0 <= ~J_{L-1}, giving 2L distinct
//                      single-input-change vectors over 2L steps.
// Reset clears all stages (this design's choice; the scheme itself clears
// the counter with the initialisation mode).
module reconfig_johnson #(
  parameter int unsigned L = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         rj_mode,
  input  logic         init,
  output logic [L-1:0] q
);
  logic in_bit;
  always_comb begin
    if (!rj_mode) in_bit = !q[L-1];
    else if (init) in_bit = q[L-1];
    else in_bit = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (step) q <= {q[L-2:0], in_bit};
  end
endmodule
