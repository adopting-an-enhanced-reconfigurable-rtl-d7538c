// fuse_register: transport register between the fuse box and the repair
// registers of the RAM wrappers.
//
// A load pulse copies all TOTAL_W fuse bits in parallel (fuse_q); in each of
// the following TOTAL_W cycles shift_en is high and the register shifts
// right by one, giving its LSB on so. The repair registers, chained behind
// so, shift in the same cycles, so after TOTAL_W cycles each holds its own
// signature; done then pulses for one cycle. A full transfer takes
// TOTAL_W+1 cycles from load to done. Serial transfer follows the scheme's
// "loaded into the fuse register first and then shifted to the repair
// registers"; LSB-first order and one bit per clock are this design's choice.
module fuse_register #(
  parameter int unsigned TOTAL_W = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [TOTAL_W-1:0] fuse_q,
  output logic               shift_en,
  output logic               so,
  output logic               done,
  output logic [TOTAL_W-1:0] q
);
  localparam int unsigned CW = $clog2(TOTAL_W + 1);

  logic [CW-1:0] cnt;

  assign shift_en = (cnt != '0);
  assign so       = q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !shift_en) begin
        q   <= fuse_q;
        cnt <= CW'(TOTAL_W);
      end else if (shift_en) begin
        q   <= {1'b0, q[TOTAL_W-1:1]};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) done <= 1'b1;
      end
    end
  end
endmodule
