// seed_lfsr: seed generator of the multiple-single-input-change (MSIC) test
// pattern generator, a W-stage linear feedback shift register with a
// primitive feedback polynomial, so that it runs through all 2^W-1 non-zero
// states.
//
// Fibonacci form: on each clock with step high (the low-frequency test clock
// CLK1, here a clock enable) the register shifts towards the MSB and the
// XOR of the tap stages enters bit 0. seed[i] is seed bit S_i. Reset loads
// the state 1 (any non-zero state would do; the value is this design's
// choice). The tap table covers W = 3 .. 40, enough for the 20- to 38-bit
// seeds the MSIC scheme uses; each entry is a primitive polynomial
// 1 + x^k (+ ...) + x^W, i.e. the order of x modulo it is 2^W - 1.
module seed_lfsr #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] seed
);
  // Tap positions (1-based stage numbers) of a primitive polynomial.
  function automatic logic [63:0] taps(int unsigned w);
    logic [63:0] t;
    t = '0;
    unique case (w)
      3:  begin t[2]=1; t[1]=1; end
      4:  begin t[3]=1; t[2]=1; end
      5:  begin t[4]=1; t[2]=1; end
      6:  begin t[5]=1; t[4]=1; end
      7:  begin t[6]=1; t[5]=1; end
      8:  begin t[7]=1; t[5]=1; t[4]=1; t[3]=1; end
      9:  begin t[8]=1; t[4]=1; end
      10: begin t[9]=1; t[6]=1; end
      11: begin t[10]=1; t[8]=1; end
      12: begin t[11]=1; t[5]=1; t[3]=1; t[0]=1; end
      13: begin t[12]=1; t[3]=1; t[2]=1; t[0]=1; end
      14: begin t[13]=1; t[4]=1; t[2]=1; t[0]=1; end
      15: begin t[14]=1; t[13]=1; end
      16: begin t[15]=1; t[14]=1; t[12]=1; t[3]=1; end
      17: begin t[16]=1; t[13]=1; end
      18: begin t[17]=1; t[10]=1; end
      19: begin t[18]=1; t[5]=1; t[1]=1; t[0]=1; end
      20: begin t[19]=1; t[16]=1; end
      21: begin t[20]=1; t[18]=1; end
      22: begin t[21]=1; t[20]=1; end
      23: begin t[22]=1; t[17]=1; end
      24: begin t[23]=1; t[22]=1; t[21]=1; t[16]=1; end
      25: begin t[24]=1; t[21]=1; end
      26: begin t[25]=1; t[5]=1; t[1]=1; t[0]=1; end
      27: begin t[26]=1; t[4]=1; t[1]=1; t[0]=1; end
      28: begin t[27]=1; t[24]=1; end
      29: begin t[28]=1; t[26]=1; end
      30: begin t[29]=1; t[5]=1; t[3]=1; t[0]=1; end
      31: begin t[30]=1; t[27]=1; end
      32: begin t[31]=1; t[21]=1; t[1]=1; t[0]=1; end
      33: begin t[32]=1; t[19]=1; end
      34: begin t[33]=1; t[26]=1; t[1]=1; t[0]=1; end
      35: begin t[34]=1; t[32]=1; end
      36: begin t[35]=1; t[24]=1; end
      37: begin t[36]=1; t[4]=1; t[3]=1; t[2]=1; t[1]=1; t[0]=1; end
      38: begin t[37]=1; t[5]=1; t[4]=1; t[0]=1; end
      39: begin t[38]=1; t[34]=1; end
      default: begin t[39]=1; t[37]=1; t[20]=1; t[18]=1; end
    endcase
    return t;
  endfunction

  localparam logic [63:0] TAPS = taps(W);

  initial assert (W >= 3 && W <= 40) else $fatal(1, "seed_lfsr: W must be 3..40");

  logic fb;
  always_comb begin
    fb = 1'b0;
    for (int i = 0; i < W; i++) if (TAPS[i]) fb ^= seed[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    seed <= W'(1);
    else if (step) seed <= {seed[W-2:0], fb};
  end
endmodule
