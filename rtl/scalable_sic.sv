// scalable_sic: scalable single-input-change (SIC) counter of the MSIC test
// pattern generator, used when the scan chains are much longer than they are
// many. Instead of an L-stage Johnson counter it needs a K-bit count, a
// K-bit down-counter and an M-bit shift register (K = log2 L).
//
// The count ("adder") advances by one on each falling edge of scan enable
// se, i.e. once per scan load; when it wraps the fill value pol toggles.
// While se is low the down-counter ("subtractor") is loaded with the count
// (with the new count in the cycle of the falling edge, through the K
// multiplexers). While se is high, on each step (CLK2 enable) the
// down-counter counts towards zero and the shift register takes the M-Johnson
// bit: pol while the down-counter is non-zero, ~pol once it is zero. So in
// scan load number n each stage of the shift register sees a stream that
// starts with (n mod 2^K) copies of pol and then ~pol; stage i carries that
// stream i steps later, giving each of the M scan chains its own Johnson
// codeword. Over 2*2^K loads all 2L distinct codewords appear.
// The scheme clocks the adder with SE; using its falling edge, so that the
// new count is ready when SE drops for the capture, is this design's choice.
// Reset: count 0, pol 1.
module scalable_sic #(
  parameter int unsigned M = 10,
  parameter int unsigned K = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         se,
  output logic [M-1:0] q
);
  logic [K-1:0] cnt, sub;
  logic         pol, se_q, mj;
  logic [K-1:0] cnt_next;
  logic         se_fall;

  assign se_fall  = se_q && !se;
  assign cnt_next = cnt + 1'b1;
  assign mj       = (sub != '0) ? pol : !pol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sub <= '0; pol <= 1'b1; se_q <= 1'b0; q <= '0;
    end else begin
      se_q <= se;
      if (se_fall) begin
        cnt <= cnt_next;
        if (cnt_next == '0) pol <= !pol;
      end
      if (!se) sub <= se_fall ? cnt_next : cnt;
      else if (step) begin
        if (sub != '0) sub <= sub - 1'b1;
        q <= {q[M-2:0], mj};
      end
    end
  end
endmodule
