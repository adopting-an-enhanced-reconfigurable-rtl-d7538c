// msic_xor_net: the XOR gate network of the MSIC test pattern generator.
// Output i is SIC generator output a[i] XOR seed bit b[i]; every scan chain
// (or, in the test-per-clock form, every primary input) has one two-input
// XOR gate. Purely combinational.
module msic_xor_net #(
  parameter int unsigned N = 10
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  assign y = a ^ b;
endmodule
