// conv_mod2_adder: one modulo-2 adder of the convolutional encoder.
//
// Forms one code bit as the exclusive-OR of the shift-register taps that the
// generator polynomial G selects (bit i of G selects taps[i]). With the
// default K = 3 the generator 111 needs two two-input XOR gates and the
// generator 101 one, the three EX-OR gates of the encoder.
//
// Interface: taps in, code bit v out. Purely combinational: v follows taps
// in the same cycle.
module conv_mod2_adder #(
  parameter int unsigned    K = conv_pkg::CONV_K,
  parameter logic [K-1:0]   G = conv_pkg::CONV_G0
) (
  input  logic [K-1:0] taps,
  output logic         v
);

  always_comb v = ^(taps & G);

endmodule
