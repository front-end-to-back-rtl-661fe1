// conv_pkg: constants shared by the feed-forward convolutional encoder.
//
// The encoder is the classic rate-1/2, constraint-length-3 code. Its two
// generator polynomials are read off the state table of the design: the
// first code bit (q0, "V1") is the modulo-2 sum of the new input bit and
// both state bits (generator 111, octal 7), the second (q1, "V2") is the sum
// of the new input bit and the oldest state bit (generator 101, octal 5).
//
// Tap numbering used throughout: tap 0 is the newest bit in the shift
// register (the input bit u being encoded), tap 1 the state bit S1 (one bit
// older), tap 2 the state bit S0 (two bits older). Bit i of a generator
// selects tap i. Both generators here are palindromes, so the numbering
// direction does not change them.
package conv_pkg;

  // Constraint length K: number of flip-flops in the shift register.
  localparam int unsigned CONV_K = 3;

  // Generator polynomials, bit i selects tap i.
  localparam logic [CONV_K-1:0] CONV_G0 = 3'b111;  // q0 = u ^ S1 ^ S0
  localparam logic [CONV_K-1:0] CONV_G1 = 3'b101;  // q1 = u ^ S0

  // Encoder state as printed in the state table: (S1,S0).
  typedef struct packed {
    logic s1;  // previous input bit
    logic s0;  // input bit before that
  } conv_state_t;

endpackage
