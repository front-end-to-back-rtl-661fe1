// conv_ref_pkg: reference model of the encoder for the testbenches.
//
// The reference is the encoder's state table written out row by row, not
// the XOR equations the RTL uses, so a wrong generator or a wrong tap order
// in the RTL shows up as a mismatch. Index the table with {u, S1, S0}.
package conv_ref_pkg;

  typedef struct packed {
    logic [1:0] next;  // (S1,S0) after the bit
    logic       q0;    // first code bit (V1)
    logic       q1;    // second code bit (V2)
  } row_t;

  // Rows in the order {u, S1, S0} = 000 ... 111.
  localparam row_t TABLE [8] = '{
    '{next: 2'b00, q0: 1'b0, q1: 1'b0},  // u=0 state 00
    '{next: 2'b00, q0: 1'b1, q1: 1'b1},  // u=0 state 01
    '{next: 2'b01, q0: 1'b1, q1: 1'b0},  // u=0 state 10
    '{next: 2'b01, q0: 1'b0, q1: 1'b1},  // u=0 state 11
    '{next: 2'b10, q0: 1'b1, q1: 1'b1},  // u=1 state 00
    '{next: 2'b10, q0: 1'b0, q1: 1'b0},  // u=1 state 01
    '{next: 2'b11, q0: 1'b0, q1: 1'b1},  // u=1 state 10
    '{next: 2'b11, q0: 1'b1, q1: 1'b0}   // u=1 state 11
  };

endpackage
