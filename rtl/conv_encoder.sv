// conv_encoder: feed-forward rate-1/2 convolutional encoder, K = 3.
//
// The encoder is a finite state machine whose state is the last two input
// bits. A three-stage shift register (conv_shift_reg) samples the serial data
// bit d on every rising clock edge; two modulo-2 adders (conv_mod2_adder)
// XOR the taps chosen by the generator polynomials 111 and 101 into the code
// bits q0 and q1. This realises the state table
//
//   u  (S1,S0) -> next (S1,S0)  (q0,q1)
//   0    00          00           00
//   1    00          10           11
//   0    01          00           11
//   1    01          10           00
//   0    10          01           10
//   1    10          11           01
//   0    11          01           01
//   1    11          11           10
//
// i.e. next state = (u, S1), q0 = u ^ S1 ^ S0, q1 = u ^ S0.
//
// Interface: clk; rst, active high and asynchronous, clears the register to
// the all-zero state; d, the serial data; q0 and q1, the two code bits of
// the bit last sampled; ffout, the two newest register stages
// {previous bit, newest bit}, which is the state the next input bit will
// see, numbered with S1 in bit 0 (three inputs, two outputs and a two-bit
// state bus make the seven pins of the design).
//
// Timing: one input bit and two code bits per clock. The bit on d at a
// rising edge is sampled into the register, and its code bits appear on
// q0/q1 just after that edge and stay for the whole following cycle (one
// clock of latency, all outputs come straight from flip-flops through XOR
// gates). For the input 1,0,1,1,0,1 after reset, q1 gives 1,0,0,1,1,0.
//
// The state table, the generators, the three flip-flops, the three XOR gates
// and the port set follow the design; the reset polarity and style, the
// registering of the input bit as the first of the three flip-flops and the
// bit order of ffout are choices of this implementation.
module conv_encoder #(
  parameter int unsigned              K  = conv_pkg::CONV_K,
  parameter logic [K-1:0]             G0 = conv_pkg::CONV_G0,
  parameter logic [K-1:0]             G1 = conv_pkg::CONV_G1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       d,
  output logic       q0,
  output logic       q1,
  output logic [1:0] ffout
);

  logic                 [K-1:0] taps;
  conv_pkg::conv_state_t        next_state;

  if (K < 2) begin : g_bad_k
    $error("conv_encoder needs K >= 2, got %0d", K);
  end

  conv_shift_reg #(.K(K)) u_sr (
    .clk  (clk),
    .rst  (rst),
    .d    (d),
    .taps (taps)
  );

  conv_mod2_adder #(.K(K), .G(G0)) u_add0 (
    .taps (taps),
    .v    (q0)
  );

  conv_mod2_adder #(.K(K), .G(G1)) u_add1 (
    .taps (taps),
    .v    (q1)
  );

  // State the next input bit will meet, brought out as {S0', S1'}.
  assign next_state.s1 = taps[0];
  assign next_state.s0 = taps[1];
  assign ffout         = {next_state.s0, next_state.s1};

endmodule
