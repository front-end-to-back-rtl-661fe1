// conv_shift_reg: the constraint-length shift register of the encoder.
//
// K flip-flops in a chain. On every rising clock edge the serial data bit d
// enters stage 0 and every stage passes its bit one place up, so after the
// edge taps[i] holds the bit that was on d i+1 clock edges ago. With the
// default K = 3 these are the three flip-flops of the encoder: taps[0] is the
// bit now being encoded (u), taps[1] and taps[2] are the encoder state
// (S1, S0).
//
// Interface: clk, an active-high asynchronous reset rst that clears every
// stage to 0 (the all-zero starting state of the trellis), the serial input
// d and the parallel tap outputs. Timing: one bit is shifted in per clock;
// taps change only on a clock edge or on reset.
//
// Three flip-flops and the all-zero reset state follow the design; that the
// reset is asynchronous and active high is this implementation's choice.
module conv_shift_reg #(
  parameter int unsigned K = conv_pkg::CONV_K
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         d,
  output logic [K-1:0] taps
);

  if (K < 2) begin : g_bad_k
    $error("conv_shift_reg needs K >= 2, got %0d", K);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) taps <= '0;
    else     taps <= {taps[K-2:0], d};
  end

endmodule
