// tb_conv_mod2_adder: exhaustive test of the modulo-2 adder.
//
// Two adders with the encoder's generators 111 and 101 see every tap pattern
// {u, S1, S0}; their outputs are compared with the code bits of the state
// table. A third adder with generator 011 checks that G selects taps rather
// than being hard-wired, against a sum worked out bit by bit.
module tb_conv_mod2_adder;
  import conv_ref_pkg::*;

  logic [2:0] taps;
  logic       v0, v1, v2;
  int         checks = 0, failures = 0;

  conv_mod2_adder #(.K(3), .G(3'b111)) dut0 (.taps(taps), .v(v0));
  conv_mod2_adder #(.K(3), .G(3'b101)) dut1 (.taps(taps), .v(v1));
  conv_mod2_adder #(.K(3), .G(3'b011)) dut2 (.taps(taps), .v(v2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic u, s1, s0;
      {u, s1, s0} = 3'(i);
      taps = {s0, s1, u};  // tap 0 = u, tap 1 = S1, tap 2 = S0
      #1;
      checks++;
      if (v0 !== TABLE[i].q0) begin
        failures++;
        $display("FAIL G=111 u=%b S1S0=%b%b: v=%b expected %b", u, s1, s0, v0, TABLE[i].q0);
      end
      checks++;
      if (v1 !== TABLE[i].q1) begin
        failures++;
        $display("FAIL G=101 u=%b S1S0=%b%b: v=%b expected %b", u, s1, s0, v1, TABLE[i].q1);
      end
      checks++;
      if (v2 !== (u != s1)) begin
        failures++;
        $display("FAIL G=011 u=%b S1=%b: v=%b", u, s1, v2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
