// tb_conv_shift_reg: test of the encoder's shift register.
//
// Drives random bits into a K = 3 register and a K = 5 register, keeps the
// history of the bits driven, and checks after every rising edge that tap i
// holds the bit driven i+1 edges earlier. Also checks that the asynchronous
// reset clears every stage at once, without waiting for a clock edge.
module tb_conv_shift_reg;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       d   = 1'b0;
  logic [2:0] taps3;
  logic [4:0] taps5;
  logic [4:0] hist;  // hist[i]: bit sampled i+1 edges ago
  int         checks = 0, failures = 0;

  conv_shift_reg #(.K(3)) dut3 (.clk(clk), .rst(rst), .d(d), .taps(taps3));
  conv_shift_reg #(.K(5)) dut5 (.clk(clk), .rst(rst), .d(d), .taps(taps5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_taps();
    checks++;
    if (taps3 !== hist[2:0] || taps5 !== hist) begin
      failures++;
      $display("FAIL t=%0t taps3=%b taps5=%b expected %b", $time, taps3, taps5, hist);
    end
  endtask

  initial begin
    hist = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    check_taps();
    for (int n = 0; n < 500; n++) begin
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[3:0], d};
      @(negedge clk);
      check_taps();
      // Assert reset between edges every so often: the register must clear
      // before the next edge.
      if (n % 97 == 50) begin
        #2 rst = 1'b1;
        #1;
        hist = '0;
        check_taps();
        @(negedge clk);
        rst = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
