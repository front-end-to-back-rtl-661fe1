// tb_conv_encoder: end-to-end test of the convolutional encoder at its
// default parameters (K = 3, generators 111 and 101).
//
// 1. The reference run: reset asserted on a falling clock edge, then the data
//    1,0,1,1,0,1. The code bits must be q1 = 1,0,0,1,1,0 and
//    q0 = 1,1,0,0,0,0, one pair per clock, each pair valid in the cycle
//    after the edge that sampled its data bit (one clock of latency).
// 2. A long random stream, checked bit by bit against the state table held
//    in conv_ref_pkg, including the ffout state bus, with the asynchronous
//    reset asserted at random falling edges in between.
//
// Mechanisms counted: resets, the reference vector, and each of the eight
// transitions of the state table; a transition that never happened counts as
// a failure. Also checked: exactly one data bit is consumed per clock (the
// number of code-bit pairs equals the number of edges out of reset).
module tb_conv_encoder;
  import conv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       d   = 1'b0;
  logic       q0, q1;
  logic [1:0] ffout;

  conv_encoder dut (
    .clk   (clk),
    .rst   (rst),
    .d     (d),
    .q0    (q0),
    .q1    (q1),
    .ffout (ffout)
  );

  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  int   resets = 0, ref_runs = 0;
  int   trans_seen [8];
  int   edges_out_of_reset = 0, pairs_checked = 0;
  logic s1, s0;  // reference state (S1,S0)

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) edges_out_of_reset++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Assert reset on a falling edge, hold it over one rising edge, release it
  // on the next falling edge.
  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    #1;
    check(q0 == 1'b0 && q1 == 1'b0 && ffout == 2'b00, "outputs not cleared by reset");
    @(negedge clk);
    rst = 1'b0;
    s1 = 1'b0;
    s0 = 1'b0;
    resets++;
  endtask

  // Drive one data bit (on the falling edge), let the rising edge sample it,
  // and check the code bits and state one half period later.
  task automatic send(input logic u, output logic o0, output logic o1);
    row_t r;
    int   idx;
    d = u;
    // Before the edge the outputs still belong to the previous bit.
    idx = int'({u, s1, s0});
    r = TABLE[idx];
    @(posedge clk);
    @(negedge clk);
    check(q0 == r.q0 && q1 == r.q1,
          $sformatf("u=%b state=%b%b: q0q1=%b%b expected %b%b",
                    u, s1, s0, q0, q1, r.q0, r.q1));
    check(ffout == {r.next[0], r.next[1]},
          $sformatf("u=%b state=%b%b: ffout=%b expected %b",
                    u, s1, s0, ffout, {r.next[0], r.next[1]}));
    trans_seen[idx]++;
    pairs_checked++;
    {s1, s0} = r.next;
    o0 = q0;
    o1 = q1;
  endtask

  initial begin
    localparam logic [5:0] DATA = 6'b101101;  // sent left to right
    logic [5:0] got0, got1;
    logic       o0, o1;
    int         start_edges, start_pairs;

    // 1. Reference vector.
    do_reset();
    start_edges = edges_out_of_reset;
    start_pairs = pairs_checked;
    for (int i = 5; i >= 0; i--) begin
      send(DATA[i], o0, o1);
      got0[i] = o0;
      got1[i] = o1;
    end
    check(got1 == 6'b100110, $sformatf("reference run q1=%b expected 100110", got1));
    check(got0 == 6'b110000, $sformatf("reference run q0=%b expected 110000", got0));
    check(edges_out_of_reset - start_edges == pairs_checked - start_pairs,
          "not one code-bit pair per clock");
    ref_runs++;

    // 2. Random stream with occasional resets.
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(0, 299) == 0) do_reset();
      send(1'($urandom), o0, o1);
    end
    do_reset();

    check(resets >= 3, $sformatf("only %0d resets", resets));
    check(ref_runs == 1, "reference vector not run");
    for (int i = 0; i < 8; i++) begin
      check(trans_seen[i] > 0, $sformatf("transition %b never exercised", 3'(i)));
      $display("transition u=%b S1S0=%b%b taken %0d times",
               i[2], i[1], i[0], trans_seen[i]);
    end
    $display("resets=%0d reference_runs=%0d bits_encoded=%0d",
             resets, ref_runs, pairs_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
