// tb_seq_detector_mealy: self-checking testbench for the Mealy '1011' detector.
//
// A new input bit is driven just after each rising edge and d_out is checked
// at the falling edge against a reference model that knows nothing of the
// state machine: it keeps the bits sampled since reset and expects d_out = 1
// exactly when the three previous bits and the present d_in read '1011'
// (zero cycles of latency, overlapping matches included). Stimulus: directed
// strings (single and overlapping matches, near misses), a long random
// stream, asynchronous resets in the middle of a cycle (d_out must drop at
// once, without a clock edge), and resets during the stream. All eight arcs
// of the state diagram must be taken at least once; an arc never taken
// counts as a failure. A watchdog ends the run after a fixed cycle count.
module tb_seq_detector_mealy;
  import seq_detector_pkg::*;

  localparam logic [3:0] SEQ             = 4'b1011;  // first bit in bit 3
  localparam int         RANDOM_BITS     = 4000;
  localparam int         WATCHDOG_CYCLES = 20000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic d_in = 1'b0;
  logic d_out;

  int checks = 0;
  int failures = 0;

  // Reference model state: last bits sampled since reset, and their number.
  logic [3:0] hist = '0;
  int         nbits = 0;
  int         pulses = 0;
  int         overlaps = 0;
  int         last_pulse_bit = -100;
  bit         arc_seen [4][2];

  seq_detector_mealy dut (
    .clk   (clk),
    .rst   (rst),
    .d_in  (d_in),
    .d_out (d_out)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Drive one bit for one clock cycle and check the output during it. Called
  // (and returns) 1 time unit after a rising edge.
  task automatic send(input logic b);
    logic exp;
    d_in = b;
    @(negedge clk);
    exp = (nbits >= 3) && ({hist[2:0], b} == SEQ);
    check(d_out == exp, $sformatf("bit %0d (d_in=%b hist=%b): d_out=%b expected %b",
                                  nbits, b, hist, d_out, exp));
    arc_seen[int'(dut.current_state)][b] = 1'b1;
    if (exp) begin
      pulses++;
      if (nbits - last_pulse_bit == 3) overlaps++;
      last_pulse_bit = nbits;
    end
    hist = {hist[2:0], b};
    nbits++;
    @(posedge clk);
    #1;
  endtask

  task automatic send_string(input string s);
    foreach (s[i]) send(s[i] == "1");
  endtask

  // Assert reset in the middle of a cycle (called at a falling edge), check
  // that d_out falls at once, hold it over one rising edge and release it.
  task automatic apply_reset();
    #2 rst = 1'b1;
    #1 check(d_out == 1'b0, "d_out not cleared by asynchronous reset");
    check(dut.current_state == MEALY_S0, "state not s0 right after asynchronous reset");
    @(posedge clk);
    #1 rst = 1'b0;
    hist  = '0;
    nbits = 0;
  endtask

  task automatic async_reset();
    @(negedge clk);
    apply_reset();
  endtask

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(dut.current_state == MEALY_S0, "state after reset is not s0");

    // Directed strings.
    send_string("1011");          // single match
    send_string("000");
    send_string("1011011");       // two overlapping matches
    send_string("0101011");       // match after a '1010' near miss
    send_string("111011");        // match after repeated 1s
    send_string("1001011");       // '100' falls back to s0
    send_string("10111011");
    // Reset while a match is being reported: s3 with d_in = 1.
    send_string("101");
    d_in = 1'b1;
    @(negedge clk);
    check(d_out == 1'b1, "d_out not 1 in s3 with d_in = 1");
    apply_reset();
    // A sequence split by a reset must not be reported.
    send_string("10");
    async_reset();
    send_string("11");
    send_string("0000");

    // Random stream with occasional resets.
    for (int i = 0; i < RANDOM_BITS; i++) begin
      if (i % 997 == 500) async_reset();
      send(1'($urandom_range(0, 1)));
    end

    foreach (arc_seen[s, b])
      check(arc_seen[s][b], $sformatf("arc from s%0d on input %0d never taken", s, b));
    check(overlaps > 0, "no overlapping detection exercised");
    $display("mealy: %0d detections, %0d overlapping", pulses, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
