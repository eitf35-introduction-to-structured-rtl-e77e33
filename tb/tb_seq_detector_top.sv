// tb_seq_detector_top: end-to-end testbench for the two '1011' detectors.
//
// Mirrors the test environment of the design: random stimulus words are
// serialised by par2ser_model (MSB first, one bit per clock) and the serial
// stream drives d_in of the top, whose Mealy and Moore detectors run side by
// side. At every falling edge the testbench checks
//   - the serial bit against the words it offered (order and gaplessness),
//   - d_out_mealy against a reference built from the bits since reset: 1 when
//     the three previous bits and the present d_in read '1011',
//   - d_out_moore against the same reference one cycle later (its latency),
//   - d_out_moore against the previous cycle's d_out_mealy.
// Asynchronous resets hit the stream at arbitrary points, including while
// both outputs could be high. Mechanisms counted, each of which must occur:
// detections, overlapping detections ("1011011"), detections restarted from
// a '1010' near miss, and resets in the middle of the stream. The top runs
// with its default (and only) configuration. A watchdog ends the run.
module tb_seq_detector_top;

  localparam logic [3:0] SEQ             = 4'b1011;  // first bit in bit 3
  localparam int         W               = 8;
  localparam int         N_WORDS         = 2000;
  localparam int         WATCHDOG_CYCLES = N_WORDS * W * 2 + 1000;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] word = '0;
  logic         word_valid = 1'b0;
  logic         word_ready;
  logic         d_in;
  logic         d_out_mealy, d_out_moore;

  int checks = 0;
  int failures = 0;

  // Counters of the mechanisms exercised.
  int n_detect = 0;
  int n_overlap = 0;
  int n_restart = 0;
  int n_reset = 0;
  int n_idle = 0;

  par2ser_model #(.W(W)) u_p2s (
    .clk        (clk),
    .rst        (rst),
    .word       (word),
    .word_valid (word_valid),
    .word_ready (word_ready),
    .ser        (d_in)
  );

  seq_detector_top dut (
    .clk         (clk),
    .rst         (rst),
    .d_in        (d_in),
    .d_out_mealy (d_out_mealy),
    .d_out_moore (d_out_moore)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Bits the serialiser should send, in order.
  bit serial_q[$];

  // Reference model: bits sampled since reset (newest in bit 0).
  logic [5:0] hist = '0;
  int         nbits = 0;
  int         last_detect = -100;
  logic       prev_mealy = 1'b0;

  always @(negedge clk) begin
    if (!rst) begin
      logic exp_mealy, exp_moore;
      exp_mealy = (nbits >= 3) && ({hist[2:0], d_in} == SEQ);
      exp_moore = (nbits >= 4) && (hist[3:0] == SEQ);
      if (serial_q.size() > 0) begin
        check(d_in == serial_q[0], "serial bit out of order");
        void'(serial_q.pop_front());
      end else begin
        // Idle cycle: only allowed right after reset, and sends a 0.
        check(d_in == 1'b0 && nbits == 0, "serial stream has a gap");
        n_idle++;
      end
      check(d_out_mealy == exp_mealy,
            $sformatf("mealy: bit %0d d_out=%b expected %b", nbits, d_out_mealy, exp_mealy));
      check(d_out_moore == exp_moore,
            $sformatf("moore: bit %0d d_out=%b expected %b", nbits, d_out_moore, exp_moore));
      if (nbits > 0)
        check(d_out_moore == prev_mealy, "moore output is not the mealy output delayed by one cycle");
      if (exp_mealy) begin
        n_detect++;
        if (nbits - last_detect == 3) n_overlap++;
        if (nbits >= 5 && {hist[4:0], d_in} == 6'b101011) n_restart++;
        last_detect = nbits;
      end
      prev_mealy = d_out_mealy;
      hist = {hist[4:0], d_in};
      nbits++;
    end
  end

  // Offer words back to back; record their bits when one is taken and offer
  // a fresh random word.
  always @(posedge clk) begin
    if (!rst && word_valid && word_ready) begin
      for (int i = W - 1; i >= 0; i--) serial_q.push_back(word[i]);
      word <= W'($urandom);
    end
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words_sent;
    word = W'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    word_valid = 1'b1;
    words_sent = 0;
    while (words_sent < N_WORDS) begin
      @(posedge clk);
      if (word_ready) words_sent++;
      // Now and then, reset in the middle of a cycle.
      if (words_sent % 250 == 125 && word_ready) begin
        @(negedge clk);
        #2 rst = 1'b1;
        #1 check(d_out_mealy == 1'b0 && d_out_moore == 1'b0,
                 "outputs not cleared by asynchronous reset");
        n_reset++;
        serial_q.delete();
        @(posedge clk);
        #1 rst = 1'b0;
        hist = '0;
        nbits = 0;
        prev_mealy = 1'b0;
        words_sent++;
      end
    end
    @(negedge clk);
    check(n_detect > 0, "no detection");
    check(n_overlap > 0, "no overlapping detection");
    check(n_restart > 0, "no detection restarted from '1010'");
    check(n_reset > 0, "no reset in the middle of the stream");
    check(n_idle == n_reset + 1, "serialiser idle for more than one cycle after a reset");
    $display("top: %0d detections, %0d overlapping, %0d after '1010', %0d resets",
             n_detect, n_overlap, n_restart, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
