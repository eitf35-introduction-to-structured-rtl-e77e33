// par2ser_model: behavioural parallel-to-serial converter for testbenches.
//
// Models the stage of the test environment that turns stimulus words into
// the one-bit-per-cycle stream on a detector's d_in. A word is taken when
// word_valid and word_ready are both 1 at a rising edge and is then sent
// most significant bit first, one bit per clock cycle. word_ready is 1
// while the last bit of the current word is on ser (or while idle), so
// words offered back to back give a gapless stream. While idle ser is 0.
// Word width, bit order and handshake are this model's own choices; rst is
// asynchronous and active high, like the detectors'.
module par2ser_model #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] word,
  input  logic         word_valid,
  output logic         word_ready,
  output logic         ser
);

  logic [W-1:0]         shreg;
  logic [$clog2(W+1)-1:0] left;   // bits of the current word still to send

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
    end else if (word_ready && word_valid) begin
      shreg <= word;
      left  <= ($clog2(W+1))'(W);
    end else if (left != 0) begin
      shreg <= shreg << 1;
      left  <= left - 1'b1;
    end
  end

  assign word_ready = (left <= 1);
  assign ser        = (left != 0) ? shreg[W-1] : 1'b0;

endmodule
