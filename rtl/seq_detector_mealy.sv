// seq_detector_mealy: Mealy-style detector for the serial bit sequence '1011'.
//
// One bit of d_in is sampled on every rising clock edge. d_out is 1 in the
// clock cycle in which the fourth bit of a '1011' is present on d_in, and 0
// otherwise; it is a combinational function of the current state and d_in,
// so it reacts in the same cycle as the input (zero cycles of latency) and is
// meant to be sampled on the next rising edge together with d_in.
// Detection overlaps: the final '1' of one match can be the first '1' of the
// next, so "1011011" gives two pulses.
//
// Structure: a register block holding current_state and a combinational block
// computing next_state and d_out from current_state and d_in. Transitions
// (input/output):
//   s0: 0/0 -> s0, 1/0 -> s1      s1: 0/0 -> s2, 1/0 -> s1
//   s2: 0/0 -> s0, 1/0 -> s3      s3: 0/0 -> s2, 1/1 -> s1
// The states, transitions, the two-block structure and the asynchronous,
// active-high reset to s0 follow the design; the state encoding is this
// design's choice (see seq_detector_pkg).
//
// Interface: clk, rst (asynchronous, active high), d_in, d_out.
module seq_detector_mealy
  import seq_detector_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic d_in,
  output logic d_out
);

  mealy_state_t current_state, next_state;

  // Register block.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) current_state <= MEALY_S0;
    else     current_state <= next_state;
  end

  // Combinational block: next-state and output logic.
  always_comb begin
    next_state = current_state;
    d_out      = 1'b0;
    case (current_state)
      MEALY_S0: next_state = d_in ? MEALY_S1 : MEALY_S0;
      MEALY_S1: next_state = d_in ? MEALY_S1 : MEALY_S2;
      MEALY_S2: next_state = d_in ? MEALY_S3 : MEALY_S0;
      MEALY_S3: begin
        next_state = d_in ? MEALY_S1 : MEALY_S2;
        d_out      = d_in;
      end
      default:  next_state = MEALY_S0;
    endcase
  end

endmodule
