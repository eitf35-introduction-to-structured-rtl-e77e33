// seq_detector_moore: Moore-style detector for the serial bit sequence '1011'.
//
// One bit of d_in is sampled on every rising clock edge. When the sampled
// bits end in '1011' the machine enters state s4, and d_out, which depends on
// the state alone, is 1 for that one cycle. d_out therefore rises one clock
// cycle after the Mealy detector's output for the same input stream, and is
// free of combinational paths from d_in. Detection overlaps: from s4 a '1'
// leads to s1 and a '0' to s2, so "1011011" gives two pulses.
//
// Structure: a register block holding current_state and a combinational block
// computing next_state and d_out. Transitions (output of the state in
// brackets):
//   s0[0]: 0 -> s0, 1 -> s1      s1[0]: 0 -> s2, 1 -> s1
//   s2[0]: 0 -> s0, 1 -> s3      s3[0]: 0 -> s2, 1 -> s4
//   s4[1]: 0 -> s2, 1 -> s1
// The states, transitions, the two-block structure and the asynchronous,
// active-high reset to s0 follow the design; the state encoding is this
// design's choice (see seq_detector_pkg). The three unused codes of the
// 3-bit state register return to s0.
//
// Interface: clk, rst (asynchronous, active high), d_in, d_out.
module seq_detector_moore
  import seq_detector_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic d_in,
  output logic d_out
);

  moore_state_t current_state, next_state;

  // Register block.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) current_state <= MOORE_S0;
    else     current_state <= next_state;
  end

  // Combinational block: next-state and output logic.
  always_comb begin
    next_state = MOORE_S0;
    d_out      = 1'b0;
    case (current_state)
      MOORE_S0: next_state = d_in ? MOORE_S1 : MOORE_S0;
      MOORE_S1: next_state = d_in ? MOORE_S1 : MOORE_S2;
      MOORE_S2: next_state = d_in ? MOORE_S3 : MOORE_S0;
      MOORE_S3: next_state = d_in ? MOORE_S4 : MOORE_S2;
      MOORE_S4: begin
        next_state = d_in ? MOORE_S1 : MOORE_S2;
        d_out      = 1'b1;
      end
      default:  next_state = MOORE_S0;
    endcase
  end

endmodule
