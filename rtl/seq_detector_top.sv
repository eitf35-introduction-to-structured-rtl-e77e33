// seq_detector_top: the Mealy and the Moore '1011' detectors side by side.
//
// Both machines sample the same serial input d_in on the rising edge of clk
// and share the asynchronous, active-high reset rst. d_out_mealy is the
// Mealy machine's combinational output (1 in the cycle in which the final
// '1' of a '1011' is on d_in); d_out_moore is the Moore machine's registered
// output, which shows the same detection one clock cycle later. For any
// input stream started from reset, d_out_moore equals d_out_mealy delayed by
// one cycle. Building both implementations follows the design; feeding them
// from one shared input is this design's choice, mirroring a test
// environment in which one serial stream drives the unit under test.
module seq_detector_top (
  input  logic clk,
  input  logic rst,
  input  logic d_in,
  output logic d_out_mealy,
  output logic d_out_moore
);

  seq_detector_mealy u_mealy (
    .clk   (clk),
    .rst   (rst),
    .d_in  (d_in),
    .d_out (d_out_mealy)
  );

  seq_detector_moore u_moore (
    .clk   (clk),
    .rst   (rst),
    .d_in  (d_in),
    .d_out (d_out_moore)
  );

endmodule
