// seq_detector_pkg: state encodings shared by the two '1011' sequence
// detectors and their testbenches.
//
// The Mealy machine needs four states (s0..s3) and the Moore machine five
// (s0..s4), following the two state diagrams of the design. State names
// carry the machine's prefix so that both enums can live in one package.
// The binary encodings (state k encoded as k) are this design's choice; any
// encoding gives the same behaviour.
package seq_detector_pkg;

  // Mealy states: sK means "the last K input bits match the first K bits of
  // the sequence".
  typedef enum logic [1:0] {
    MEALY_S0 = 2'd0,
    MEALY_S1 = 2'd1,
    MEALY_S2 = 2'd2,
    MEALY_S3 = 2'd3
  } mealy_state_t;

  // Moore states: as for Mealy, plus s4 = "the whole sequence has just been
  // received", the only state whose output is 1.
  typedef enum logic [2:0] {
    MOORE_S0 = 3'd0,
    MOORE_S1 = 3'd1,
    MOORE_S2 = 3'd2,
    MOORE_S3 = 3'd3,
    MOORE_S4 = 3'd4
  } moore_state_t;

endpackage
