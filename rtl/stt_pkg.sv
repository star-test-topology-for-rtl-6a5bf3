// stt_pkg: shared types and default sizes of the star test topology (STT).
//
// In the STT one test access port (TAP) on the board is the hub of a star;
// every device under test (DUT) reaches it through its own single
// bidirectional test-data line, and a test hub (TH) inside each DUT turns the
// serial traffic on that line into parallel stimulus and back. This package
// holds the sizes those blocks share and the two-signal bundle with which a
// block drives one end of a test-data line.
//
// Defaults: five DUTs as drawn in the board-level diagram, a four-output IC
// behind an 8-bit parallel-to-serial register as in the transmitter circuit.
// The number of DUT inputs (four) is this design's own choice.
package stt_pkg;

  // Number of DUT test lines on the TAP.
  localparam int unsigned NUM_DUTS_DEF = 5;
  // DUT inputs driven by the TH (stimulus bits per test pattern).
  localparam int unsigned N_IN_DEF     = 4;
  // DUT outputs captured by the TH (response bits per test pattern).
  localparam int unsigned N_OUT_DEF    = 4;
  // Length of the parallel-to-serial register (74HC165-style, 8 bits).
  localparam int unsigned SR_WIDTH_DEF = 8;

  // One end's drive onto a shared test-data line: value and output enable.
  typedef struct packed {
    logic o;   // bit driven onto the line
    logic oe;  // 1: this end drives the line; 0: high impedance
  } td_drv_t;

endpackage
