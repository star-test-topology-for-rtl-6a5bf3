// test_hub: the test hub (TH) inside one device under test.
//
// Makes the DUT's many inputs and outputs look like one node on a single
// bidirectional test-data line. The receiving half (tdi_driver) shifts in a
// stimulus frame from the line and applies it to the DUT inputs in parallel;
// it then raises startup, and the sending half (tdo_transmitter) captures
// the DUT outputs and shifts them back onto the same line, driving it only
// while it sends. The two halves share the line through the td_drv_t bundle:
// line_drv is this hub's drive, td_in the resolved value of the line.
//
// Timing: start bit sampled at edge s, pattern bits at s+1..s+N_IN, dut_in
// valid after edge s+N_IN, the response captured at edge s+N_IN+1 and sent
// in the N_OUT clock periods that follow it, first bit ic_out[N_OUT-1].
// The hub then waits for the next start bit.
//
// The split into a receiver that raises startup and a transmitter follows
// the original method; the frame format and the one-clock turnaround on the
// line are this design's own.
module test_hub
  import stt_pkg::*;
#(
  parameter int unsigned N_IN     = N_IN_DEF,
  parameter int unsigned N_OUT    = N_OUT_DEF,
  parameter int unsigned SR_WIDTH = SR_WIDTH_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             td_in,     // resolved test-data line
  output td_drv_t          line_drv,  // this hub's drive onto the line
  output logic [N_IN-1:0]  dut_in,    // stimulus to the IC core
  input  logic [N_OUT-1:0] ic_out,    // response of the IC core
  output logic             retest     // low in the last response bit period
);

  logic startup;
  logic cnt_rst;

  tdi_driver #(.N_IN(N_IN)) u_rx (
    .clk     (clk),
    .rst_n   (rst_n),
    .td_in   (td_in),
    .cnt_rst (cnt_rst),
    .dut_in  (dut_in),
    .startup (startup)
  );

  tdo_transmitter #(.SR_WIDTH(SR_WIDTH), .N_OUT(N_OUT)) u_tx (
    .clk     (clk),
    .rst_n   (rst_n),
    .startup (startup),
    .ic_out  (ic_out),
    .tdo     (line_drv.o),
    .tdo_oe  (line_drv.oe),
    .cnt_rst (cnt_rst),
    .retest  (retest)
  );

endmodule
