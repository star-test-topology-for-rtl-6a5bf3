// stt_top: a board under star test topology (STT).
//
// One shared test access port (tap_hub) serves NUM_DUTS devices under test.
// Each device has exactly one test pin: a bidirectional test-data line
// (td_io_line) runs point to point from the TAP to the device's test hub
// (test_hub), which applies stimulus to the device's N_IN inputs and returns
// its N_OUT outputs. The devices' own logic (the IC cores) is outside this
// module: their inputs and outputs are the dut_in and ic_out ports.
//
// Use from the computer side: pulse trst, then send on tdi, one bit per
// clock, the packet
//   1 | address (ADDR_W bits, MSB first) | 1 | pattern (N_IN bits, MSB first)
// The pattern appears on dut_in[address]; the response
// ic_out[address][N_OUT-1] .. [0] comes back on tdo, one bit per clock,
// sampled at clock edges ADDR_W+N_IN+4 .. ADDR_W+N_IN+3+N_OUT counted from
// the edge that samples the first start bit (edge 0). The addressed line
// stays connected to tdo until the next trst.
//
// Timing is single-clock: tck clocks the TAP and every test hub. rst_n is a
// board power-on reset for the test hubs; trst resets the TAP only, since
// the test hubs see nothing but their test line.
//
// The star of point-to-point lines, one pin per device, header addressing
// and reselection by TRST follow the original method; the packet layout,
// the number of DUT inputs, the shared test clock and rst_n are this
// design's own.
module stt_top
  import stt_pkg::*;
#(
  parameter int unsigned NUM_DUTS = NUM_DUTS_DEF,
  parameter int unsigned N_IN     = N_IN_DEF,
  parameter int unsigned N_OUT    = N_OUT_DEF,
  parameter int unsigned SR_WIDTH = SR_WIDTH_DEF,
  parameter int unsigned ADDR_W   = (NUM_DUTS > 2) ? $clog2(NUM_DUTS) : 2
) (
  input  logic                tck,
  input  logic                rst_n,
  input  logic                trst,
  input  logic                tdi,
  output logic                tdo,
  output logic [N_IN-1:0]     dut_in    [NUM_DUTS],
  input  logic [N_OUT-1:0]    ic_out    [NUM_DUTS],
  output logic [NUM_DUTS-1:0] retest,
  output logic [NUM_DUTS-1:0] line_conflict,
  output logic [NUM_DUTS-1:0] line_value,
  output logic [ADDR_W-1:0]   sel_addr,
  output logic                receiving,
  output logic                addr_err
);

  td_drv_t tap_drv [NUM_DUTS];
  td_drv_t th_drv  [NUM_DUTS];

  tap_hub #(
    .NUM_DUTS (NUM_DUTS),
    .FWD_BITS (N_IN + 1),
    .ADDR_W   (ADDR_W)
  ) u_tap (
    .clk       (tck),
    .trst      (trst),
    .tdi       (tdi),
    .tdo       (tdo),
    .line_in   (line_value),
    .line_drv  (tap_drv),
    .sel_addr  (sel_addr),
    .receiving (receiving),
    .addr_err  (addr_err)
  );

  for (genvar g = 0; g < NUM_DUTS; g++) begin : g_dut
    td_io_line u_line (
      .clk      (tck),
      .tap_drv  (tap_drv[g]),
      .th_drv   (th_drv[g]),
      .value    (line_value[g]),
      .conflict (line_conflict[g])
    );

    test_hub #(
      .N_IN     (N_IN),
      .N_OUT    (N_OUT),
      .SR_WIDTH (SR_WIDTH)
    ) u_th (
      .clk      (tck),
      .rst_n    (rst_n),
      .td_in    (line_value[g]),
      .line_drv (th_drv[g]),
      .dut_in   (dut_in[g]),
      .ic_out   (ic_out[g]),
      .retest   (retest[g])
    );
  end

endmodule
