// td_io_line: one bidirectional test-data line (TD I/O) between the TAP and
// a DUT.
//
// Each DUT has a single test pin, so stimulus and response share one wire:
// the TAP drives it while it forwards a stimulus frame, the DUT's test hub
// while it returns the response, and otherwise nobody does. This block
// resolves the two tri-state drivers into the value both ends read, with a
// pull-down giving 0 when the line floats (this design's choice of idle
// level). The protocol never lets both ends drive at once; `conflict`
// flags it if they do, the line then reads the TAP's value, and a
// simulation assertion reports it.
//
// Purely combinational.
module td_io_line
  import stt_pkg::*;
(
  input  logic    clk,       // used only by the drive-conflict assertion
  input  td_drv_t tap_drv,   // TAP end
  input  td_drv_t th_drv,    // test hub end
  output logic    value,     // what both ends read
  output logic    conflict   // both ends drive at once
);

  always_comb begin
    if (tap_drv.oe)     value = tap_drv.o;
    else if (th_drv.oe) value = th_drv.o;
    else                value = 1'b0;
  end

  assign conflict = tap_drv.oe && th_drv.oe;

  a_no_drive_conflict: assert property (@(posedge clk) !conflict)
    else $error("td_io_line: TAP and test hub drive the line together");

endmodule
