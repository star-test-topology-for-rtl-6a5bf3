// load_ctrl: loading control unit of the TDO transmitter.
//
// A single D flip-flop (a 74HC74 half in the transmitter circuit) with the
// three inputs the transmitter gives it: startup on D, the test clock, and a
// reset from the capturing counter. Its output `load` goes high on the first
// clock edge at which startup is high; load high releases the parallel load
// of the shift register (pl_n = load) so the register serialises, and starts
// the capturing counter. When the counter signals the end of the capture
// period (cnt_rst) the flip-flop is cleared on that clock edge, which
// returns the register to parallel load ("unload").
//
// The flip-flop's D input follows startup, so the driver holds startup high
// for the whole capture and drops it on the same edge as cnt_rst.
// cnt_rst acts synchronously here (in the board circuit it is a flip-flop
// preset/clear); rst_n is an asynchronous power-on clear, this design's own.
module load_ctrl (
  input  logic clk,      // test clock
  input  logic rst_n,    // asynchronous clear, active low
  input  logic startup,  // from the TDI driver: response is ready to capture
  input  logic cnt_rst,  // from the capturing counter: capture period over
  output logic load      // high while the shift register serialises
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load <= 1'b0;
    end else if (cnt_rst) begin
      load <= 1'b0;
    end else begin
      load <= startup;
    end
  end

endmodule
