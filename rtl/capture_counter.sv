// capture_counter: capturing counter of the TDO transmitter.
//
// Sets the capture period: it runs while `run` (the loading control
// output) is high and, in the last of N clock periods, raises cnt_rst to
// clear the loading control flip-flop, so exactly N response bits are
// shifted out, N being the number of IC outputs. While run is low the count
// is held at zero.
//
// The board circuit builds this as a chain of D flip-flops (four for a
// four-output IC) whose last stage resets the loading control. Here it is a
// binary counter that gives the same period of N clocks; cnt_rst is
// combinational from the count so that the clear lands on the N-th edge.
// retest is the inverted counter reset, as the board circuit brings it out
// through an inverter.
module capture_counter #(
  parameter int unsigned N = 4  // capture period in clocks (IC outputs)
) (
  input  logic clk,
  input  logic rst_n,    // asynchronous clear, active low
  input  logic run,      // count while high
  output logic cnt_rst,  // high in the last clock period of the capture
  output logic retest    // ~cnt_rst
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (!run || cnt_rst) begin
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign cnt_rst = run && (count == CW'(N - 1));
  assign retest  = ~cnt_rst;

endmodule
