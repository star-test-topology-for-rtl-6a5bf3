// piso_shift_reg: parallel-load, serial-out shift register (74HC165 function).
//
// WIDTH stages Q0..Q(WIDTH-1). While pl_n is low the register takes the
// parallel inputs d[] (d[0] into Q0); while pl_n is high and ce_n is low each
// rising edge of cp shifts one place towards the last stage
// (Q0->Q1->...), taking ds into Q0. With pl_n high and ce_n high it holds.
// The serial output q7 is the last stage, q7_n its complement; tying ds of a
// second register to q7 of this one chains them.
//
// Timing: the part this follows loads asynchronously. Here the stages load
// on the clock edge (synchronous design), and the serial outputs are made
// transparent to d[WIDTH-1] while pl_n is low, so q7 shows the last
// parallel input during the load phase exactly as the part does. The part
// also clocks on a rising edge of ce_n while cp is low (gated-OR clock); here
// ce_n is a plain clock enable sampled on the rising edge of cp. There is no
// reset: a load defines the contents, as in the part.
module piso_shift_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             cp,    // shift clock, rising edge
  input  logic             pl_n,  // parallel load, active low
  input  logic             ce_n,  // clock enable, active low
  input  logic             ds,    // serial data into Q0
  input  logic [WIDTH-1:0] d,     // parallel data, d[0] -> Q0
  output logic             q7,    // serial output, last stage
  output logic             q7_n   // complementary serial output
);

  logic [WIDTH-1:0] q;

  always_ff @(posedge cp) begin
    if (!pl_n) begin
      q <= d;
    end else if (!ce_n) begin
      q <= {q[WIDTH-2:0], ds};
    end
  end

  assign q7   = pl_n ? q[WIDTH-1] : d[WIDTH-1];
  assign q7_n = ~q7;

endmodule
