// ic_core_model: behavioural stand-in for the logic of a device under test.
//
// The test hubs need some IC behind them to apply stimulus to and capture
// a response from. This model is a small combinational function,
//   ic_out = lower N_OUT bits of (dut_in * 5 + SEED),
// with an optional injected defect: while fault_en is high, output bit 0 is
// stuck at 0. It is a testbench model only, not part of the design.
module ic_core_model #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned SEED  = 0
) (
  input  logic [N_IN-1:0]  dut_in,
  input  logic             fault_en,
  output logic [N_OUT-1:0] ic_out
);
  logic [31:0] good;
  always_comb begin
    good   = 32'(dut_in) * 32'd5 + 32'(SEED);
    ic_out = good[N_OUT-1:0];
    if (fault_en) ic_out[0] = 1'b0;
  end
endmodule
