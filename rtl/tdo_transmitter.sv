// tdo_transmitter: captures the IC's response and sends it serially.
//
// Three units, as in the transmitter block diagram: the loading control
// flip-flop (load_ctrl), the parallel-to-serial register (piso_shift_reg)
// and the capturing counter (capture_counter). While load is low the
// register keeps taking the IC outputs in parallel. The clock edge that sees
// startup high raises load: the register stops loading and shifts one bit
// per clock, the counter runs, and after N_OUT clocks the counter clears
// load again. The serial output drives the DUT's test-data line through a
// tri-state buffer, enabled while load is high.
//
// The N_OUT IC outputs sit on the top N_OUT parallel inputs of the
// SR_WIDTH-bit register (the board circuit wires a four-output IC to the
// last four inputs E..H of an 8-bit 74HC165), so the first bit on the line is
// ic_out[N_OUT-1] and the last ic_out[0]. An IC with more outputs than one
// register holds gets ceil(N_OUT/SR_WIDTH) registers, cascaded the way the
// part is meant to be expanded: each register's serial input takes the
// previous register's last stage, and the last register drives the line. Unused parallel inputs, the serial
// input and the clock enable are tied low (this design's choice; the
// circuit does not show them clearly).
//
// Timing: tdo carries ic_out[N_OUT-1-k] in the k-th clock period after the
// edge that saw startup high, k = 0..N_OUT-1, with tdo_oe high for exactly
// those N_OUT periods. cnt_rst is high in the last of them.
module tdo_transmitter #(
  parameter int unsigned SR_WIDTH = stt_pkg::SR_WIDTH_DEF,
  parameter int unsigned N_OUT    = stt_pkg::N_OUT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             startup,  // from the TDI driver
  input  logic [N_OUT-1:0] ic_out,   // response of the IC core
  output logic             tdo,      // serial response bit
  output logic             tdo_oe,   // tri-state enable for the test line
  output logic             cnt_rst,  // capture period over (last bit)
  output logic             retest    // ~cnt_rst
);

  // Registers needed for N_OUT bits; more than one are cascaded by feeding
  // each register's serial output into the next one's serial input.
  localparam int unsigned N_REG = (N_OUT + SR_WIDTH - 1) / SR_WIDTH;

  logic                      load;
  logic [N_REG*SR_WIDTH-1:0] par;
  logic [N_REG-1:0]          q7;
  logic [N_REG-1:0]          q7_n_unused;

  // IC outputs on the top N_OUT parallel inputs of the chain.
  always_comb begin
    par = '0;
    par[N_REG*SR_WIDTH-1 -: N_OUT] = ic_out;
  end

  load_ctrl u_load (
    .clk     (clk),
    .rst_n   (rst_n),
    .startup (startup),
    .cnt_rst (cnt_rst),
    .load    (load)
  );

  for (genvar r = 0; r < N_REG; r++) begin : g_sr
    piso_shift_reg #(.WIDTH(SR_WIDTH)) u_sr (
      .cp   (clk),
      .pl_n (load),
      .ce_n (1'b0),
      .ds   ((r == 0) ? 1'b0 : q7[(r > 0) ? r - 1 : 0]),
      .d    (par[r*SR_WIDTH +: SR_WIDTH]),
      .q7   (q7[r]),
      .q7_n (q7_n_unused[r])
    );
  end

  assign tdo = q7[N_REG-1];

  capture_counter #(.N(N_OUT)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (load),
    .cnt_rst (cnt_rst),
    .retest  (retest)
  );

  assign tdo_oe = load;

  // The line is driven for exactly N_OUT clocks per capture.
  a_send_length: assert property (@(posedge clk)
                                  $rose(load) |-> load [*N_OUT] ##1 !load)
    else $error("tdo_transmitter: response not N_OUT bits long");

  initial begin
    assert (N_OUT >= 1 && SR_WIDTH >= 2)
      else $error("tdo_transmitter: N_OUT must be at least 1, SR_WIDTH at least 2");
  end

endmodule
