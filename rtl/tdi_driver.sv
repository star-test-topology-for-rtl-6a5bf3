// tdi_driver: receiving side of a test hub.
//
// Turns the serial stimulus arriving on the DUT's test-data line into the
// parallel pattern on the DUT inputs, then starts the TDO transmitter.
// The line idles low. A frame is a start bit (1) followed by N_IN pattern
// bits, first bit first; the first bit lands on dut_in[N_IN-1]. Bits are
// collected in a shift register and copied to the dut_in holding register in
// one step when the last bit arrives, so the DUT never sees a half-shifted
// pattern. From that edge on startup is held high until the transmitter
// reports the end of its capture (cnt_rst); while the transmitter owns the
// line the driver ignores it, and on that edge it returns to waiting for the
// next start bit. dut_in holds the last pattern until the next frame ends.
//
// The frame format, the holding register and the handshake with the
// transmitter are this design's own; the document gives only that the
// driver presents the serial data on the parallel outputs and generates the
// startup signal.
//
// Timing: with the start bit sampled at edge s, the pattern bits are sampled
// at edges s+1..s+N_IN; dut_in changes and startup rises at edge s+N_IN.
module tdi_driver #(
  parameter int unsigned N_IN = stt_pkg::N_IN_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            td_in,    // value on the test-data line
  input  logic            cnt_rst,  // from the TDO transmitter
  output logic [N_IN-1:0] dut_in,   // parallel stimulus to the DUT inputs
  output logic            startup   // to the TDO transmitter
);

  typedef enum logic [1:0] {
    ST_IDLE,     // wait for a start bit
    ST_SHIFT,    // collect N_IN pattern bits
    ST_CAPTURE   // startup high, transmitter sends the response
  } state_t;

  localparam int unsigned CW = $clog2(N_IN + 1);

  state_t          state;
  logic [N_IN-2:0] sr;   // first N_IN-1 bits of the frame
  logic [CW-1:0]   nbits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      sr     <= '0;
      nbits  <= '0;
      dut_in <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          nbits <= '0;
          if (td_in) state <= ST_SHIFT;
        end
        ST_SHIFT: begin
          sr    <= (N_IN-1)'({sr, td_in});
          nbits <= nbits + 1'b1;
          if (nbits == CW'(N_IN - 1)) begin
            dut_in <= {sr, td_in};
            state  <= ST_CAPTURE;
          end
        end
        ST_CAPTURE: begin
          if (cnt_rst) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign startup = (state == ST_CAPTURE) && !cnt_rst;

  initial begin
    assert (N_IN >= 2) else $error("tdi_driver: N_IN must be at least 2");
  end

endmodule
