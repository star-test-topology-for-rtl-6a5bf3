// tap_hub: the shared test access port (TAP), hub of the star.
//
// The computer talks to the TAP over TDI, TDO and TRST; every DUT hangs on
// its own bidirectional line. A packet on TDI is, first bit first:
//   1 start bit (1) | ADDR_W address bits, MSB first | FWD_BITS test bits.
// The TAP shifts the header into a serial-to-parallel register, latches the
// address and, through a demultiplexer, forwards the next FWD_BITS TDI bits
// onto the addressed DUT line only, one clock later. The forwarded bits are
// the test hub's own frame (its start bit and the stimulus pattern). The TAP
// then releases the line and connects that DUT line to TDO through a
// multiplexer, so the response the test hub sends back appears on TDO. It
// stays connected until TRST, after which the next packet may address any
// DUT. An address of NUM_DUTS or more selects nothing: no line is driven and
// TDO stays low (addr_err is raised).
//
// The packet layout, the fixed forward length and TRST as an asynchronous
// active-high reset are this design's own; the document gives the header
// address, the shift register and demultiplexer and the TRST reselection.
//
// Timing: start bit sampled at edge 0, address at edges 1..ADDR_W, test bit
// j sampled at edge ADDR_W+1+j and on the line for the following clock
// period. The line drive ends at edge ADDR_W+1+FWD_BITS. TDO is a
// combinational copy of the selected line while receiving.
module tap_hub
  import stt_pkg::*;
#(
  parameter int unsigned NUM_DUTS = NUM_DUTS_DEF,
  parameter int unsigned FWD_BITS = N_IN_DEF + 1,  // test hub frame length
  parameter int unsigned ADDR_W   = (NUM_DUTS > 1) ? $clog2(NUM_DUTS) : 1
) (
  input  logic                clk,       // test clock
  input  logic                trst,      // test reset, asynchronous, active high
  input  logic                tdi,       // serial packets from the computer
  output logic                tdo,       // serial responses to the computer
  input  logic [NUM_DUTS-1:0] line_in,   // resolved DUT lines
  output td_drv_t             line_drv [NUM_DUTS],  // TAP drive per line
  output logic [ADDR_W-1:0]   sel_addr,  // latched DUT address
  output logic                receiving, // TDO connected to the DUT line
  output logic                addr_err   // latched address selects no DUT
);

  typedef enum logic [1:0] {
    ST_IDLE,  // wait for a packet start bit
    ST_HDR,   // shift in the address
    ST_FWD,   // forward test bits to the addressed line
    ST_RECV   // pass the addressed line to TDO until TRST
  } state_t;

  localparam int unsigned CW = (FWD_BITS > ADDR_W) ? $clog2(FWD_BITS + 1)
                                                   : $clog2(ADDR_W + 1);

  state_t              state;
  logic [ADDR_W-1:0]   hdr;
  logic [CW-1:0]       cnt;
  logic                fwd_bit;
  logic                fwd_en;
  logic                valid;

  assign valid = (32'(hdr) < NUM_DUTS);

  always_ff @(posedge clk or posedge trst) begin
    if (trst) begin
      state   <= ST_IDLE;
      hdr     <= '0;
      cnt     <= '0;
      fwd_bit <= 1'b0;
      fwd_en  <= 1'b0;
    end else begin
      fwd_en <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          cnt <= '0;
          if (tdi) state <= ST_HDR;
        end
        ST_HDR: begin
          hdr <= {hdr[ADDR_W-2:0], tdi};
          cnt <= cnt + 1'b1;
          if (cnt == CW'(ADDR_W - 1)) begin
            cnt   <= '0;
            state <= ST_FWD;
          end
        end
        ST_FWD: begin
          fwd_bit <= tdi;
          fwd_en  <= valid;
          cnt     <= cnt + 1'b1;
          if (cnt == CW'(FWD_BITS - 1)) state <= ST_RECV;
        end
        ST_RECV: ;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Demultiplexer: only the addressed line is driven.
  always_comb begin
    for (int i = 0; i < NUM_DUTS; i++) begin
      line_drv[i].o  = fwd_bit;
      line_drv[i].oe = fwd_en && (32'(hdr) == i);
    end
  end

  // Multiplexer back to TDO.
  assign receiving = (state == ST_RECV);
  assign tdo       = receiving && valid && line_in[hdr];
  assign sel_addr  = hdr;
  assign addr_err  = (state == ST_FWD || state == ST_RECV) && !valid;

  // Direct addressing: never more than one DUT line driven.
  logic [NUM_DUTS-1:0] oe_vec;
  always_comb for (int i = 0; i < NUM_DUTS; i++) oe_vec[i] = line_drv[i].oe;

  a_one_line: assert property (@(posedge clk) $onehot0(oe_vec))
    else $error("tap_hub: more than one DUT line driven");

  initial begin
    assert (ADDR_W >= 2 && (1 << ADDR_W) >= NUM_DUTS)
      else $error("tap_hub: ADDR_W must be at least 2 and cover NUM_DUTS");
  end

endmodule
