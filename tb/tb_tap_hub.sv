// tb_tap_hub: self-checking test of the shared TAP.
//
// The bench plays the computer on tdi / tdo / trst and watches the DUT
// lines. Each packet is: start bit, address (MSB first), FWD_BITS test bits.
// For every address, valid (0..NUM_DUTS-1) and not (up to 7), it checks
// that test bit j appears on the addressed line, and only there, in the
// clock period after the edge that sampled it, that no line is driven
// outside those FWD_BITS periods, that afterwards tdo follows the addressed
// line (and no other) until trst, that an invalid address drives nothing,
// keeps tdo low and raises addr_err, and that trst allows a new selection.
module tb_tap_hub;
  import stt_pkg::*;
  localparam int ND = 5, FB = 5, AW = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic trst, tdi, tdo;
  logic [ND-1:0] line_in;
  td_drv_t line_drv [ND];
  logic [AW-1:0] sel_addr;
  logic receiving, addr_err;

  always #5 clk = ~clk;

  tap_hub #(.NUM_DUTS(ND), .FWD_BITS(FB), .ADDR_W(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [ND-1:0] oes();
    for (int i = 0; i < ND; i++) oes[i] = line_drv[i].oe;
  endfunction

  task automatic packet(input int addr, input logic [FB-1:0] bits);
    bit valid;
    valid = (addr < ND);
    @(negedge clk);
    trst = 1'b1;
    @(negedge clk);
    trst = 1'b0;
    check(oes() == '0 && tdo == 1'b0, "idle after trst");
    tdi = 1'b1;                                  // start bit
    for (int i = AW-1; i >= 0; i--) begin
      @(negedge clk);
      check(oes() == '0, "no drive during header");
      tdi = addr[i];
    end
    for (int j = 0; j <= FB; j++) begin
      @(negedge clk);
      if (j == 0) begin
        check(oes() == '0, "no drive before the first test bit");
      end else if (valid) begin
        check(oes() == ND'(1) << addr, $sformatf("only line %0d driven (bit %0d)", addr, j-1));
        check(line_drv[addr].o == bits[FB-j], $sformatf("forwarded bit %0d", j-1));
      end else begin
        check(oes() == '0, "invalid address drives nothing");
        check(addr_err == 1'b1, "addr_err");
      end
      tdi = (j < FB) ? bits[FB-1-j] : 1'b0;
    end
    @(negedge clk);
    check(oes() == '0, "line released after the test bits");
    check(receiving == 1'b1, "receiving");
    check(sel_addr == AW'(addr), "latched address");
    // Receive: tdo follows the addressed line only.
    for (int n = 0; n < 12; n++) begin
      line_in = ND'($urandom);
      tdi = 1'($urandom);                        // ignored while receiving
      #1;
      check(tdo == (valid ? line_in[addr] : 1'b0), "tdo follows the addressed line");
      @(negedge clk);
      check(oes() == '0, "no drive while receiving");
    end
  endtask

  initial begin
    tdi = 1'b0; line_in = '0; trst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) trst = 1'b0;
    for (int a = 0; a < 8; a++) packet(a, FB'($urandom));
    for (int n = 0; n < 60; n++) packet($urandom_range(0, 7), FB'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
