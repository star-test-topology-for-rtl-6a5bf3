// tb_tdo_transmitter: self-checking test of the TDO transmitter.
//
// Three instances: the default (8-bit register, four-output IC), a full
// eight-output one, and a twelve-output one that needs two cascaded
// registers. For random IC responses the bench raises startup, holds
// it until cnt_rst as the TDI driver does, and checks, period by period
// after the edge that saw startup: tdo_oe high for exactly N_OUT periods,
// tdo = ic_out[N_OUT-1-k] as captured at that edge (the IC outputs are
// scrambled right after it), cnt_rst only in the last period, retest its
// complement, and the line released afterwards.
module tb_tdo_transmitter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;

  always #5 clk = ~clk;

  logic       st4, tdo4, oe4, cr4, rt4;
  logic [3:0] ic4;
  logic       st8, tdo8, oe8, cr8, rt8;
  logic [7:0] ic8;

  logic        st12, tdo12, oe12, cr12, rt12;
  logic [11:0] ic12;

  tdo_transmitter #(.SR_WIDTH(8), .N_OUT(12)) dut12 (.clk, .rst_n, .startup(st12),
                        .ic_out(ic12), .tdo(tdo12), .tdo_oe(oe12), .cnt_rst(cr12), .retest(rt12));

  tdo_transmitter dut4 (.clk, .rst_n, .startup(st4), .ic_out(ic4), .tdo(tdo4),
                        .tdo_oe(oe4), .cnt_rst(cr4), .retest(rt4));
  tdo_transmitter #(.SR_WIDTH(8), .N_OUT(8)) dut8 (.clk, .rst_n, .startup(st8),
                        .ic_out(ic8), .tdo(tdo8), .tdo_oe(oe8), .cnt_rst(cr8), .retest(rt8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send4(input logic [3:0] resp);
    @(negedge clk);
    ic4 = resp;
    check(oe4 == 1'b0, "4: line free before startup");
    st4 = 1'b1;
    @(posedge clk);            // capture edge
    #1 ic4 = ~resp;            // later changes must not matter
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      check(oe4 == 1'b1, $sformatf("4: oe in period %0d", k));
      check(tdo4 == resp[3-k], $sformatf("4: bit %0d got %0b exp %0b", k, tdo4, resp[3-k]));
      check(cr4 == (k == 3), $sformatf("4: cnt_rst in period %0d", k));
      check(rt4 == ~cr4, "4: retest");
      if (cr4) st4 = 1'b0;     // driver drops startup with cnt_rst
    end
    @(negedge clk);
    check(oe4 == 1'b0, "4: line released after N_OUT bits");
    check(cr4 == 1'b0, "4: cnt_rst low after capture");
  endtask

  task automatic send8(input logic [7:0] resp);
    @(negedge clk);
    ic8 = resp;
    st8 = 1'b1;
    @(posedge clk);
    #1 ic8 = 8'($urandom);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      check(oe8 == 1'b1, "8: oe");
      check(tdo8 == resp[7-k], $sformatf("8: bit %0d", k));
      check(cr8 == (k == 7), "8: cnt_rst period");
      if (cr8) st8 = 1'b0;
    end
    @(negedge clk);
    check(oe8 == 1'b0, "8: released");
  endtask

  // Twelve outputs: two registers cascaded.
  task automatic send12(input logic [11:0] resp);
    @(negedge clk);
    ic12 = resp;
    st12 = 1'b1;
    @(posedge clk);
    #1 ic12 = 12'($urandom);
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      check(oe12 == 1'b1, "12: oe");
      check(tdo12 == resp[11-k], $sformatf("12: bit %0d", k));
      check(cr12 == (k == 11), "12: cnt_rst period");
      if (cr12) st12 = 1'b0;
    end
    @(negedge clk);
    check(oe12 == 1'b0, "12: released");
  endtask

  initial begin
    st4 = 1'b0; st8 = 1'b0; st12 = 1'b0; ic4 = '0; ic8 = '0; ic12 = '0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(oe4 == 1'b0 && oe8 == 1'b0, "idle after reset");
    send4(4'b1010);
    send4(4'b0101);
    send8(8'b1101_0101);
    send12(12'hA5C);
    for (int n = 0; n < 50; n++) begin
      send4(4'($urandom));
      send8(8'($urandom));
      send12(12'($urandom));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
