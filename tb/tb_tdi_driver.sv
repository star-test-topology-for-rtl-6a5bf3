// tb_tdi_driver: self-checking test of the TDI driver (receiving half of a
// test hub).
//
// The bench plays the line and the transmitter: it sends a frame (start bit,
// then N_IN pattern bits, first bit first) with random idle gaps, checks that
// dut_in takes the pattern in one step at the edge of the last bit, that
// startup rises there and stays high until the bench answers with cnt_rst
// some clocks later, and that bits on the line during that time (the
// response) are ignored. It also checks that dut_in holds the old pattern
// while the next frame is being shifted in.
module tb_tdi_driver;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n, td_in, cnt_rst, startup;
  logic [N-1:0] dut_in;
  logic [N-1:0] prev;

  tdi_driver #(.N_IN(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic frame(input logic [N-1:0] pat, input int hold);
    @(negedge clk) td_in = 1'b1;             // start bit
    for (int i = N-1; i >= 0; i--) begin
      @(negedge clk);
      check(dut_in == prev, "dut_in holds the previous pattern while shifting");
      check(startup == 1'b0, "no startup while shifting");
      td_in = pat[i];
    end
    @(negedge clk);
    td_in = 1'b0;
    check(dut_in == pat, $sformatf("pattern applied: got %b exp %b", dut_in, pat));
    check(startup == 1'b1, "startup after the last bit");
    // Response time: random bits on the line must be ignored.
    for (int h = 0; h < hold; h++) begin
      td_in = 1'($urandom);
      cnt_rst = (h == hold - 1);
      #1 check(startup == ~cnt_rst, "startup held until cnt_rst");
      @(negedge clk);
    end
    cnt_rst = 1'b0;
    td_in = 1'b0;
    check(startup == 1'b0, "startup dropped after cnt_rst");
    check(dut_in == pat, "pattern still held");
    prev = pat;
  endtask

  initial begin
    td_in = 1'b0; cnt_rst = 1'b0; rst_n = 1'b0; prev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(dut_in == '0 && startup == 1'b0, "reset state");
    frame(4'b1011, 4);
    frame(4'b0000, 1);
    frame(4'b1111, 6);
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      frame(N'($urandom), $urandom_range(1, 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
