// tb_capture_counter: self-checking test of the capturing counter.
//
// For several capture lengths N (4 as in the four-output IC, and others),
// run is raised and held until cnt_rst is seen; cnt_rst must appear in
// exactly the N-th clock period of run, and retest must be its complement.
// Dropping run early must restart the count.
module tb_capture_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] run;
  logic [3:0] cnt_rst, retest;

  always #5 clk = ~clk;

  capture_counter #(.N(4)) u4 (.clk, .rst_n, .run(run[0]), .cnt_rst(cnt_rst[0]), .retest(retest[0]));
  capture_counter #(.N(8)) u8 (.clk, .rst_n, .run(run[1]), .cnt_rst(cnt_rst[1]), .retest(retest[1]));
  capture_counter #(.N(1)) u1 (.clk, .rst_n, .run(run[2]), .cnt_rst(cnt_rst[2]), .retest(retest[2]));
  capture_counter #(.N(5)) u5 (.clk, .rst_n, .run(run[3]), .cnt_rst(cnt_rst[3]), .retest(retest[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run unit u for a full capture; return the period in which cnt_rst rose.
  task automatic capture(input int u, input int n);
    int period;
    period = 0;
    @(negedge clk) run[u] = 1'b1;
    forever begin
      period++;
      #1;
      check(retest[u] == ~cnt_rst[u], "retest is the complement");
      if (cnt_rst[u]) break;
      if (period > 20) break;
      @(negedge clk);
    end
    check(period == n, $sformatf("unit %0d: cnt_rst in period %0d, expected %0d", u, period, n));
    // The edge that ends the period clears run (done by the load flip-flop).
    @(posedge clk);
    #1 run[u] = 1'b0;
    #1 check(cnt_rst[u] == 1'b0, "cnt_rst low once run is low");
  endtask

  initial begin
    run = '0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      capture(0, 4);
      capture(1, 8);
      capture(2, 1);
      capture(3, 5);
    end
    // Interrupted run: 2 periods of run, drop it, then a full capture.
    @(negedge clk) run[0] = 1'b1;
    @(negedge clk);
    check(cnt_rst[0] == 1'b0, "no cnt_rst after 2 periods");
    run[0] = 1'b0;
    @(negedge clk);
    capture(0, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
