// tb_load_ctrl: self-checking test of the loading control flip-flop.
//
// Random startup / cnt_rst sequences with occasional asynchronous resets.
// After every clock edge, load must equal the startup value seen at that
// edge unless the counter reset was high then (load cleared); rst_n low
// clears it at once.
module tb_load_ctrl;
  logic clk = 1'b0;
  logic rst_n, startup, cnt_rst, load;
  logic exp_load;
  int   checks = 0, failures = 0;

  load_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (load !== exp) begin
      failures++;
      $display("FAIL %s: load=%0b expected %0b at %0t", what, load, exp, $time);
    end
  endtask

  initial begin
    startup = 1'b0; cnt_rst = 1'b0; rst_n = 1'b0;
    #2 check(1'b0, "reset clears");
    @(negedge clk) rst_n = 1'b1;
    exp_load = 1'b0;
    // Directed: startup rises, load follows at the next edge only.
    startup = 1'b1;
    #1 check(1'b0, "no change before the edge");
    @(posedge clk) #1 check(1'b1, "load rises on the edge after startup");
    @(negedge clk) cnt_rst = 1'b1;
    @(posedge clk) #1 check(1'b0, "counter reset clears load despite startup");
    @(negedge clk) begin cnt_rst = 1'b0; startup = 1'b0; end
    @(posedge clk) #1 check(1'b0, "stays low");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      startup = $urandom;
      cnt_rst = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 49) == 0) begin
        rst_n = 1'b0;
        #1 check(1'b0, "asynchronous clear");
        rst_n = 1'b1;
        continue;
      end
      exp_load = cnt_rst ? 1'b0 : startup;
      @(posedge clk) #1 check(exp_load, "random");
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
