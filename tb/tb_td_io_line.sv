// tb_td_io_line: self-checking test of the shared test-data line.
//
// Walks every combination of the two drivers' value and enable and checks
// the resolved value (driver's value, 0 when floating) and the conflict
// flag. The conflicting combinations are driven only at an instant between
// clock edges, so the protocol assertion (sampled on the clock) stays quiet.
module tb_td_io_line;
  import stt_pkg::*;
  int checks = 0, failures = 0;
  logic    clk = 1'b0;
  td_drv_t tap_drv, th_drv;
  logic    value, conflict;

  td_io_line dut (.*);

  initial begin
    tap_drv = '0; th_drv = '0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < 16; k++) begin
        logic exp_v, exp_c;
        tap_drv = td_drv_t'(k[1:0]);
        th_drv  = td_drv_t'(k[3:2]);
        #1;
        exp_c = tap_drv.oe & th_drv.oe;
        exp_v = tap_drv.oe ? tap_drv.o : (th_drv.oe ? th_drv.o : 1'b0);
        checks++;
        if (value !== exp_v || conflict !== exp_c) begin
          failures++;
          $display("FAIL tap=%b th=%b: value=%b conflict=%b, expected %b %b",
                   tap_drv, th_drv, value, conflict, exp_v, exp_c);
        end
        // Leave a legal state before the next clock edge.
        if (exp_c) th_drv.oe = 1'b0;
        #1;
        clk = ~clk;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
