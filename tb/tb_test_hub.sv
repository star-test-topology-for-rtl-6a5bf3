// tb_test_hub: self-checking test of one test hub with an IC model behind it.
//
// The bench plays the TAP end of the test-data line: it drives a frame
// (start bit, N_IN pattern bits) and then releases the line. It checks that
// the pattern reaches the IC inputs, that the hub takes the line only in the
// N_OUT clock periods starting one edge after the last pattern bit, that
// the bits it sends are the IC's response, first ic_out[N_OUT-1], computed
// here from the IC model's formula, and that retest is low only in the last
// of them. Frames follow each other with random gaps, and a few use an IC
// with an injected stuck-at-0 output to see that the response shows it.
module tb_test_hub;
  import stt_pkg::*;
  localparam int NI = 4, NO = 4, SEED = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  td_drv_t bench_drv, hub_drv;
  logic line;
  logic [NI-1:0] dut_in;
  logic [NO-1:0] ic_out;
  logic retest, fault_en;

  always #5 clk = ~clk;

  always_comb begin
    if (bench_drv.oe)    line = bench_drv.o;
    else if (hub_drv.oe) line = hub_drv.o;
    else                 line = 1'b0;
  end

  test_hub #(.N_IN(NI), .N_OUT(NO), .SR_WIDTH(8)) dut (
    .clk, .rst_n, .td_in(line), .line_drv(hub_drv), .dut_in, .ic_out, .retest);

  ic_core_model #(.N_IN(NI), .N_OUT(NO), .SEED(SEED)) u_ic (
    .dut_in, .fault_en, .ic_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (bench_drv.oe && hub_drv.oe) begin
      failures++;
      $display("FAIL both ends drive the line at %0t", $time);
    end
  end

  task automatic test(input logic [NI-1:0] pat, input bit faulty);
    logic [NO-1:0] exp;
    exp = NO'(int'(pat) * 5 + SEED);
    if (faulty) exp[0] = 1'b0;
    fault_en = faulty;
    @(negedge clk);
    bench_drv = '{o: 1'b1, oe: 1'b1};          // start bit
    for (int i = NI-1; i >= 0; i--) begin
      @(negedge clk);
      check(hub_drv.oe == 1'b0, "hub silent while receiving");
      bench_drv.o = pat[i];
    end
    @(negedge clk);
    bench_drv = '0;                             // release the line
    check(dut_in == pat, $sformatf("pattern on IC inputs %b exp %b", dut_in, pat));
    check(hub_drv.oe == 1'b0, "one-period turnaround before the response");
    for (int k = 0; k < NO; k++) begin
      @(negedge clk);
      check(hub_drv.oe == 1'b1, $sformatf("hub drives in response period %0d", k));
      check(line == exp[NO-1-k], $sformatf("response bit %0d: %b exp %b", k, line, exp[NO-1-k]));
      check(retest == (k != NO-1), "retest low only in the last bit");
    end
    @(negedge clk);
    check(hub_drv.oe == 1'b0, "hub releases the line");
  endtask

  initial begin
    bench_drv = '0; fault_en = 1'b0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 16; p++) test(NI'(p), 1'b0);
    test(4'b0011, 1'b1);
    test(4'b0100, 1'b1);
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      test(NI'($urandom), ($urandom_range(0, 9) == 0));
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
