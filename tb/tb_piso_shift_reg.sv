// tb_piso_shift_reg: self-checking test of the 8-bit parallel-load,
// serial-out register.
//
// Part 1 replays the load / inhibit / serial-shift sequence of the part's
// timing diagram: parallel data with D0, D2, D4, D6 and D7 high is loaded,
// held with the clock enable high, then shifted out; Q7 must give
// D7, D6, ..., D0 and then the serial input. Part 2 drives random
// pl_n / ce_n / ds / d for many clocks and compares q7 and q7_n with a
// reference written from the function table (load, shift, hold).
module tb_piso_shift_reg;
  localparam int W = 8;

  logic         cp = 1'b0;
  logic         pl_n, ce_n, ds;
  logic [W-1:0] d;
  logic         q7, q7_n;
  int           checks = 0, failures = 0;

  piso_shift_reg #(.WIDTH(W)) dut (.*);

  always #5 cp = ~cp;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Reference: stages as an array, function-table rules.
  logic [W-1:0] ref_q;
  logic         exp_q7;

  initial begin
    // ---- Part 1: sequence of the timing diagram ----
    pl_n = 1'b1; ce_n = 1'b1; ds = 1'b0; d = '0;
    @(negedge cp);
    d    = 8'b1101_0101;            // D7 D6 . D4 . D2 . D0 high
    pl_n = 1'b0;                    // load
    #1 check(q7, 1'b1, "q7 transparent to D7 during load");
    check(q7_n, 1'b0, "q7_n during load");
    @(negedge cp);
    pl_n = 1'b1;                    // inhibit: ce_n still high
    d    = 8'h00;
    repeat (3) begin
      @(negedge cp);
      check(q7, 1'b1, "hold while ce_n high");
    end
    ce_n = 1'b0;                    // serial shift
    begin
      logic [W-1:0] pat;
      pat = 8'b1101_0101;
      for (int k = 0; k < W; k++) begin
        check(q7, pat[W-1-k], $sformatf("serial bit %0d", k));
        check(q7_n, ~pat[W-1-k], $sformatf("serial bit %0d (complement)", k));
        @(negedge cp);
      end
      check(q7, 1'b0, "DS shifted through after 8 clocks");
    end

    // ---- Part 2: random against the function table ----
    // Load once so every stage is known.
    pl_n = 1'b0; d = $urandom; @(negedge cp);
    ref_q = d;
    for (int n = 0; n < 2000; n++) begin
      pl_n = ($urandom_range(0, 3) == 0) ? 1'b0 : 1'b1;
      ce_n = ($urandom_range(0, 3) == 0) ? 1'b1 : 1'b0;
      ds   = $urandom;
      d    = $urandom;
      #1;
      exp_q7 = pl_n ? ref_q[W-1] : d[W-1];
      check(q7, exp_q7, "random q7 before edge");
      check(q7_n, ~exp_q7, "random q7_n before edge");
      @(posedge cp);
      if (!pl_n)      ref_q = d;
      else if (!ce_n) for (int i = W-1; i > 0; i--) ref_q[i] = ref_q[i-1];
      if (pl_n && !ce_n) ref_q[0] = ds;
      @(negedge cp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge cp);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
