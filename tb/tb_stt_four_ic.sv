// tb_stt_four_ic: end-to-end test of a four-DUT board whose ICs have
// eight inputs and eight outputs each, the size of the IC core in the
// transmitter block diagram and the four-IC board of the original test run.
// The address space of two bits is then full, so no address is invalid.
//
// Same method as tb_stt_top: the bench is the computer, sends packets,
// reads responses at the fixed latency and compares them with the IC
// models' formula; two DUTs get a stuck-at defect that must be detected;
// reselection, line turnaround and the retest pulse are counted and must
// each occur. Patterns are a sweep with a stride (37 of 256) per DUT plus
// random ones.
module tb_stt_four_ic;
  import stt_pkg::*;
  localparam int ND = 4, NI = 8, NO = 8;
  localparam int AW = (ND > 2) ? $clog2(ND) : 2;
  localparam int LAT = AW + NI + 4;   // edge of the first response bit

  int checks = 0, failures = 0;
  logic tck = 1'b0;
  logic rst_n, trst, tdi, tdo;
  logic [NI-1:0] dut_in [ND];
  logic [NO-1:0] ic_out [ND];
  logic [ND-1:0] retest, line_conflict, line_value, fault_en;
  logic [AW-1:0] sel_addr;
  logic receiving, addr_err;

  // Mechanism counters.
  int n_addressed [ND];
  int n_reselect = 0, n_turnaround = 0, n_retest = 0, n_bad_addr = 0;
  int n_defect_found = 0;

  always #5 tck = ~tck;

  stt_top #(.NUM_DUTS(ND), .N_IN(NI), .N_OUT(NO)) dut (.*);

  for (genvar g = 0; g < ND; g++) begin : g_ic
    ic_core_model #(.N_IN(NI), .N_OUT(NO), .SEED(3 * g + 1)) u_ic (
      .dut_in(dut_in[g]), .fault_en(fault_en[g]), .ic_out(ic_out[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge tck) if (rst_n) begin
    checks++;
    if (line_conflict != '0) begin
      failures++;
      $display("FAIL drive conflict on lines %b at %0t", line_conflict, $time);
    end
  end

  function automatic logic [NO-1:0] expected(input int d, input logic [NI-1:0] pat);
    logic [NO-1:0] e;
    e = NO'(int'(pat) * 5 + 3 * d + 1);
    if (fault_en[d]) e[0] = 1'b0;
    return e;
  endfunction

  // One test of DUT `addr` with pattern `pat`; returns the response read.
  task automatic run_test(input int addr, input logic [NI-1:0] pat,
                          output logic [NO-1:0] resp);
    logic [NI+AW+1:0] pkt;
    logic [NI-1:0]    prev_in [ND];
    int               edge_no;
    bit               saw_tap, saw_th, saw_retest;
    pkt = {1'b1, AW'(addr), 1'b1, pat};
    prev_in = dut_in;
    saw_tap = 0; saw_th = 0; saw_retest = 0;
    @(negedge tck) trst = 1'b1;
    @(negedge tck) trst = 1'b0;
    n_reselect++;
    check(receiving == 1'b0 && tdo == 1'b0, "TAP idle after trst");
    resp = '0;
    // Edge 0 samples pkt's first bit.
    for (edge_no = 0; edge_no < LAT + NO + 2; edge_no++) begin
      tdi = (edge_no < $bits(pkt)) ? pkt[$bits(pkt)-1-edge_no] : 1'b0;
      @(posedge tck);
      if (edge_no >= LAT && edge_no < LAT + NO) resp[NO-1-(edge_no-LAT)] = tdo;
      @(negedge tck);
      if (addr < ND) begin
        if (dut.tap_drv[addr].oe) saw_tap = 1;
        if (dut.th_drv[addr].oe && saw_tap) saw_th = 1;
        if (!retest[addr]) saw_retest = 1;
      end
    end
    check(sel_addr == AW'(addr), "TAP latched the address");
    if (addr < ND) begin
      n_addressed[addr]++;
      check(dut_in[addr] == pat, $sformatf("DUT %0d inputs %b exp %b", addr, dut_in[addr], pat));
      for (int d = 0; d < ND; d++)
        if (d != addr) check(dut_in[d] == prev_in[d], $sformatf("DUT %0d untouched", d));
      check(saw_tap && saw_th, "line turnaround seen");
      check(saw_retest, "retest pulse seen");
      if (saw_tap && saw_th) n_turnaround++;
      if (saw_retest) n_retest++;
    end else begin
      check(addr_err == 1'b1, "invalid address flagged");
      check(resp == '0, "invalid address returns nothing");
      check(dut_in == prev_in, "invalid address touches no DUT");
      n_bad_addr++;
    end
  endtask

  initial begin
    logic [NO-1:0] resp, good;
    for (int d = 0; d < ND; d++) n_addressed[d] = 0;
    rst_n = 1'b0; trst = 1'b1; tdi = 1'b0; fault_en = '0;
    repeat (3) @(posedge tck);
    @(negedge tck) begin rst_n = 1'b1; trst = 1'b0; end

    // Every DUT, every pattern, healthy boards.
    for (int d = 0; d < ND; d++)
      for (int p = 0; p < (1 << NI); p += 7) begin
        run_test(d, NI'(p), resp);
        check(resp == expected(d, NI'(p)),
              $sformatf("DUT %0d pattern %0h: resp %b exp %b", d, p, resp, expected(d, NI'(p))));
      end

    // Invalid addresses.
    for (int a = ND; a < (1 << AW); a++) run_test(a, NI'($urandom), resp);

    // Defective DUTs: a stuck-at-0 output is found by comparing with the
    // good response; the other DUTs still test good.
    fault_en = ND'(4'b0110);
    for (int d = 0; d < ND; d++)
      for (int p = 0; p < (1 << NI); p += 7) begin
        run_test(d, NI'(p), resp);
        check(resp == expected(d, NI'(p)), $sformatf("DUT %0d pattern %0h (defect run)", d, p));
        good = NO'(p * 5 + 3 * d + 1);
        if (resp != good) begin
          check(fault_en[d] == 1'b1, $sformatf("DUT %0d flagged failed but is good", d));
          n_defect_found++;
        end
      end

    // Random traffic.
    fault_en = '0;
    for (int n = 0; n < 100; n++) begin
      int d;
      logic [NI-1:0] p;
      d = $urandom_range(0, ND - 1);
      p = NI'($urandom);
      run_test(d, p, resp);
      check(resp == expected(d, p), $sformatf("random: DUT %0d", d));
    end

    for (int d = 0; d < ND; d++) begin
      checks++;
      if (n_addressed[d] == 0) begin failures++; $display("FAIL DUT %0d never addressed", d); end
    end
    checks += 5;
    if (n_reselect == 0)     begin failures++; $display("FAIL no trst reselection"); end
    if (n_turnaround == 0)   begin failures++; $display("FAIL no line turnaround"); end
    if (n_retest == 0)       begin failures++; $display("FAIL no retest pulse"); end
    if (n_bad_addr != 0)     begin failures++; $display("FAIL invalid address with a full address space"); end
    if (n_defect_found == 0) begin failures++; $display("FAIL no defect found"); end
    $display("mechanisms: reselect=%0d turnaround=%0d retest=%0d bad_addr=%0d defects_found=%0d",
             n_reselect, n_turnaround, n_retest, n_bad_addr, n_defect_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge tck);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
