// tb_fcs_check: FCS Check. Sends MPDUs that end in the reference FCS and
// MPDUs with one corrupted byte; checks that bytes pass through one cycle
// later unchanged, that fcs_ok comes with the last byte exactly for the good
// ones, that abort is passed on, and the good/bad counters on the bus.
`timescale 1ns/1ps
module tb_fcs_check;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, out_valid, fcs_ok, in_abort, out_abort;
  rxbyte_t in, out;
  bus_req_t bq; bus_rsp_t bs;
  fcs_check dut (.clk, .rst_n, .in_valid, .in, .in_abort, .out_valid, .out, .fcs_ok,
                 .out_abort, .bus_req(bq), .bus_rsp(bs));

  int oks = 0, lasts = 0, passed = 0, mism = 0, aborts = 0, nbytes = 0;
  rxbyte_t exp_q [$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      passed++;
      if (exp_q.size() == 0 || out != exp_q.pop_front()) mism++;
      if (out.last) begin lasts++; if (fcs_ok) oks++; end
    end
    if (out_abort) aborts++;
  end

  task automatic frame(int n, bit corrupt);
    logic [7:0] d [];
    logic [31:0] f;
    d = new[n + 4];
    for (int k = 0; k < n; k++) d[k] = 8'($urandom);
    f = fcs_of(d, n);
    for (int k = 0; k < 4; k++) d[n + k] = f[8*k +: 8];
    if (corrupt) d[$urandom_range(0, n + 3)] ^= 8'h10;
    for (int k = 0; k < n + 4; k++) begin
      @(negedge clk);
      in_valid = 1;
      in = '{data: d[k], first: (k == 0), last: (k == n + 3)};
      exp_q.push_back(in); nbytes++;
      @(negedge clk) in_valid = 0;     // gap cycle
    end
  endtask

  task automatic rdreg(logic [16:0] a, output logic [31:0] v);
    @(negedge clk) bq = '{valid: 1, we: 0, addr: a, wdata: 0};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    in_valid = 0; in = '0; in_abort = 0; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 6; i++) frame(20 + 7 * i, 0);
    for (int i = 0; i < 4; i++) frame(14 + 3 * i, 1);
    for (int i = 0; i < 2; i++) frame(100, 0);
    @(negedge clk) in_abort = 1;
    @(negedge clk) in_abort = 0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0 && passed == nbytes, $sformatf("every byte passed on (%0d)", passed));
    check(mism == 0, "bytes unchanged");
    check(lasts == 12, "12 MPDU ends");
    check(oks == 8, $sformatf("8 good FCS reported (%0d)", oks));
    check(aborts == 1, "abort passed on");
    rdreg(17'h0, v); check(v == 8, $sformatf("good counter %0d", v));
    rdreg(17'h4, v); check(v == 4, $sformatf("bad counter %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
