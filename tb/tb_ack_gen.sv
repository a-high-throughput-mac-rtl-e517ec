// tb_ack_gen: ACK Generation. Requests an ACK, a CTS and a compressed
// BlockAck and compares every byte of each response with the 802.11 frame
// layout built here, including the duration arithmetic (received duration
// minus SIFS and the response time, floored at zero). Output stalls are random.
`timescale 1ns/1ps
module tb_ack_gen;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic gen, busy, out_valid, out_ready;
  resp_e kind;
  logic [47:0] ra, ta;
  logic [15:0] dur;
  logic [3:0] tid;
  logic [11:0] ssn;
  logic [63:0] bitmap;
  txbyte_t out;
  bus_req_t bq; bus_rsp_t bs;
  ack_gen dut (.clk, .rst_n, .gen, .kind, .ra, .ta, .dur_in(dur), .tid, .ssn, .bitmap,
               .busy, .out_valid, .out, .out_ready, .bus_req(bq), .bus_rsp(bs));

  txbyte_t got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out);
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic run(resp_e k, logic [15:0] d, output int n);
    got.delete();
    @(negedge clk); gen = 1; kind = k; dur = d;
    @(negedge clk); gen = 0;
    wait (!busy);
    repeat (2) @(posedge clk);
    n = got.size();
  endtask

  function automatic logic [7:0] b(logic [255:0] v, int i);
    return v[8*i +: 8];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    logic [255:0] e;
    gen = 0; kind = RESP_NONE; ra = 48'h665544332211; ta = 48'hCCBBAA998877;
    dur = 0; tid = 4'd5; ssn = 12'd300; bitmap = 64'hF0F0_1234_5678_9ABC; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // ACK: FC 0xD4 0x00, duration 200-16-44 = 140
    run(RESP_ACK, 16'd200, n);
    e = {176'h0, ra, 16'd140, 16'h00D4};
    check(n == 10, "ACK is 10 bytes");
    for (int i = 0; i < n; i++) check(got[i].data == b(e, i) && got[i].kind == K_HDR, $sformatf("ACK byte %0d", i));
    check(got[n-1].mpdu_last && got[n-1].ppdu_last, "ACK end flags");
    // CTS with a small duration: floored at 0
    run(RESP_CTS, 16'd30, n);
    e = {176'h0, ra, 16'd0, 16'h00C4};
    check(n == 10, "CTS is 10 bytes");
    for (int i = 0; i < n; i++) check(got[i].data == b(e, i), $sformatf("CTS byte %0d", i));
    // BlockAck: FC 0x94, BA control 0x5004 (TID 5, compressed), SSC 300<<4
    run(RESP_BA, 16'd3000, n);
    e = {32'h0, bitmap, 16'(300 << 4), 16'h5004, ta, ra, 16'(3000 - 60), 16'h0094};
    check(n == 32, "BlockAck is 32 bytes");
    for (int i = 0; i < n; i++) check(got[i].data == b(e, i), $sformatf("BA byte %0d: %h exp %h", i, got[i].data, b(e, i)));
    for (int i = 0; i < n - 1; i++) check(!got[i].mpdu_last, "no early end flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
