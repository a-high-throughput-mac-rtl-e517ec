// tb_header_gen: Header Generation. A Tx Buffer model (one-cycle read
// latency) holds descriptors and bodies. The test builds the expected MPDUs
// from the frame fields, independently of the descriptor packing, and checks
// every byte, kind and end flag of: a single management frame, an RTS, a CTS,
// and an A-MPDU of three QoS data frames (one with HT control) whose
// delimiters are checked against a CRC-8 computed by polynomial division.
// It also checks that reading stalls while the software write pointer holds
// it back, and the cycle count of an unstalled frame: 2 cycles per word read
// and 1 per header, delimiter or body byte, plus 3 for start and finish.
`timescale 1ns/1ps
module tb_header_gen;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start, aggregate, busy, done, out_valid, out_ready;
  logic [7:0] count;
  logic [15:0] rd_ptr, wr_ptr;
  logic [31:0] rd_data;
  txbyte_t out;
  bus_req_t bq; bus_rsp_t bs;
  header_gen dut (.clk, .rst_n, .start, .count, .aggregate, .busy, .done, .rd_ptr, .rd_data,
                  .wr_ptr, .out_valid, .out, .out_ready, .bus_req(bq), .bus_rsp(bs));

  logic [31:0] ring [65536];
  always_ff @(posedge clk) rd_data <= ring[rd_ptr];

  int wp = 0;
  txbyte_t exp_q [$];
  int got = 0, bad = 0;
  bit rand_ready = 0;
  always @(negedge clk) out_ready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    txbyte_t e;
    got++;
    e = exp_q.size() ? exp_q.pop_front() : '0;
    if (out != e) begin
      bad++;
      if (bad < 5) $display("byte %0d: got %h/%0d/%b%b exp %h/%0d/%b%b", got, out.data, out.kind,
                            out.mpdu_last, out.ppdu_last, e.data, e.kind, e.mpdu_last, e.ppdu_last);
    end
  end

  // place one frame in the ring and queue its expected bytes
  task automatic put(logic [15:0] fc, int blen, bit agg, bit last);
    logic [15:0] dur = 16'($urandom), sc = 16'($urandom), qos = 16'($urandom);
    logic [47:0] a1 = {$urandom, $urandom}, a2 = {$urandom, $urandom}, a3 = {$urandom, $urandom};
    logic [31:0] htc = $urandom;
    logic [7:0] h [$];
    logic [7:0] body [];
    logic [1:0] ft = fc[3:2];
    logic [3:0] st = fc[7:4];
    bit q = (ft == FT_DATA) && st[3];
    int mlen;
    body = new[blen];
    foreach (body[i]) body[i] = 8'($urandom);
    // 802.11 header
    for (int i = 0; i < 2; i++) h.push_back(fc[8*i +: 8]);
    for (int i = 0; i < 2; i++) h.push_back(dur[8*i +: 8]);
    for (int i = 0; i < 6; i++) h.push_back(a1[8*i +: 8]);
    if (!(ft == FT_CTRL && (st == ST_CTS || st == ST_ACK)))
      for (int i = 0; i < 6; i++) h.push_back(a2[8*i +: 8]);
    if (ft != FT_CTRL) begin
      for (int i = 0; i < 6; i++) h.push_back(a3[8*i +: 8]);
      for (int i = 0; i < 2; i++) h.push_back(sc[8*i +: 8]);
      if (q) for (int i = 0; i < 2; i++) h.push_back(qos[8*i +: 8]);
      if (q && fc[15]) for (int i = 0; i < 4; i++) h.push_back(htc[8*i +: 8]);
    end
    mlen = h.size() + blen + 4;
    if (agg) begin
      logic [15:0] v = {12'(mlen), 4'h0};
      logic [7:0] d [4] = '{v[7:0], v[15:8], crc8_of(v), 8'h4E};
      for (int i = 0; i < 4; i++) exp_q.push_back('{data: d[i], kind: K_DELIM, mpdu_last: 0, ppdu_last: 0});
    end
    foreach (h[i]) begin
      bit e = (i == h.size() - 1) && blen == 0;
      exp_q.push_back('{data: h[i], kind: K_HDR, mpdu_last: e, ppdu_last: e && last});
    end
    foreach (body[i]) begin
      bit e = (i == blen - 1);
      exp_q.push_back('{data: body[i], kind: K_BODY, mpdu_last: e, ppdu_last: e && last});
    end
    // descriptor
    ring[wp++] = {dur, fc};
    ring[wp++] = a1[31:0];
    ring[wp++] = {a2[15:0], a1[47:32]};
    ring[wp++] = a2[47:16];
    ring[wp++] = a3[31:0];
    ring[wp++] = {sc, a3[47:32]};
    ring[wp++] = {16'(blen), qos};
    ring[wp++] = htc;
    for (int i = 0; i < blen; i += 4) begin
      logic [31:0] w = 0;
      for (int k = 0; k < 4 && i + k < blen; k++) w[8*k +: 8] = body[i + k];
      ring[wp++] = w;
    end
  endtask

  task automatic go(int n, bit agg, output int cyc);
    @(negedge clk) begin start = 1; count = 8'(n); aggregate = agg; end
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, p0;
    logic [31:0] v;
    start = 0; count = 0; aggregate = 0; wr_ptr = 0; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // 1) management frame (association request), 20-byte body, no stalls
    put(fc_word(FT_MGMT, 4'b0000), 20, 0, 1);
    wr_ptr = 16'(wp);
    go(1, 0, cyc);
    // 8 descriptor words + 5 body words: 2 cycles each; 24 header + 20 body bytes
    check(cyc == 13 * 2 + 24 + 20 + 3, $sformatf("unstalled frame takes %0d cycles", cyc));
    check(exp_q.size() == 0, "management frame complete");
    // 2) RTS then CTS, two separate frames
    put(fc_word(FT_CTRL, ST_RTS), 0, 0, 1);
    wr_ptr = 16'(wp);
    go(1, 0, cyc);
    put(fc_word(FT_CTRL, ST_CTS), 0, 0, 1);
    wr_ptr = 16'(wp);
    go(1, 0, cyc);
    check(exp_q.size() == 0, "RTS and CTS complete");
    // 3) A-MPDU of 3 QoS data frames, the second with HT control; random
    //    output stalls; the ring is filled slowly to exercise the stall
    rand_ready = 1;
    p0 = wp;
    put(fc_word(FT_DATA, 4'b1000), 61, 1, 0);
    put(16'h8000 | fc_word(FT_DATA, 4'b1000), 1500, 1, 0);
    put(fc_word(FT_DATA, 4'b1000), 3, 1, 1);
    fork
      go(3, 1, cyc);
      begin
        int stalls = 0;
        for (int p = p0; p <= wp; p++) begin
          wr_ptr = 16'(p);
          repeat (10) @(negedge clk);
          if (busy && rd_ptr == wr_ptr) stalls++;
          check(16'(rd_ptr - wr_ptr) == 0 || 16'(wr_ptr - rd_ptr) < 16'h8000, "read pointer never passes the write pointer");
        end
        check(stalls > 100, $sformatf("reader waited for software (%0d)", stalls));
      end
    join
    check(exp_q.size() == 0, "A-MPDU complete");
    check(bad == 0, $sformatf("all bytes as expected (%0d bad of %0d)", bad, got));
    @(negedge clk) bq = '{valid: 1, we: 0, addr: 17'h0, wdata: 0};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
    check(v == 6, $sformatf("MPDU counter %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
