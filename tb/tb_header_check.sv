// tb_header_check: Header Check. Feeds MPDUs (with the FCS verdict driven
// directly) and checks, for each, the event and requested response (ACK to
// unicast data and management, CTS to RTS, BlockAck to BlockAckReq and to
// QoS data inside an A-MPDU, nothing to group-addressed or foreign frames or
// bad FCS), which frames are committed to the Rx Buffer ring (bytes compared
// with a model of the buffer, descriptors read over the bus), the BlockAck
// scoreboard against a reference set of received sequence numbers, including
// the window move by a BlockAckReq, the interrupt, and ring overflow.
`timescale 1ns/1ps
module tb_header_check;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] ME = 48'h0000_5566_7788, PEER = 48'h0000_1122_3344;
  logic in_valid, fcs_ok, in_abort, rx_agg, buf_wr_en, evt_valid, intr;
  rxbyte_t in;
  logic [12:0] buf_wr_addr; logic [7:0] buf_wr_data;
  rxkind_e evt_kind; resp_e evt_resp;
  logic [47:0] evt_ta, own_addr; logic [15:0] evt_dur; logic [3:0] evt_tid;
  logic [11:0] ba_ssn; logic [63:0] ba_bitmap;
  bus_req_t bq; bus_rsp_t bs;
  header_check dut (.clk, .rst_n, .in_valid, .in, .fcs_ok, .in_abort, .rx_agg,
                    .buf_wr_en, .buf_wr_addr, .buf_wr_data, .evt_valid, .evt_kind, .evt_resp,
                    .evt_ta, .evt_dur, .evt_tid, .ba_ssn, .ba_bitmap, .own_addr, .intr,
                    .bus_req(bq), .bus_rsp(bs));

  logic [7:0] bufm [8192];
  always @(posedge clk) if (buf_wr_en) bufm[buf_wr_addr] = buf_wr_data;
  int n_evt = 0; rxkind_e last_kind; resp_e last_resp; logic [3:0] last_tid; logic [47:0] last_ta;
  always @(posedge clk) if (evt_valid) begin
    n_evt++; last_kind = evt_kind; last_resp = evt_resp; last_tid = evt_tid; last_ta = evt_ta;
  end

  task automatic acc(bit we, logic [16:0] a, logic [31:0] d, output logic [31:0] v);
    @(negedge clk) bq = '{valid: 1, we: we, addr: a, wdata: d};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  logic [7:0] fr [$];
  task automatic hdr(logic [15:0] fc, logic [47:0] a1, logic [15:0] sc, logic [15:0] qos);
    logic [1:0] ft = fc[3:2];
    fr.delete();
    for (int i = 0; i < 2; i++) fr.push_back(fc[8*i +: 8]);
    fr.push_back(8'd100); fr.push_back(8'd0);                         // duration 100
    for (int i = 0; i < 6; i++) fr.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) fr.push_back(PEER[8*i +: 8]);
    if (ft == FT_CTRL) begin                                          // BAR fields
      for (int i = 0; i < 2; i++) fr.push_back(qos[8*i +: 8]);       // BAR control
      for (int i = 0; i < 2; i++) fr.push_back(sc[8*i +: 8]);        // starting seq. control
    end else begin
      for (int i = 0; i < 6; i++) fr.push_back(PEER[8*i +: 8]);
      for (int i = 0; i < 2; i++) fr.push_back(sc[8*i +: 8]);
      if (fc[7]) for (int i = 0; i < 2; i++) fr.push_back(qos[8*i +: 8]);
    end
  endtask

  // send `fr` plus body and FCS; returns whether an event came
  task automatic send(int body, bit good, bit agg, output bit evt);
    int n0 = n_evt;
    for (int i = 0; i < body + 4; i++) fr.push_back(8'($urandom));
    rx_agg = agg;
    foreach (fr[i]) begin
      @(negedge clk);
      in_valid = 1;
      in = '{data: fr[i], first: (i == 0), last: (i == fr.size() - 1)};
      fcs_ok = good && (i == fr.size() - 1);
    end
    @(negedge clk) in_valid = 0;
    repeat (2) @(negedge clk);
    evt = (n_evt != n0);
  endtask

  // pop one descriptor and compare the stored bytes with `fr`
  task automatic stored(string what);
    logic [31:0] d; int bad = 0;
    acc(0, 17'h10, 0, d);
    check(d[31] && d[29:16] == 14'(fr.size()), $sformatf("%s: descriptor %h", what, d));
    foreach (fr[i]) if (bufm[13'(4 * d[15:0] + i)] != fr[i]) bad++;
    check(bad == 0, $sformatf("%s: stored bytes", what));
  endtask

  task automatic none_stored(string what);
    logic [31:0] d;
    acc(0, 17'h10, 0, d);
    check(!d[31], {what, ": not stored"});
  endtask

  bit got_seq [4096];
  task automatic check_ba(string what);
    logic [63:0] e = 0;
    for (int i = 0; i < 64; i++) e[i] = got_seq[12'(ba_ssn + 12'(i))];
    check(ba_bitmap == e, $sformatf("%s: bitmap %h expected %h (ssn %0d)", what, ba_bitmap, e, ba_ssn));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit evt; logic [31:0] v;
    in_valid = 0; in = '0; fcs_ok = 0; in_abort = 0; rx_agg = 0; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    acc(1, 17'h0, ME[31:0], v); acc(1, 17'h4, 32'(ME[47:32]), v);
    check(own_addr == ME, "own address register");
    // unicast data -> ACK, stored, interrupt
    hdr(fc_word(FT_DATA, 4'b0000), ME, 16'h0010, 0); send(40, 1, 0, evt);
    check(evt && last_kind == RX_DATA && last_resp == RESP_ACK && last_ta == PEER, "data: ACK requested");
    check(intr, "interrupt on a stored frame");
    stored("data");
    acc(1, 17'h14, 1, v); check(!intr, "interrupt cleared");
    // management frame -> ACK, stored
    hdr(fc_word(FT_MGMT, 4'b0000), ME, 16'h0020, 0); send(10, 1, 0, evt);
    check(evt && last_resp == RESP_ACK, "management: ACK"); stored("management");
    // RTS -> CTS, not stored
    hdr(fc_word(FT_CTRL, ST_RTS), ME, 0, 0);
    repeat (4) void'(fr.pop_back());                                  // RTS has no BAR fields
    send(0, 1, 0, evt);
    check(evt && last_kind == RX_RTS && last_resp == RESP_CTS, "RTS: CTS"); none_stored("RTS");
    // other station, bad FCS: ignored
    hdr(fc_word(FT_DATA, 4'b0000), PEER, 16'h0030, 0); send(20, 1, 0, evt);
    check(!evt, "foreign frame ignored"); none_stored("foreign");
    hdr(fc_word(FT_DATA, 4'b0000), ME, 16'h0030, 0); send(20, 0, 0, evt);
    check(!evt, "bad FCS ignored"); none_stored("bad FCS");
    // group-addressed data: stored, no response
    hdr(fc_word(FT_DATA, 4'b0000), 48'hFFFF_FFFF_FFFF, 16'h0040, 0); send(20, 1, 0, evt);
    check(evt && last_resp == RESP_NONE, "broadcast: no response"); stored("broadcast");
    // QoS data outside an A-MPDU -> ACK, scoreboard untouched
    hdr(fc_word(FT_DATA, 4'b1000), ME, {12'd7, 4'd0}, 16'h0005); send(20, 1, 0, evt);
    check(evt && last_resp == RESP_ACK && last_tid == 5, "single QoS data: ACK"); stored("QoS");
    check(ba_bitmap == 0, "scoreboard untouched by a single MPDU");
    // A-MPDU of QoS data, sequence numbers 100..110 without 103 and 107 (bad FCS)
    for (int s = 100; s <= 110; s++) begin
      bit ok = (s != 103 && s != 107);
      hdr(fc_word(FT_DATA, 4'b1000), ME, {12'(s), 4'd0}, 16'h0005); send(30, ok, 1, evt);
      if (ok) begin
        got_seq[s] = 1;
        check(evt && last_resp == RESP_BA, "A-MPDU QoS data: BlockAck");
        stored("A-MPDU QoS");
      end else none_stored("bad subframe");
    end
    check(ba_ssn == 12'(110 - 63), $sformatf("window ends at newest (ssn %0d)", ba_ssn));
    check_ba("after A-MPDU");
    // BlockAckReq with starting sequence 104, TID 5 -> BlockAck, window moves
    hdr(fc_word(FT_CTRL, ST_BAR), ME, {12'd104, 4'd0}, 16'h5004); send(0, 1, 0, evt);
    check(evt && last_kind == RX_BAR && last_resp == RESP_BA && last_tid == 5, "BAR: BlockAck, TID");
    check(ba_ssn == 104, "BAR moves the window start");
    check_ba("after BAR");
    stored("BAR");
    // a later A-MPDU well beyond the window
    for (int s = 300; s < 303; s++) begin
      hdr(fc_word(FT_DATA, 4'b1000), ME, {12'(s), 4'd0}, 16'h0005); send(8, 1, 1, evt);
      got_seq[s] = 1; stored("far");
    end
    for (int s = 0; s < 300; s++) got_seq[s] = 0;
    check_ba("after a jump");
    // overflow: free the ring, then 1000-byte frames until it is full
    acc(0, 17'hC, 0, v); acc(1, 17'h8, v, v);
    for (int k = 0; k < 9; k++) begin
      hdr(fc_word(FT_DATA, 4'b0000), ME, 16'(k << 4), 0); send(974, 1, 0, evt);
      if (k < 8) stored("fill"); else none_stored("overflowing frame");
    end
    acc(0, 17'h18, 0, v);
    check(v == 1, $sformatf("overflow counted (%0d)", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
