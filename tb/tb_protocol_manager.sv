// tb_protocol_manager: Protocol Manager. Simple models stand in for Header
// Generation (busy for a while after each start), PLCP Transmit (a PPDU is
// ready per build and takes a fixed time to send), ACK Generation and the
// receive side (RXENABLE plus Header Check events). Checks, in cycles of the
// 50 MHz clock:
//   * a data PPDU starts AIFS = SIFS + AIFSN x 9 us after the medium became
//     idle (CW 0), and AIFS restarts when the medium is busy during it;
//   * random backoff adds a whole number of slots, at most CW;
//   * RTS then data: the data starts SIFS (16 us) after the CTS ends;
//   * a missing response fails the sequence after the 50 us timeout, flushes
//     the FIFO and raises the interrupt; a received ACK succeeds;
//   * a continued TXOP sends SIFS after the last received PPDU, without
//     contention;
//   * a frame asking for an ACK gets one built and sent SIFS after it ends;
//   * a continuation written while a sequence runs is queued (STATUS bit 4),
//     built while the data PPDU is sent, and sent SIFS after the ACK; when the
//     sequence fails instead, it is still built, then flushed and not sent.
`timescale 1ns/1ps
module tb_protocol_manager;
  import mac_pkg::*;
  localparam int CPU  = 50;
  localparam int SIFS = SIFS_US * CPU, SLOT = SLOT_US * CPU;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;               // 50 MHz
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cca_busy = 0, rx_en = 0, hg_start, hg_agg, hg_busy, tx_go, tx_flush, ppdu_ready;
  logic tx_busy, tx_done = 0, txq_empty, rx_ppdu_end, evt_valid, ag_gen, ag_busy, intr;
  logic [7:0] hg_count; logic [6:0] mcs;
  rxkind_e evt_kind; resp_e evt_resp, ag_kind;
  logic [47:0] ag_ra; logic [15:0] ag_dur; logic [3:0] ag_tid;
  bus_req_t bq; bus_rsp_t bs;
  protocol_manager dut (
    .clk, .rst_n, .cca_busy, .phy_rx_enable(rx_en), .hg_start, .hg_count, .hg_aggregate(hg_agg),
    .hg_busy, .tx_go, .tx_flush, .mcs, .ppdu_ready, .tx_busy, .tx_done, .txq_empty,
    .rx_ppdu_end, .evt_valid, .evt_kind, .evt_resp, .evt_ta(48'h0000_AABB_CCDD),
    .evt_dur(16'd500), .evt_tid(4'd3), .ag_gen, .ag_kind, .ag_ra, .ag_dur, .ag_tid, .ag_busy,
    .intr, .bus_req(bq), .bus_rsp(bs));

  // ---- models
  int hg_left = 0, tx_left = 0, ag_left = 0, queued = 0, built = 0;
  longint cyc = 0, t_go [$], t_hg_idle;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign hg_busy   = (hg_left != 0);
  assign tx_busy   = (tx_left != 0);
  assign ag_busy   = (ag_left != 0);
  assign ppdu_ready = (queued != 0);
  assign txq_empty = (queued == 0) && !tx_busy;
  always_ff @(posedge clk) if (rst_n) begin
    tx_done <= 1'b0;
    if (hg_start) begin hg_left <= 30; built <= built + 1; end
    else if (hg_left == 1) begin hg_left <= 0; queued <= queued + 1; t_hg_idle <= cyc + 1; end
    else if (hg_left != 0) hg_left <= hg_left - 1;
    if (ag_gen) ag_left <= 12;
    else if (ag_left == 1) begin ag_left <= 0; queued <= queued + 1; end
    else if (ag_left != 0) ag_left <= ag_left - 1;
    if (tx_go && ppdu_ready) begin
      tx_left <= 100; queued <= queued - 1; t_go.push_back(cyc);
    end else if (tx_left == 1) begin tx_left <= 0; tx_done <= 1'b1; end
    else if (tx_left != 0) tx_left <= tx_left - 1;
    if (tx_flush) queued <= 0;
  end

  // ---- receive side: a PPDU of `len` cycles; the Header Check event comes
  // near its end and the PPDU-end pulse one cycle after RXENABLE falls
  longint t_rx_end;
  task automatic rx_ppdu(int len, rxkind_e k, resp_e r);
    @(negedge clk) rx_en = 1;
    repeat (len - 6) @(negedge clk);
    evt_valid = 1; evt_kind = k; evt_resp = r;
    @(negedge clk) evt_valid = 0;
    repeat (5) @(negedge clk);
    rx_en = 0; t_rx_end = cyc;
    @(negedge clk) rx_ppdu_end = 1;
    @(negedge clk) rx_ppdu_end = 0;
  endtask

  task automatic acc(bit we, logic [16:0] a, logic [31:0] d, output logic [31:0] v);
    @(negedge clk) bq = '{valid: 1, we: we, addr: a, wdata: d};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  task automatic wait_idle();
    logic [31:0] v;
    do acc(0, 17'h4, 0, v); while (v[0]);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v; longint d, aifs;
    bq = '0; evt_valid = 0; evt_kind = RX_OTHER; evt_resp = RESP_NONE; rx_ppdu_end = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // 1) AIFSN 2, CW 0: data PPDU AIFS after the build ends (medium idle)
    acc(1, 17'h08, 32'h0000_0002, v);
    aifs = SIFS + 2 * SLOT;
    acc(1, 17'h00, 32'h0000_0101, v);
    wait (t_go.size() == 1);
    d = t_go[0] - t_hg_idle;
    check(d >= aifs && d <= aifs + 4, $sformatf("AIFS: tx after %0d cycles (%0d)", d, aifs));
    wait_idle();
    acc(0, 17'h04, 0, v);
    check(v[1] && !v[2] && intr, "success without response, interrupt");
    acc(1, 17'h04, 8, v); check(!intr, "interrupt cleared");
    // 2) medium busy during AIFS: AIFS counts again from its end
    t_go.delete();
    fork
      acc(1, 17'h00, 32'h0000_0101, v);
      begin
        wait (!hg_busy && queued == 1);
        repeat (500) @(negedge clk);
        cca_busy = 1; repeat (300) @(negedge clk); cca_busy = 0;
      end
    join
    begin
      longint t_idle;
      t_idle = cyc;
      wait (t_go.size() == 1);
      d = t_go[0] - t_idle;
      check(d >= aifs - 4 && d <= aifs + 4, $sformatf("AIFS restarted: tx %0d cycles after busy (%0d)", d, aifs));
    end
    wait_idle();
    // 3) CW 15: whole number of backoff slots, at most 15
    acc(1, 17'h08, 32'h000F_0002, v);
    for (int k = 0; k < 6; k++) begin
      longint slots;
      t_go.delete();
      acc(1, 17'h00, 32'h0000_0101, v);
      wait (t_go.size() == 1);
      d = t_go[0] - t_hg_idle - aifs;
      slots = (d + SLOT / 2) / SLOT;
      check(d >= -4 && slots <= 15 && (d - slots * SLOT) <= 4 && (d - slots * SLOT) >= -4,
            $sformatf("backoff %0d cycles = %0d slots", d, slots));
      wait_idle();
    end
    // 4) RTS, CTS, data: data SIFS after the CTS ends; data expects a response
    //    that never comes -> failure after the timeout, flush, interrupt
    acc(1, 17'h08, 32'h0000_0002, v);
    t_go.delete();
    acc(1, 17'h04, 8, v);
    acc(1, 17'h00, 32'h0000_030B, v);     // 3 MPDUs, aggregate, RTS, expect response
    wait (t_go.size() == 1);               // RTS
    wait (tx_done);
    repeat (200) @(negedge clk);
    rx_ppdu(150, RX_CTS, RESP_NONE);
    wait (t_go.size() == 2);
    d = t_go[1] - t_rx_end;
    check(d >= SIFS - 2 && d <= SIFS + 2, $sformatf("data %0d cycles after CTS (SIFS %0d)", d, SIFS));
    wait (tx_done);
    begin
      longint t0;
      t0 = cyc;
      wait (tx_flush);
      d = cyc - t0;
      check(d >= 50 * CPU && d <= 50 * CPU + 8, $sformatf("response timeout %0d cycles", d));
    end
    wait_idle();
    acc(0, 17'h04, 0, v);
    check(v[2] && !v[1] && intr && queued == 0, "failure, flush, interrupt");
    acc(0, 17'h14, 0, v); check(v == 1, "failure counted");
    // 5) data with ACK received: success; then a TXOP continuation sent SIFS
    //    after the ACK, without contention
    t_go.delete();
    acc(1, 17'h00, 32'h0000_0109, v);
    wait (t_go.size() == 1); wait (tx_done);
    repeat (100) @(negedge clk);
    rx_ppdu(80, RX_ACK, RESP_NONE);
    wait_idle();
    acc(0, 17'h04, 0, v); check(v[1], "ACK received: success");
    acc(1, 17'h00, 32'h0000_0111, v);      // continue the TXOP, 1 MPDU
    wait (t_go.size() == 2);
    d = t_go[1] - t_rx_end;
    check(d >= SIFS - 2 && d <= SIFS + 60, $sformatf("TXOP continuation %0d cycles after the ACK", d));
    check(d < aifs, "continuation does not contend");
    wait_idle();
    // 6) a received data frame asking for an ACK: built and sent SIFS after
    t_go.delete();
    rx_ppdu(300, RX_DATA, RESP_ACK);
    wait (t_go.size() == 1);
    d = t_go[0] - t_rx_end;
    check(d >= SIFS - 2 && d <= SIFS + 2, $sformatf("ACK %0d cycles after the frame (SIFS %0d)", d, SIFS));
    check(ag_kind == RESP_ACK && ag_ra == 48'h0000_AABB_CCDD && ag_dur == 500 && ag_tid == 3,
          "ACK Generation gets the request fields");
    wait (tx_done); repeat (3) @(negedge clk);
    acc(0, 17'h18, 0, v); check(v == 1, "response counted");
    acc(0, 17'h10, 0, v); check(v == 10, $sformatf("successes counted (%0d)", v));
    // 7) continuation queued during a sequence: built during the data PPDU,
    //    sent SIFS after the ACK, both sequences succeed
    begin
      int b0;
      t_go.delete();
      acc(1, 17'h00, 32'h0000_0109, v);
      wait (t_go.size() == 1);
      b0 = built;
      acc(1, 17'h00, 32'h0000_0211, v);    // 2 MPDUs, continue the TXOP
      acc(0, 17'h04, 0, v);
      check(v[0] && v[4], $sformatf("continuation queued (STATUS %h)", v));
      wait (tx_done);
      repeat (100) @(negedge clk);
      check(built == b0 + 1 && queued == 1, "queued PPDU built before the response");
      rx_ppdu(80, RX_ACK, RESP_NONE);
      wait (t_go.size() == 2);
      d = t_go[1] - t_rx_end;
      check(d >= SIFS - 2 && d <= SIFS + 2, $sformatf("queued continuation %0d cycles after the ACK (SIFS %0d)", d, SIFS));
      wait_idle();
      acc(0, 17'h04, 0, v);
      check(v[1] && !v[4] && built == b0 + 1, "both succeed, no second build");
      acc(0, 17'h10, 0, v); check(v == 12, $sformatf("successes counted (%0d)", v));
    end
    // 8) the same, but the ACK never comes: the queued PPDU is flushed
    begin
      int b0;
      t_go.delete();
      acc(1, 17'h00, 32'h0000_0109, v);
      wait (t_go.size() == 1);
      b0 = built;
      acc(1, 17'h00, 32'h0000_0111, v);
      wait (tx_flush);
      wait_idle();
      repeat (2 * SIFS) @(negedge clk);
      acc(0, 17'h04, 0, v);
      check(v[2] && !v[4] && built == b0 + 1 && queued == 0 && t_go.size() == 1,
            "failure: queued PPDU built, flushed and not sent");
      acc(0, 17'h14, 0, v); check(v == 2, "second failure counted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
