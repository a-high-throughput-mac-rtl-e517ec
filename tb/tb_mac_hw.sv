// tb_mac_hw: end-to-end test of two MAC hardware instances, a station (STA)
// and an access point (AP), joined by an ideal PHY channel model, all at the
// default parameters (50 MHz MAC clock, 2 KB Tx Buffer, 8 KB Rx Buffer,
// 64 KB PLCP Transmit FIFO).
//
// The channel model turns one side's TXVECTOR + PSDU into the other side's
// RXVECTOR + PSDU one cycle later and reports the medium busy to the other
// side while a side transmits. It can hold off `phy_tx_confirm` (PHY
// back-pressure) and corrupt chosen PSDU bytes (a delimiter, an MPDU body).
//
// Software is modelled by tasks on the two bus ports: the STA side writes
// descriptors and MSDUs into its Tx Buffer ring as space frees up and starts
// sequences through the Protocol Manager; a drain process on the AP side pops
// received-frame descriptors, checks every byte of every stored frame and
// frees ring space.
//
// Sequences run (frame exchange sequences of the MAC specification):
//   1. management frame + ACK (association request), with PHY back-pressure
//   2. broadcast beacon, no response
//   3. QoS data with HT control + ACK, medium made busy during AIFS
//   4. RTS/CTS, A-MPDU of 42 x 1500-byte MSDUs + BlockAck
//   5. TXOP continuation: A-MPDU of 19 MSDUs + BlockAck (61 MPDUs in all),
//      queued while sequence 4 runs and sent SIFS after BlockAck 1; one
//      delimiter and one MPDU body corrupted on the air
//   6. data to an absent station: response timeout, failure, FIFO flush
//   7. A-MPDU of 8 MSDUs while the AP software is stalled: Rx Buffer overflow
//   8. QoS data with the No Ack policy: delivered, no ACK
//   9. A-MPDU under the Block Ack policy, then BlockAckReq + BlockAck
// The throughput of sequences 4+5 is printed (MSDU bits over elapsed time).
// Every mechanism listed at the end must have occurred at least once. Every
// AP response, and every STA PPDU that follows a received one within 2 SIFS
// (data after CTS, the queued continuation), must start SIFS +- 2 cycles
// after RXENABLE fell.
`timescale 1ns/1ps
module tb_mac_hw;
  import mac_pkg::*;

  localparam int unsigned CLK_PER_US = 50;
  localparam logic [16:0] TXB = 17'h00000, PM = 17'h08000, RXB = 17'h0C000,
                          HC  = 17'h0E000, FCK = 17'h10000, PRX = 17'h12000;
  localparam logic [47:0] STA_ADDR = 48'h01_00_00_00_00_02;   // byte0 = 0x02
  localparam logic [47:0] AP_ADDR  = 48'h02_00_00_00_00_02;
  localparam logic [47:0] BCAST    = 48'hFF_FF_FF_FF_FF_FF;
  localparam logic [47:0] NOBODY   = 48'h7F_00_00_00_00_02;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;            // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- DUTs
  bus_req_t sta_req, ap_req, sta_phy_req, ap_phy_req;
  bus_rsp_t sta_rsp, ap_rsp;
  logic sta_tx_en, ap_tx_en, sta_conf, ap_conf;
  logic [7:0] sta_tx_d, ap_tx_d;
  logic sta_rx_en, sta_rx_ind, ap_rx_en, ap_rx_ind;
  logic [7:0] sta_rx_d, ap_rx_d;
  logic sta_pr_i, sta_pm_i, sta_hc_i, ap_pr_i, ap_pm_i, ap_hc_i;
  logic cca_extra;

  mac_hw u_sta (
    .clk, .rst_n, .bus_req(sta_req), .bus_rsp(sta_rsp),
    .phy_tx_enable(sta_tx_en), .phy_tx_data(sta_tx_d), .phy_tx_confirm(sta_conf),
    .phy_rx_enable(sta_rx_en), .phy_rx_indication(sta_rx_ind), .phy_rx_data(sta_rx_d),
    .phy_cca_busy(ap_tx_en || cca_extra),
    .phy_bus_req(sta_phy_req), .phy_bus_rsp('{ready: sta_phy_req.valid, rdata: 32'h0}),
    .pr_intr(sta_pr_i), .prmgr_intr(sta_pm_i), .hc_intr(sta_hc_i)
  );
  mac_hw u_ap (
    .clk, .rst_n, .bus_req(ap_req), .bus_rsp(ap_rsp),
    .phy_tx_enable(ap_tx_en), .phy_tx_data(ap_tx_d), .phy_tx_confirm(ap_conf),
    .phy_rx_enable(ap_rx_en), .phy_rx_indication(ap_rx_ind), .phy_rx_data(ap_rx_d),
    .phy_cca_busy(sta_tx_en),
    .phy_bus_req(ap_phy_req), .phy_bus_rsp('{ready: ap_phy_req.valid, rdata: 32'h0}),
    .pr_intr(ap_pr_i), .prmgr_intr(ap_pm_i), .hc_intr(ap_hc_i)
  );

  // ---------------------------------------------------------------- channel
  bit   stall_phy = 0;           // PHY back-pressure on the STA transmitter
  int   sta_pos;                 // byte position in the STA's current PPDU
  int   corrupt_a = -1, corrupt_b = -1;   // PSDU offsets to flip, next STA PPDU
  logic sta_en_q, ap_en_q;

  assign sta_conf = sta_tx_en && !(stall_phy && ($urandom_range(0, 3) == 0));
  assign ap_conf  = ap_tx_en;

  always_ff @(posedge clk) begin
    // STA -> AP
    ap_rx_en  <= sta_tx_en;
    ap_rx_ind <= sta_tx_en && sta_conf;
    ap_rx_d   <= sta_tx_d;
    if (sta_tx_en && sta_conf) begin
      if (sta_pos - TXVECTOR_BYTES == corrupt_a || sta_pos - TXVECTOR_BYTES == corrupt_b)
        ap_rx_d <= sta_tx_d ^ 8'h5A;
      sta_pos <= sta_pos + 1;
    end
    sta_en_q <= sta_tx_en;
    if (sta_en_q && !sta_tx_en) begin
      sta_pos <= 0;
      if (corrupt_a >= 0) begin corrupt_a <= -1; corrupt_b <= -1; end
    end
    // AP -> STA
    sta_rx_en  <= ap_tx_en;
    sta_rx_ind <= ap_tx_en && ap_conf;
    sta_rx_d   <= ap_tx_d;
  end

  // ---------------------------------------------------------------- bus masters
  task automatic bus(input bit ap, input bit we, input logic [16:0] addr,
                     input logic [31:0] wdata, output logic [31:0] rdata);
    @(negedge clk);
    if (ap) ap_req  = '{valid: 1'b1, we: we, addr: addr, wdata: wdata};
    else    sta_req = '{valid: 1'b1, we: we, addr: addr, wdata: wdata};
    do @(negedge clk); while (!(ap ? ap_rsp.ready : sta_rsp.ready));
    rdata = ap ? ap_rsp.rdata : sta_rsp.rdata;
    if (ap) ap_req = '0; else sta_req = '0;
  endtask
  task automatic wr(input bit ap, input logic [16:0] addr, input logic [31:0] d);
    logic [31:0] dummy;
    bus(ap, 1'b1, addr, d, dummy);
  endtask
  task automatic rd(input bit ap, input logic [16:0] addr, output logic [31:0] d);
    bus(ap, 1'b0, addr, 32'h0, d);
  endtask

  // ---------------------------------------------------------------- frames
  function automatic logic [7:0] body_byte(int seq, int j);
    return 8'((seq * 7 + j * 13 + 1) & 8'hFF);
  endfunction
  function automatic int hdr_len_of(logic [15:0] fc);
    if (fc[3:2] == 2'b01) return (fc[7:4] == 4'b1100 || fc[7:4] == 4'b1101) ? 10 : 16;
    if (fc[3:2] == 2'b10 && fc[7]) return fc[15] ? 30 : 26;
    return 24;
  endfunction

  int unsigned sta_wptr = 0;     // STA Tx ring write pointer (words)

  // Put one descriptor + body into the STA Tx Buffer ring, waiting for space.
  task automatic put_frame(input logic [15:0] fc, input logic [15:0] dur,
                           input logic [47:0] a1, input int seq, input logic [15:0] qos,
                           input int len);
    logic [31:0] w [8];
    logic [31:0] rptr;
    int words = 8 + (len + 3) / 4;
    int used;
    do begin
      rd(0, TXB + 17'h1004, rptr);
      used = int'(16'(sta_wptr) - rptr[15:0]);
    end while (used + words > 512);
    w[0] = {dur, fc};
    w[1] = a1[31:0];
    w[2] = {STA_ADDR[15:0], a1[47:32]};
    w[3] = STA_ADDR[47:16];
    w[4] = AP_ADDR[31:0];
    w[5] = {12'(seq), 4'h0, AP_ADDR[47:32]};
    w[6] = {16'(len), qos};
    w[7] = 32'h0000_0003;
    for (int i = 0; i < 8; i++) wr(0, TXB + 17'(((sta_wptr + i) % 512) * 4), w[i]);
    for (int k = 0; k < (len + 3) / 4; k++) begin
      logic [31:0] d;
      for (int b = 0; b < 4; b++) d[8*b +: 8] = (4*k + b < len) ? body_byte(seq, 4*k + b) : 8'h00;
      wr(0, TXB + 17'(((sta_wptr + 8 + k) % 512) * 4), d);
    end
    sta_wptr += words;
    wr(0, TXB + 17'h1000, sta_wptr);
  endtask

  task automatic put_rts(input logic [47:0] ra);
    logic [31:0] rptr;
    do rd(0, TXB + 17'h1004, rptr); while (int'(16'(sta_wptr) - rptr[15:0]) + 8 > 512);
    wr(0, TXB + 17'(((sta_wptr + 0) % 512) * 4), {16'd3000, fc_word(FT_CTRL, ST_RTS)});
    wr(0, TXB + 17'(((sta_wptr + 1) % 512) * 4), ra[31:0]);
    wr(0, TXB + 17'(((sta_wptr + 2) % 512) * 4), {STA_ADDR[15:0], ra[47:32]});
    wr(0, TXB + 17'(((sta_wptr + 3) % 512) * 4), STA_ADDR[47:16]);
    for (int i = 4; i < 8; i++) wr(0, TXB + 17'(((sta_wptr + i) % 512) * 4), 32'h0);
    sta_wptr += 8;
    wr(0, TXB + 17'h1000, sta_wptr);
  endtask

  // BlockAckReq (compressed, TID 0) with starting sequence number `ssn`
  task automatic put_bar(input logic [47:0] ra, input logic [11:0] ssn);
    logic [31:0] rptr;
    do rd(0, TXB + 17'h1004, rptr); while (int'(16'(sta_wptr) - rptr[15:0]) + 9 > 512);
    wr(0, TXB + 17'(((sta_wptr + 0) % 512) * 4), {16'd200, fc_word(FT_CTRL, ST_BAR)});
    wr(0, TXB + 17'(((sta_wptr + 1) % 512) * 4), ra[31:0]);
    wr(0, TXB + 17'(((sta_wptr + 2) % 512) * 4), {STA_ADDR[15:0], ra[47:32]});
    wr(0, TXB + 17'(((sta_wptr + 3) % 512) * 4), STA_ADDR[47:16]);
    wr(0, TXB + 17'(((sta_wptr + 4) % 512) * 4), 32'h0);
    wr(0, TXB + 17'(((sta_wptr + 5) % 512) * 4), 32'h0);
    wr(0, TXB + 17'(((sta_wptr + 6) % 512) * 4), {16'd4, 16'h0});
    wr(0, TXB + 17'(((sta_wptr + 7) % 512) * 4), 32'h0);
    wr(0, TXB + 17'(((sta_wptr + 8) % 512) * 4), {ssn, 4'h0, 16'h0004});
    sta_wptr += 9;
    wr(0, TXB + 17'h1000, sta_wptr);
  endtask

  // Start a sequence, then feed its frames; returns the STATUS word at the end.
  localparam logic [15:0] FC_ASSOC  = 16'h0000;                      // mgmt, assoc req
  localparam logic [15:0] FC_BEACON = 16'h0080;                      // mgmt, beacon
  localparam logic [15:0] FC_QOS    = 16'h0188;                      // QoS data, to DS
  localparam logic [15:0] FC_QOSHTC = 16'h8188;                      // QoS data + HTC

  task automatic wait_done(output logic [31:0] st);
    int guard = 0;
    do begin
      rd(0, PM + 17'h4, st);
      guard++;
    end while (st[0] && guard < 400000);
    wr(0, PM + 17'h4, 32'h8);          // clear the interrupt
  endtask

  // ---------------------------------------------------------------- AP software
  bit          drain_on = 1, drain_busy = 0;
  int unsigned ap_rptr = 0;
  int          ap_frames = 0, ap_bytes_bad = 0;
  bit          ap_got [int];
  int          ap_beacons = 0, ap_bars = 0;

  task automatic drain_one(output bit got);
    logic [31:0] dsc, w;
    int len, start, hl, seq;
    logic [7:0] bytes [];
    got = 0;
    rd(1, HC + 17'h10, dsc);
    if (!dsc[31]) return;
    got   = 1;
    len   = int'(dsc[29:16]);
    start = int'(dsc[15:0]);
    bytes = new[len];
    for (int k = 0; k < (len + 3) / 4; k++) begin
      rd(1, RXB + 17'(((start + k) % 2048) * 4), w);
      for (int b = 0; b < 4; b++) if (4*k + b < len) bytes[4*k + b] = w[8*b +: 8];
    end
    hl  = hdr_len_of({bytes[1], bytes[0]});
    seq = int'({bytes[23], bytes[22]} >> 4);
    if ({bytes[1], bytes[0]} == FC_BEACON) ap_beacons++;
    if (bytes[0][3:2] == FT_CTRL) begin
      if (bytes[0][7:4] == ST_BAR) ap_bars++;         // stored BlockAckReq
    end else begin
      int bad = 0;
      for (int j = 0; j < len - hl - 4; j++) if (bytes[hl + j] != body_byte(seq, j)) bad++;
      check(bad == 0, $sformatf("AP frame seq %0d body matches (%0d bad bytes)", seq, bad));
      ap_bytes_bad += bad;
      ap_got[seq] = 1;
    end
    ap_frames++;
    ap_rptr += (len + 3) & ~3;
    wr(1, HC + 17'h8, ap_rptr);
  endtask

  // main reads AP registers only while the drain process is parked
  task automatic ap_rd(input logic [16:0] addr, output logic [31:0] d);
    bit was_on = drain_on;
    drain_on = 0;
    wait (!drain_busy);
    rd(1, addr, d);
    drain_on = was_on;
  endtask

  initial begin : ap_software
    bit got;
    wait (rst_n);
    repeat (5) @(posedge clk);
    wr(1, HC + 17'h0, AP_ADDR[31:0]);
    wr(1, HC + 17'h4, {16'h0, AP_ADDR[47:32]});
    forever begin
      if (drain_on) begin
        drain_busy = 1;
        drain_one(got);
        drain_busy = 0;
        if (!got) @(negedge clk);
      end else @(negedge clk);
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  longint air_ns = 0;
  always @(posedge clk) if (sta_tx_en) air_ns += 20;

  int n_ring_stall, n_backoff, n_aifs_restart, n_pad, n_phy_stall, n_ack, n_cts, n_ba,
      n_rts, n_txop, n_flush, n_ampdu_rx, n_bar, n_noack;
  always_ff @(posedge clk) if (rst_n) begin
    if (u_sta.u_header_gen.busy && (u_sta.tb_rd_ptr == u_sta.tb_wr_ptr)) n_ring_stall++;
    if (u_sta.u_protocol_manager.ts == 4'd4 &&
        u_sta.u_protocol_manager.timer == 32'(9 * CLK_PER_US)) n_backoff++;
    if (u_sta.u_protocol_manager.ts == 4'd3 && cca_extra) n_aifs_restart++;
    if (u_sta.u_plcp_tx.pad_left != 0) n_pad++;
    if (sta_tx_en && !sta_conf) n_phy_stall++;
    if (u_ap.ag_gen && u_ap.ag_kind == RESP_ACK) n_ack++;
    if (u_ap.ag_gen && u_ap.ag_kind == RESP_CTS) n_cts++;
    if (u_ap.ag_gen && u_ap.ag_kind == RESP_BA)  n_ba++;
    if (u_ap.evt_valid && u_ap.evt_kind == RX_RTS) n_rts++;
    if (u_sta.u_protocol_manager.ts == 4'd12 && u_sta.u_protocol_manager.cmd[4] &&
        !u_sta.hg_busy && !u_sta.hg_start) n_txop++;
    if (u_sta.tx_flush) n_flush++;
    if (u_ap.pr_ppdu_end && u_ap.rx_agg) n_ampdu_rx++;
    if (u_ap.evt_valid && u_ap.evt_kind == RX_BAR) n_bar++;
    if (u_ap.evt_valid && u_ap.evt_kind == RX_DATA && u_ap.evt_resp == RESP_NONE &&
        u_ap.u_header_check.qosc[6:5] == 2'b01) n_noack++;
  end

  // ---------------------------------------------------------------- SIFS timing
  // Every AP response must start SIFS after the AP's RXENABLE fell; the STA's
  // data after a CTS and its TXOP continuation after a BlockAck likewise.
  localparam int SIFS_CYC = SIFS_US * CLK_PER_US;
  longint cyc = 0, ap_rx_end = 0, sta_rx_end = 0;
  logic ap_tx_q = 0, sta_tx_q = 0, ap_rx_q = 0, sta_rx_q = 0;
  int n_ap_sifs = 0, n_ap_sifs_bad = 0, n_sta_sifs = 0, n_sta_sifs_bad = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    ap_tx_q <= ap_tx_en; sta_tx_q <= sta_tx_en; ap_rx_q <= ap_rx_en; sta_rx_q <= sta_rx_en;
    if (ap_rx_q && !ap_rx_en) ap_rx_end <= cyc;
    if (sta_rx_q && !sta_rx_en) sta_rx_end <= cyc;
    if (rst_n && !ap_tx_q && ap_tx_en) begin
      n_ap_sifs <= n_ap_sifs + 1;
      if (cyc - ap_rx_end < SIFS_CYC - 2 || cyc - ap_rx_end > SIFS_CYC + 2) begin
        n_ap_sifs_bad <= n_ap_sifs_bad + 1;
        $display("AP response %0d cycles after the frame (SIFS %0d)", cyc - ap_rx_end, SIFS_CYC);
      end
    end
    // STA transmissions that follow a received PPDU closely (CTS, BlockAck)
    if (rst_n && !sta_tx_q && sta_tx_en && cyc - sta_rx_end < 2 * SIFS_CYC) begin
      n_sta_sifs <= n_sta_sifs + 1;
      if (cyc - sta_rx_end < SIFS_CYC - 2 || cyc - sta_rx_end > SIFS_CYC + 2) begin
        n_sta_sifs_bad <= n_sta_sifs_bad + 1;
        $display("STA PPDU %0d cycles after the received one (SIFS %0d)", cyc - sta_rx_end, SIFS_CYC);
      end
    end
  end

  // ---------------------------------------------------------------- BlockAck readback
  int unsigned sta_rptr = 0;
  task automatic read_sta_ba(output logic [11:0] ssn, output logic [63:0] bm, output bit ok);
    logic [31:0] dsc, w [9];
    rd(0, HC + 17'h10, dsc);
    ok = dsc[31] && (dsc[29:16] == 14'd36);
    for (int k = 0; k < 9; k++) rd(0, RXB + 17'(((int'(dsc[15:0]) + k) % 2048) * 4), w[k]);
    ssn = w[4][31:20];
    bm  = {w[6], w[5]};
    ok  = ok && (w[0][15:0] == fc_word(FT_CTRL, ST_BA)) && (w[1] == STA_ADDR[31:0]);
    sta_rptr += 36;
    wr(0, HC + 17'h8, sta_rptr);
  endtask

  // ---------------------------------------------------------------- main
  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] st, v;
    logic [11:0] ssn;
    logic [63:0] bm;
    bit ok;
    longint t0, t1, t1_air;
    sta_req = '0; ap_req = '0; cca_extra = 0; sta_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(0, HC + 17'h0, STA_ADDR[31:0]);
    wr(0, HC + 17'h4, {16'h0, STA_ADDR[47:32]});
    wr(0, PM + 17'h8, 32'h0007_0002);        // AIFSN 2, CW 7
    rd(0, PM + 17'h8, v);
    check(v == 32'h0007_0002, "EDCA register reads back");
    rd(0, 17'h1E000, v);                     // unmapped window answers 0
    check(v == 0, "unmapped bus window reads 0");

    // 1. association request + ACK, PHY back-pressure
    stall_phy = 1;
    wr(0, PM, {16'h0, 8'd1, 8'b0000_1001});
    put_frame(FC_ASSOC, 16'd60, AP_ADDR, 2000, 16'h0, 40);
    wait_done(st);
    stall_phy = 0;
    check(st[1] && !st[2], "assoc request acknowledged");

    // 2. beacon to broadcast, no response expected
    wr(0, PM, {16'h0, 8'd1, 8'b0000_0001});
    put_frame(FC_BEACON, 16'd0, BCAST, 2001, 16'h0, 60);
    wait_done(st);
    check(st[1], "beacon sent");

    // 3. QoS data + HT control + ACK, medium busy during AIFS
    wr(0, PM, {16'h0, 8'd1, 8'b0000_1001});
    put_frame(FC_QOSHTC, 16'd60, AP_ADDR, 2002, 16'h0000, 100);
    wait (u_sta.u_protocol_manager.ts == 4'd3);
    repeat (100) @(posedge clk);
    cca_extra = 1;
    repeat (200) @(posedge clk);
    cca_extra = 0;
    wait_done(st);
    check(st[1] && !st[2], "QoS data + HTC acknowledged");

    // 4. RTS/CTS + A-MPDU of 42 + BlockAck
    wr(0, PM, {16'h0, 8'd42, 8'b0000_1111});
    fork
      begin
        wait (sta_tx_en);
        t0 = $time;
        air_ns = 0;
      end
      begin                             // RTS, A-MPDU 1, then arm for A-MPDU 2
        repeat (2) @(negedge sta_tx_en);
        repeat (5) @(posedge clk);
        corrupt_a = 5 * 1536 + 3;
        corrupt_b = 10 * 1536 + 4 + 26 + 100;
      end
    join_none
    put_rts(AP_ADDR);
    for (int i = 0; i < 42; i++) put_frame(FC_QOS, 16'd3000, AP_ADDR, i, 16'h0000, 1500);

    // 5. TXOP continuation: A-MPDU of 19, queued while sequence 4 runs so that
    //    it is built during A-MPDU 1 and sent SIFS after BlockAck 1. The
    //    delimiter of subframe 5 and the body of subframe 10 are corrupted
    //    (subframes are 1536 bytes: 4 + 26 + 1500 + 4 + 2 pad; armed above)
    wr(0, PM, {16'h0, 8'd19, 8'b0001_1101});
    rd(0, PM + 17'h4, st);
    check(st[0] && st[4], $sformatf("continuation queued while sequence 4 runs (STATUS %h)", st));
    for (int i = 42; i < 61; i++) put_frame(FC_QOS, 16'd3000, AP_ADDR, i, 16'h0000, 1500);
    wait_done(st);
    t1 = $time;
    t1_air = air_ns;
    check(st[1] && !st[2], "A-MPDUs 1 (42 MPDUs) and 2 (19 MPDUs) BlockAcked");
    read_sta_ba(ssn, bm, ok);
    check(ok, "STA stored the BlockAck");
    check(ssn == 12'd0 && bm == {22'h0, 42'h3FF_FFFF_FFFF}, $sformatf("BlockAck 1 ssn=%0d bitmap=%h", ssn, bm));
    read_sta_ba(ssn, bm, ok);
    check(ok, "STA stored BlockAck 2");
    begin
      logic [63:0] exp_bm = 64'h1FFF_FFFF_FFFF_FFFF & ~(64'h1 << 47) & ~(64'h1 << 52);
      check(ssn == 12'd0 && bm == exp_bm, $sformatf("BlockAck 2 ssn=%0d bitmap=%h exp %h", ssn, bm, exp_bm));
    end
    $display("A-MPDU burst: 61 MPDUs sent (59 delivered) in %0d ns: %0d Mb/s of MSDU payload",
             t1 - t0, longint'(59) * 1500 * 8 * 1000 / (t1 - t0));
    $display("  STA transmitter busy for %0d ns of it (8-bit PHY interface at 50 MHz)", t1_air);
    ap_rd(FCK + 17'h4, v);
    check(v == 1, $sformatf("AP counted one FCS error (%0d)", v));
    ap_rd(PRX + 17'h4, v);
    check(v >= 1, $sformatf("AP counted bad delimiters (%0d)", v));

    // 6. data to an absent station: timeout, failure, flush
    wr(0, PM, {16'h0, 8'd2, 8'b0000_1101});
    put_frame(FC_QOS, 16'd100, NOBODY, 100, 16'h0, 200);
    put_frame(FC_QOS, 16'd100, NOBODY, 101, 16'h0, 200);
    wait_done(st);
    check(!st[1] && st[2], "sequence to absent station fails");
    rd(0, 17'h06004, v);
    check(v == 0, "PLCP Transmit FIFO flushed");

    // 7. AP software stalled: Rx Buffer overflow
    wait (u_ap.u_header_check.wr_base == ap_rptr && u_ap.u_header_check.dq_wp == u_ap.u_header_check.dq_rp);
    drain_on = 0;
    wait (!drain_busy);
    wr(0, PM, {16'h0, 8'd8, 8'b0000_1101});
    for (int i = 61; i < 69; i++) put_frame(FC_QOS, 16'd3000, AP_ADDR, i, 16'h0000, 1500);
    wait_done(st);
    rd(0, HC + 17'h10, v);               // drop the BlockAck descriptor
    sta_rptr += 36;
    wr(0, HC + 17'h8, sta_rptr);
    drain_on = 1;
    repeat (20000) @(posedge clk);
    begin
      int got = 0;
      for (int s = 61; s < 69; s++) if (ap_got.exists(s)) got++;
      check(got == 5, $sformatf("5 of 8 MPDUs fit the stalled Rx Buffer (%0d)", got));
    end
    // ap_software shares the AP bus: read the counter after it went idle
    ap_rd(HC + 17'h18, v);
    check(v == 3, $sformatf("3 frames dropped for overflow (%0d)", v));

    // 8. QoS data with the No Ack policy: delivered, not answered
    begin
      int acks0;
      acks0 = n_ack;
      wr(0, PM, {16'h0, 8'd1, 8'b0000_0001});
      put_frame(FC_QOS, 16'd0, AP_ADDR, 2003, 16'h0020, 80);
      wait_done(st);
      check(st[1], "No Ack data sent");
      repeat (2000) @(posedge clk);
      check(n_ack == acks0, "No Ack data not acknowledged");
      check(ap_got.exists(2003), "No Ack data delivered");
    end

    // 9. A-MPDU under the Block Ack policy (no implicit response), then
    //    BlockAckReq and BlockAck
    wr(0, PM, {16'h0, 8'd4, 8'b0000_0101});
    for (int i = 69; i < 73; i++) put_frame(FC_QOS, 16'd0, AP_ADDR, i, 16'h0060, 300);
    wait_done(st);
    check(st[1] && !st[2], "Block Ack policy A-MPDU sent without a response");
    repeat (2000) @(posedge clk);
    wr(0, PM, {16'h0, 8'd1, 8'b0000_1001});
    put_bar(AP_ADDR, 12'd69);
    wait_done(st);
    check(st[1] && !st[2], "BlockAckReq answered");
    read_sta_ba(ssn, bm, ok);
    check(ok, "STA stored the BlockAck to the BlockAckReq");
    check(ssn == 12'd69 && bm == 64'hF, $sformatf("BlockAck to BAR ssn=%0d bitmap=%h", ssn, bm));
    repeat (5000) @(posedge clk);
    check(ap_bars == 1, "AP stored the BlockAckReq");

    // delivery summary
    begin
      int got = 0;
      for (int s = 0; s < 61; s++) if (ap_got.exists(s)) got++;
      check(got == 59, $sformatf("59 of 61 burst MPDUs delivered (%0d)", got));
      check(!ap_got.exists(47) && !ap_got.exists(52), "corrupted MPDUs not delivered");
      check(ap_got.exists(2000) && ap_got.exists(2001) && ap_got.exists(2002), "single frames delivered");
      check(ap_beacons == 1, "one beacon delivered");
      check(ap_bytes_bad == 0, "no payload byte differs");
    end

    $display("mechanisms: ring_stall=%0d backoff_slots=%0d aifs_restart=%0d pad=%0d phy_stall=%0d",
             n_ring_stall, n_backoff, n_aifs_restart, n_pad, n_phy_stall);
    $display("            ack=%0d cts=%0d ba=%0d rts=%0d txop_cont=%0d flush=%0d ampdu_rx=%0d bar=%0d noack=%0d",
             n_ack, n_cts, n_ba, n_rts, n_txop, n_flush, n_ampdu_rx, n_bar, n_noack);
    check(n_ring_stall > 0,   "Tx ring stall happened");
    check(n_backoff > 0,      "backoff happened");
    check(n_aifs_restart > 0, "AIFS restart happened");
    check(n_pad > 0,          "A-MPDU padding happened");
    check(n_phy_stall > 0,    "PHY back-pressure happened");
    check(n_ack == 2,         "two ACKs generated");
    check(n_cts == 1,         "one CTS generated");
    check(n_ba == 4,          "four BlockAcks generated");
    check(n_rts == 1,         "one RTS received");
    check(n_txop > 0,         "TXOP continuation happened");
    check(n_flush == 1,       "one flush happened");
    check(n_ampdu_rx == 5,    "five A-MPDUs received (incl. the unanswered one)");
    check(n_bar == 1,         "one BlockAckReq received");
    check(n_noack == 1,       "one No Ack data frame received");
    $display("SIFS: %0d AP responses, %0d STA PPDUs after a CTS or BlockAck", n_ap_sifs, n_sta_sifs);
    check(n_ap_sifs == 7 && n_ap_sifs_bad == 0, "every AP response starts SIFS after the frame");
    check(n_sta_sifs == 2 && n_sta_sifs_bad == 0, "data after CTS and TXOP continuation start SIFS after it");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
