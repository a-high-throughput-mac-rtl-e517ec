// protocol_manager: Protocol Manager block of the MAC hardware.
//
// Runs the time-critical part of the IEEE 802.11n/11e frame exchanges, so
// that software only queues frames and collects results.
//
// Transmit sequence, started by software writing CMD:
//   1. Header Generation builds the optional RTS (one descriptor) and then the
//      data PPDU (`count` descriptors, as an A-MPDU when `aggregate` is set)
//      into the PLCP Transmit FIFO. Channel access starts once the data PPDU
//      is complete, so that it can follow a CTS within SIFS.
//   2. Channel access (EDCA): the medium must be idle for AIFS = SIFS +
//      AIFSN x slot, then for a random backoff of 0..CW slots drawn from an
//      LFSR; a busy medium restarts AIFS and freezes the remaining backoff.
//      A command that continues a TXOP already won skips this: its PPDU
//      goes SIFS after the last received one (the BlockAck), or as soon as
//      it is ready if that is later.
//   3. The head PPDU is sent (`tx_go`). After an RTS the CTS is awaited and
//      the data PPDU is sent SIFS after the CTS ends. After the data PPDU a
//      BlockAck or ACK is awaited when `expect_resp` is set.
//   4. A response that does not start within RESP_TIMEOUT_US, or a received
//      PPDU that does not hold it, ends the sequence as failed, builds and
//      drops a queued command and flushes what is left in the PLCP Transmit
//      FIFO. Success or failure is shown in STATUS and raises the Protocol
//      Manager interrupt.
// Queued continuation: software may write the next CMD, with the continue
// bit set, while a sequence runs. It is queued (STATUS bit 4, room for one)
// and its PPDU is built into the PLCP Transmit FIFO as soon as the running
// data PPDU is being sent, so that it is ready SIFS after the BlockAck. The
// RTS bit of a queued command is ignored. After a success the queued command
// follows directly. Any other CMD write during a sequence is ignored.
// Responses: when Header Check reports a frame that asks for an ACK, CTS or
// BlockAck and no own sequence is under way, ACK Generation builds the
// response as soon as the received PPDU has ended, and it is sent SIFS after
// that end.
//
// All times are counted in MAC clock cycles, CLK_PER_US per microsecond
// (50 MHz MAC clock). SIFS is 16 us; the 9 us slot and the response timeout
// are this design's choices. How many MPDUs fit in the TXOP limit,
// fragmentation, NAV and retries are left to software.
//
// Bus registers:
//   0x00 CMD   (w) bit0 start, bit1 RTS first, bit2 aggregate, bit3 expect
//              response, bit4 continue the TXOP (no contention: send SIFS
//              after the last received PPDU), [15:8] number of MPDUs
//   0x04 STATUS bit0 busy, bit1 last sequence succeeded, bit2 last failed,
//              bit3 interrupt (write 1 to clear), bit4 continuation queued
//   0x08 EDCA  [3:0] AIFSN, [25:16] CW (2^n-1)
//   0x0C MCS   [6:0], copied into the TXVECTOR
//   0x10 sequences succeeded   0x14 sequences failed   0x18 responses sent
//   0x1C cycles from the first tx_go to the end of the last sequence
module protocol_manager
  import mac_pkg::*;
#(
  parameter int unsigned CLK_PER_US      = 50,
  parameter int unsigned RESP_TIMEOUT_US = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  // medium
  input  logic        cca_busy,
  input  logic        phy_rx_enable,
  // Header Generation
  output logic        hg_start,
  output logic [7:0]  hg_count,
  output logic        hg_aggregate,
  input  logic        hg_busy,
  // PLCP Transmit
  output logic        tx_go,
  output logic        tx_flush,
  output logic [6:0]  mcs,
  input  logic        ppdu_ready,
  input  logic        tx_busy,
  input  logic        tx_done,
  input  logic        txq_empty,
  // PLCP Receive / Header Check
  input  logic        rx_ppdu_end,
  input  logic        evt_valid,
  input  rxkind_e     evt_kind,
  input  resp_e       evt_resp,
  input  logic [47:0] evt_ta,
  input  logic [15:0] evt_dur,
  input  logic [3:0]  evt_tid,
  // ACK Generation
  output logic        ag_gen,
  output resp_e       ag_kind,
  output logic [47:0] ag_ra,
  output logic [15:0] ag_dur,
  output logic [3:0]  ag_tid,
  input  logic        ag_busy,
  // software
  output logic        intr,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp
);
  localparam int unsigned SIFS_CYC    = SIFS_US * CLK_PER_US;
  localparam int unsigned SLOT_CYC    = SLOT_US * CLK_PER_US;
  localparam int unsigned TIMEOUT_CYC = RESP_TIMEOUT_US * CLK_PER_US;
  localparam int unsigned SETTLE_CYC  = 4;   // Header Check lags the PPDU end

  typedef enum logic [3:0] {
    T_IDLE, T_PREP_RTS, T_PREP_DATA, T_AIFS, T_BACKOFF, T_GO, T_TX,
    T_WAIT_RESP, T_RX_RESP, T_SETTLE, T_SIFS, T_DONE, T_PREP_WAIT
  } tstate_e;
  typedef enum logic [1:0] { R_IDLE, R_PEND, R_GEN, R_TX } rstate_e;

  tstate_e     ts;
  rstate_e     rs;
  logic [31:0] cmd;
  logic [31:0] edca;
  logic        phase_rts;      // the PPDU in flight is the RTS
  logic        got_resp;
  logic        ok_flag, fail_flag;
  logic [31:0] timer;
  logic [9:0]  bo_slots;
  logic [15:0] lfsr;
  logic [31:0] since_rx_end;
  logic [31:0] ok_cnt, fail_cnt, resp_cnt, seq_cycles;
  logic        timing;
  logic [31:0] nxt;            // queued continuation command
  logic        nxt_valid, nxt_built;

  wire busy_medium = cca_busy || phy_rx_enable;
  wire [3:0] aifsn = edca[3:0];
  wire [9:0] cw    = edca[25:16];
  wire [31:0] aifs_cyc = SIFS_CYC + 32'(aifsn) * SLOT_CYC;

  wire resp_hit = evt_valid &&
                  (phase_rts ? (evt_kind == RX_CTS) : (evt_kind == RX_BA || evt_kind == RX_ACK));

  wire bus_wr = bus_req.valid && bus_req.we && !bus_rsp.ready;
  wire cmd_wr = bus_wr && (bus_req.addr[4:2] == 3'd0);
  wire start_req = cmd_wr && bus_req.wdata[0];
  // a continuation command written while a sequence runs is queued
  wire queue_req = start_req && ts != T_IDLE && bus_req.wdata[4] &&
                   bus_req.wdata[15:8] != 0 && !nxt_valid;
  // its PPDU is built once the data PPDU of the running sequence is on its way
  wire prefetch  = nxt_valid && !nxt_built && !phase_rts && !hg_busy && !hg_start &&
                   (ts == T_TX || ts == T_WAIT_RESP || ts == T_RX_RESP || ts == T_SETTLE ||
                    (ts == T_DONE && fail_flag));

  // ---- time since the last received PPDU ended (0 while receiving)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   since_rx_end <= 32'hFFFF;
    else if (phy_rx_enable)       since_rx_end <= '0;
    else if (since_rx_end != '1)  since_rx_end <= since_rx_end + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  // ---- transmit sequence
  logic tx_go_t, tx_go_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; cmd <= '0; phase_rts <= 1'b0; got_resp <= 1'b0;
      ok_flag <= 1'b0; fail_flag <= 1'b0; timer <= '0; bo_slots <= '0;
      hg_start <= 1'b0; hg_count <= '0; hg_aggregate <= 1'b0;
      tx_go_t <= 1'b0; tx_flush <= 1'b0; ok_cnt <= '0; fail_cnt <= '0;
      seq_cycles <= '0; timing <= 1'b0; nxt <= '0; nxt_valid <= 1'b0; nxt_built <= 1'b0;
    end else begin
      hg_start <= 1'b0;
      tx_go_t  <= 1'b0;
      tx_flush <= 1'b0;
      if (cmd_wr && ts == T_IDLE) cmd <= bus_req.wdata;
      if (queue_req) begin
        nxt       <= bus_req.wdata;
        nxt_valid <= 1'b1;
        nxt_built <= 1'b0;
      end
      if (prefetch) begin
        hg_start     <= 1'b1;
        hg_count     <= nxt[15:8];
        hg_aggregate <= nxt[2];
        nxt_built    <= 1'b1;
      end
      if (timing) seq_cycles <= seq_cycles + 1'b1;
      unique case (ts)
        T_IDLE: if (start_req && bus_req.wdata[15:8] != 0) begin
          ok_flag   <= 1'b0;
          fail_flag <= 1'b0;
          ts        <= T_PREP_RTS;
        end
        T_PREP_RTS: if (rs == R_IDLE && !hg_busy) begin
          if (cmd[1]) begin
            hg_start     <= 1'b1;
            hg_count     <= 8'd1;
            hg_aggregate <= 1'b0;
          end
          phase_rts <= cmd[1];
          ts        <= T_PREP_DATA;
        end
        T_PREP_DATA: if (!hg_busy && !hg_start) begin
          hg_start     <= 1'b1;
          hg_count     <= cmd[15:8];
          hg_aggregate <= cmd[2];
          timer        <= aifs_cyc;
          bo_slots     <= lfsr[9:0] & cw;
          ts           <= T_PREP_WAIT;
        end
        T_PREP_WAIT: if (!hg_busy && !hg_start) ts <= cmd[4] ? T_SIFS : T_AIFS;
        T_AIFS: begin
          if (busy_medium)       timer <= aifs_cyc;
          else if (timer != 0)   timer <= timer - 1'b1;
          else begin
            timer <= SLOT_CYC;
            ts    <= (bo_slots == 0) ? T_GO : T_BACKOFF;
          end
        end
        T_BACKOFF: begin
          if (busy_medium) begin
            timer <= aifs_cyc;
            ts    <= T_AIFS;
          end else if (timer > 1) timer <= timer - 1'b1;
          else begin
            timer    <= SLOT_CYC;
            bo_slots <= bo_slots - 1'b1;
            if (bo_slots == 10'd1) ts <= T_GO;
          end
        end
        T_GO: if (ppdu_ready && !tx_busy && !tx_go_t) begin
          tx_go_t <= 1'b1;
          timing  <= 1'b1;
          if (!timing) seq_cycles <= '0;
          ts      <= T_TX;
        end
        T_TX: if (tx_done) begin
          got_resp <= 1'b0;
          timer    <= TIMEOUT_CYC;
          if (phase_rts || cmd[3]) ts <= T_WAIT_RESP;
          else begin
            ok_flag <= 1'b1;
            ts      <= T_DONE;
          end
        end
        T_WAIT_RESP: begin
          if (phy_rx_enable)   ts <= T_RX_RESP;
          else if (timer != 0) timer <= timer - 1'b1;
          else begin
            fail_flag <= 1'b1;
            ts        <= T_DONE;
          end
        end
        T_RX_RESP, T_SETTLE: begin
          if (resp_hit) got_resp <= 1'b1;
          if (ts == T_RX_RESP && rx_ppdu_end) ts <= T_SETTLE;
          if (ts == T_SETTLE && since_rx_end >= SETTLE_CYC) begin
            if (!got_resp && !resp_hit) begin
              fail_flag <= 1'b1;
              ts        <= T_DONE;
            end else if (phase_rts) begin
              phase_rts <= 1'b0;
              ts        <= T_SIFS;
            end else begin
              ok_flag <= 1'b1;
              ts      <= T_DONE;
            end
          end
        end
        T_SIFS: if (since_rx_end >= SIFS_CYC - 1) ts <= T_GO;
        T_DONE: if (!(fail_flag && (hg_busy || hg_start || (nxt_valid && !nxt_built)))) begin
          // after a failure the queued PPDU is still built, so that its
          // descriptors leave the Tx ring, and then flushed with the rest
          if (fail_flag) begin
            fail_cnt  <= fail_cnt + 1'b1;
            tx_flush  <= 1'b1;
            nxt_valid <= 1'b0;                  // the queued command is dropped
            timing    <= 1'b0;
            ts        <= T_IDLE;
          end else begin
            ok_cnt <= ok_cnt + 1'b1;
            if (nxt_valid && !queue_req) begin  // chain the queued continuation
              cmd       <= nxt;
              nxt_valid <= 1'b0;
              ok_flag   <= 1'b0;
              phase_rts <= 1'b0;
              timer     <= aifs_cyc;
              bo_slots  <= lfsr[9:0] & cw;
              ts        <= nxt_built ? T_PREP_WAIT : T_PREP_DATA;
            end else begin
              timing <= 1'b0;
              ts     <= T_IDLE;
            end
          end
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

  // ---- responses (ACK / CTS / BlockAck)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; ag_gen <= 1'b0; ag_kind <= RESP_NONE; ag_ra <= '0;
      ag_dur <= '0; ag_tid <= '0; tx_go_r <= 1'b0; resp_cnt <= '0;
    end else begin
      ag_gen  <= 1'b0;
      tx_go_r <= 1'b0;
      unique case (rs)
        R_IDLE: if (evt_valid && evt_resp != RESP_NONE && ts == T_IDLE &&
                    txq_empty && !hg_busy && !tx_busy) begin
          ag_kind <= evt_resp;
          ag_ra   <= evt_ta;
          ag_dur  <= evt_dur;
          ag_tid  <= evt_tid;
          rs      <= R_PEND;
        end
        R_PEND: begin
          if (evt_valid && evt_resp != RESP_NONE) begin
            // a later MPDU of the same PPDU; BlockAck wins over ACK
            if (evt_resp == RESP_BA || ag_kind != RESP_BA) ag_kind <= evt_resp;
            ag_ra  <= evt_ta;
            ag_dur <= evt_dur;
            ag_tid <= evt_tid;
          end
          if (!phy_rx_enable && since_rx_end >= SETTLE_CYC && !evt_valid) begin
            ag_gen <= 1'b1;
            rs     <= R_GEN;
          end
        end
        R_GEN: if (!ag_gen && !ag_busy && ppdu_ready && !tx_busy &&
                   since_rx_end >= SIFS_CYC - 1) begin
          tx_go_r <= 1'b1;
          rs      <= R_TX;
        end
        R_TX: if (tx_done) begin
          resp_cnt <= resp_cnt + 1'b1;
          rs       <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end
  assign tx_go = tx_go_t || tx_go_r;

  // ---- registers and interrupt
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edca <= 32'h000F_0003; mcs <= 7'd31; intr <= 1'b0; bus_rsp <= '0;
    end else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      if (ts == T_DONE) intr <= 1'b1;
      else if (bus_wr && bus_req.addr[4:2] == 3'd1 && bus_req.wdata[3]) intr <= 1'b0;
      if (bus_wr && bus_req.addr[4:2] == 3'd2) edca <= bus_req.wdata;
      if (bus_wr && bus_req.addr[4:2] == 3'd3) mcs  <= bus_req.wdata[6:0];
      unique case (bus_req.addr[4:2])
        3'd0: bus_rsp.rdata <= cmd;
        3'd1: bus_rsp.rdata <= {27'h0, nxt_valid, intr, fail_flag, ok_flag, ts != T_IDLE};
        3'd2: bus_rsp.rdata <= edca;
        3'd3: bus_rsp.rdata <= {25'h0, mcs};
        3'd4: bus_rsp.rdata <= ok_cnt;
        3'd5: bus_rsp.rdata <= fail_cnt;
        3'd6: bus_rsp.rdata <= resp_cnt;
        default: bus_rsp.rdata <= seq_cycles;
      endcase
    end
  end
endmodule
