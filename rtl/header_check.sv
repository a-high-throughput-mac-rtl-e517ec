// header_check: Header Check block of the MAC hardware.
//
// Receives the MPDUs that passed through FCS Check, captures and decodes the
// MAC header (frame control, duration, address 1/2, sequence control, QoS
// control), and at the last byte, when the FCS is good and address 1 is this
// station or a group address:
//   * reports the frame to the Protocol Manager (`evt_*`), with the response
//     it asks for: CTS to an RTS, BlockAck to a BlockAckReq or to QoS data
//     with normal-ack policy inside an A-MPDU (implicit request), ACK to other
//     unicast data and management frames;
//   * keeps the BlockAck scoreboard of the QoS data MPDUs received inside
//     A-MPDUs: a 64-entry bitmap starting at `ba_ssn`, moved forward by
//     newer sequence numbers and by BlockAckReq; a QoS
//     data frame dropped for lack of buffer space is not marked received;
//   * commits data, management, BlockAckReq and BlockAck frames to the Rx
//     Buffer ring and raises the Header Check interrupt, so that software can
//     move the MSDU to the host. RTS, CTS and ACK are not stored.
// Every byte is written into the ring as it arrives, at the ring write
// pointer plus its offset; a frame that is bad, not for this station, not to
// be stored, or that does not fit (overflow) is dropped simply by not moving
// the write pointer. Committed frames start on a 4-byte boundary.
// One BlockAck agreement (a single scoreboard) is kept.
//
// Bus registers:
//   0x00 own address [31:0] (r/w)      0x04 own address [47:32] (r/w)
//   0x08 ring read pointer, bytes (r/w, software frees space)
//   0x0C ring write pointer, bytes (r/o)
//   0x10 frame descriptor, popped on read: bit31 valid, [29:16] length in
//        bytes (FCS included), [15:0] start word in the Rx Buffer
//   0x14 interrupt, bit0, write 1 to clear   0x18 frames dropped for overflow
module header_check
  import mac_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 2048,   // Rx Buffer size
  parameter int unsigned DQ        = 16      // frame descriptor queue depth
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  rxbyte_t     in,
  input  logic        fcs_ok,
  input  logic        in_abort,
  input  logic        rx_agg,
  // Rx Buffer write port
  output logic        buf_wr_en,
  output logic [$clog2(BUF_WORDS)+1:0] buf_wr_addr,
  output logic [7:0]  buf_wr_data,
  // to the Protocol Manager / ACK Generation
  output logic        evt_valid,
  output rxkind_e     evt_kind,
  output resp_e       evt_resp,
  output logic [47:0] evt_ta,
  output logic [15:0] evt_dur,
  output logic [3:0]  evt_tid,
  output logic [11:0] ba_ssn,
  output logic [63:0] ba_bitmap,
  output logic [47:0] own_addr,
  output logic        intr,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp
);
  localparam int unsigned BAW  = $clog2(BUF_WORDS) + 2;   // ring byte address bits
  localparam int unsigned SIZE = BUF_WORDS * 4;
  localparam int unsigned DAW  = $clog2(DQ);

  logic [239:0] hdr;
  logic [15:0]  pos;            // byte offset inside the frame
  logic         ovf;            // frame did not fit
  logic [31:0]  wr_base, rd_ptr;
  logic [31:0]  dq [DQ];
  logic [DAW:0] dq_wp, dq_rp;
  logic [31:0]  ovf_cnt;
  logic         store_q;
  logic [DAW:0] dq_wp_q;

  // ---- decode of the captured header; the last byte never lies in a field used
  logic [15:0] fc, dur, sc, qosc, barc, bar_ssc;
  logic [47:0] a1, a2;
  logic [1:0]  ftype;
  logic [3:0]  subtype;
  logic        for_me, group, is_qos;
  rxkind_e     kind;
  resp_e       resp;
  logic        store;

  always_comb begin
    fc      = hdr[15:0];
    dur     = hdr[31:16];
    a1      = hdr[79:32];
    a2      = hdr[127:80];
    barc    = hdr[143:128];
    bar_ssc = hdr[159:144];
    sc      = hdr[191:176];
    qosc    = hdr[207:192];
    ftype   = fc[3:2];
    subtype = fc[7:4];
    group   = a1[0];
    for_me  = group || (a1 == own_addr);
    is_qos  = (ftype == FT_DATA) && subtype[3];
    kind    = RX_OTHER;
    resp    = RESP_NONE;
    store   = 1'b0;
    unique case (ftype)
      FT_CTRL: begin
        unique case (subtype)
          ST_RTS: begin kind = RX_RTS; resp = group ? RESP_NONE : RESP_CTS; end
          ST_CTS: kind = RX_CTS;
          ST_ACK: kind = RX_ACK;
          ST_BA:  begin kind = RX_BA; store = 1'b1; end
          ST_BAR: begin kind = RX_BAR; store = 1'b1; resp = group ? RESP_NONE : RESP_BA; end
          default: ;
        endcase
      end
      FT_DATA: begin
        kind  = RX_DATA;
        store = 1'b1;
        if (!group) begin
          if (!is_qos)                 resp = RESP_ACK;
          else if (qosc[6:5] == 2'b00) resp = rx_agg ? RESP_BA : RESP_ACK;
        end
      end
      FT_MGMT: begin
        store = 1'b1;
        resp  = group ? RESP_NONE : RESP_ACK;
      end
      default: ;
    endcase
  end

  // ---- ring space
  wire        dq_full = ((dq_wp - dq_rp) == (DAW+1)'(DQ));
  wire        dq_empty = (dq_wp == dq_rp);
  wire [15:0] cur_pos = in.first ? 16'd0 : pos;
  wire [31:0] wr_byte_addr = wr_base + 32'(cur_pos);

  assign buf_wr_en   = in_valid && (in.first || !ovf) && ((wr_base + 32'(cur_pos) - rd_ptr) < SIZE);
  assign buf_wr_addr = wr_byte_addr[BAW-1:0];
  assign buf_wr_data = in.data;

  // ---- scoreboard update helpers
  wire [11:0] seq     = sc[15:4];
  wire [11:0] d_seq   = seq - ba_ssn;
  wire [11:0] bar_ssn = bar_ssc[15:4];
  wire [11:0] d_bar   = bar_ssn - ba_ssn;

  // the frame ending now fits in the ring and the descriptor queue
  wire        commit_ok = !ovf && buf_wr_en && !dq_full;

  wire        bus_wr  = bus_req.valid && bus_req.we && !bus_rsp.ready;
  wire        bus_rd  = bus_req.valid && !bus_req.we && !bus_rsp.ready;
  wire        pop     = bus_rd && (bus_req.addr[4:2] == 3'd4) && !dq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr <= '0; pos <= '0; ovf <= 1'b0; wr_base <= '0;
      dq_wp <= '0; ovf_cnt <= '0;
      for (int i = 0; i < DQ; i++) dq[i] <= '0;
      evt_valid <= 1'b0; evt_kind <= RX_OTHER; evt_resp <= RESP_NONE;
      evt_ta <= '0; evt_dur <= '0; evt_tid <= '0;
      ba_ssn <= '0; ba_bitmap <= '0;
    end else begin
      evt_valid <= 1'b0;
      if (in_abort) begin
        pos <= '0;
        ovf <= 1'b0;
      end else if (in_valid) begin
        if (in.first) begin
          hdr <= {232'h0, in.data};
          ovf <= !buf_wr_en;
          pos <= 16'd1;
        end else begin
          if (pos < 16'd30) hdr[8*pos[4:0] +: 8] <= in.data;
          if (!buf_wr_en) ovf <= 1'b1;
          pos <= pos + 1'b1;
        end
        if (in.last) begin
          pos <= '0;
          if (fcs_ok && for_me) begin
            evt_valid <= 1'b1;
            evt_kind  <= kind;
            evt_resp  <= resp;
            evt_ta    <= a2;
            evt_dur   <= dur;
            evt_tid   <= (kind == RX_BAR) ? barc[15:12] : qosc[3:0];
            // BlockAck scoreboard
            if (kind == RX_DATA && is_qos && !group && rx_agg && commit_ok) begin
              if (d_seq < 12'd64)
                ba_bitmap[d_seq[5:0]] <= 1'b1;
              else if (d_seq < 12'd2048) begin
                ba_ssn    <= seq - 12'd63;
                ba_bitmap <= (d_seq - 12'd63 >= 12'd64) ? {1'b1, 63'h0}
                             : ((ba_bitmap >> (d_seq - 12'd63)) | {1'b1, 63'h0});
              end
            end else if (kind == RX_BAR && d_bar != 0 && d_bar < 12'd2048) begin
              ba_ssn    <= bar_ssn;
              ba_bitmap <= (d_bar >= 12'd64) ? 64'h0 : (ba_bitmap >> d_bar);
            end
            // commit to the ring
            if (store) begin
              if (commit_ok) begin
                dq[dq_wp[DAW-1:0]] <= {1'b1, 1'b0, 14'(pos + 1'b1), 16'(wr_base >> 2)};
                dq_wp   <= dq_wp + 1'b1;
                wr_base <= wr_base + ((32'(pos) + 32'd4) & ~32'd3);
              end else begin
                ovf_cnt <= ovf_cnt + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // ---- registers, descriptor queue read side, interrupt
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_addr <= '0; rd_ptr <= '0; dq_rp <= '0; intr <= 1'b0; bus_rsp <= '0;
    end else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      if (pop) dq_rp <= dq_rp + 1'b1;
      if (store_q) intr <= 1'b1;
      else if (bus_wr && bus_req.addr[4:2] == 3'd5 && bus_req.wdata[0]) intr <= 1'b0;
      if (bus_wr) begin
        unique case (bus_req.addr[4:2])
          3'd0: own_addr[31:0]  <= bus_req.wdata;
          3'd1: own_addr[47:32] <= bus_req.wdata[15:0];
          3'd2: rd_ptr          <= bus_req.wdata;
          default: ;
        endcase
      end
      unique case (bus_req.addr[4:2])
        3'd0: bus_rsp.rdata <= own_addr[31:0];
        3'd1: bus_rsp.rdata <= {16'h0, own_addr[47:32]};
        3'd2: bus_rsp.rdata <= rd_ptr;
        3'd3: bus_rsp.rdata <= wr_base;
        3'd4: bus_rsp.rdata <= dq_empty ? 32'h0 : dq[dq_rp[DAW-1:0]];
        3'd5: bus_rsp.rdata <= {31'h0, intr};
        default: bus_rsp.rdata <= ovf_cnt;
      endcase
    end
  end

  // a descriptor was pushed in the previous cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dq_wp_q <= '0;
    else        dq_wp_q <= dq_wp;
  end
  assign store_q = (dq_wp_q != dq_wp);
endmodule
