// header_gen: Header Generation block of the MAC hardware.
//
// On `start` it builds `count` MPDUs, one after the other, from transmit
// descriptors that software has placed in the Tx Buffer ring, and streams them
// byte by byte to FCS Generation. For an A-MPDU (`aggregate` set) each MPDU is
// preceded by its 4-byte MPDU delimiter; the FCS itself is appended downstream.
//
// Descriptor layout (8 words, followed by the frame body packed little-endian
// and padded to a whole word) is this design's choice:
//   w0 [15:0] frame control     [31:16] duration/ID
//   w1 address 1 [31:0]
//   w2 [15:0] address 1 [47:32] [31:16] address 2 [15:0]
//   w3 address 2 [47:16]
//   w4 address 3 [31:0]
//   w5 [15:0] address 3 [47:32] [31:16] sequence control
//   w6 [15:0] QoS control       [31:16] frame body length in bytes
//   w7 HT control
// The MAC header emitted follows IEEE 802.11: FC, duration, address 1..3,
// sequence control, then QoS control for QoS data and HT control when the
// Order bit of a QoS data frame is set (24..30 bytes). RTS/BAR/BA control
// frames carry FC, duration, RA, TA (16 bytes); CTS/ACK carry FC, duration,
// RA (10 bytes). Address 4 is never produced (infrastructure BSS only).
//
// Delimiter: byte0 = {length[3:0], 4'b0}, byte1 = length[11:4],
// byte2 = CRC-8, byte3 = 0x4E, where length = header + body + 4.
//
// Timing: two cycles per descriptor or body word read, one cycle per header
// or delimiter byte; the ring read stalls while the read pointer equals the
// software write pointer. Output is a valid/ready stream with a registered
// output stage. Bus registers (read only): 0x0 MPDUs generated, 0x4 read pointer.
module header_gen
  import mac_pkg::*;
#(
  parameter int unsigned PW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  // control from the Protocol Manager
  input  logic           start,
  input  logic [7:0]     count,
  input  logic           aggregate,
  output logic           busy,
  output logic           done,        // one-cycle pulse after the last byte left
  // Tx Buffer read port
  output logic [PW-1:0]  rd_ptr,
  input  logic [31:0]    rd_data,
  input  logic [PW-1:0]  wr_ptr,
  // byte stream to FCS Generation
  output logic           out_valid,
  output txbyte_t        out,
  input  logic           out_ready,
  // bus interface
  input  bus_req_t       bus_req,
  output bus_rsp_t       bus_rsp
);
  typedef enum logic [3:0] {
    S_IDLE, S_DFETCH, S_DWAIT, S_DELIM, S_HDR, S_BFETCH, S_BWAIT, S_BEMIT, S_NEXT, S_DONE
  } state_e;

  state_e      state;
  logic [31:0] desc [8];
  logic [2:0]  widx;
  logic [7:0]  remaining;      // MPDUs still to build
  logic        agg;
  logic [4:0]  bidx;           // byte index inside delimiter / header
  logic [15:0] body_left;
  logic [31:0] wbuf;
  logic [1:0]  lane;
  logic [31:0] mpdu_cnt;

  // ---- header fields from the descriptor
  logic [15:0] fc, body_len;
  logic [1:0]  ftype;
  logic [3:0]  subtype;
  logic        qos, htc;
  logic [4:0]  hdr_len;
  logic [11:0] mpdu_len;
  logic [239:0] hdr_vec;
  logic [31:0] delim;

  always_comb begin
    fc       = desc[0][15:0];
    ftype    = fc[3:2];
    subtype  = fc[7:4];
    body_len = desc[6][31:16];
    qos      = (ftype == FT_DATA) && subtype[3];
    htc      = qos && fc[15];
    if (ftype == FT_CTRL)
      hdr_len = (subtype == ST_CTS || subtype == ST_ACK) ? 5'd10 : 5'd16;
    else
      hdr_len = 5'd24 + (qos ? 5'd2 : 5'd0) + (htc ? 5'd4 : 5'd0);
    mpdu_len = 12'(hdr_len) + body_len[11:0] + 12'd4;
    hdr_vec  = {desc[7],                                  // HT control
                desc[6][15:0],                            // QoS control
                desc[5][31:16],                           // sequence control
                desc[5][15:0], desc[4],                   // address 3
                desc[3], desc[2][31:16],                  // address 2
                desc[2][15:0], desc[1],                   // address 1
                desc[0][31:16], fc};                      // duration, FC
    delim    = {DELIM_SIGNATURE, delim_crc8({mpdu_len, 4'b0000}), mpdu_len, 4'b0000};
  end

  wire can_emit  = !out_valid || out_ready;
  wire avail     = (rd_ptr != wr_ptr);
  wire last_mpdu = (remaining == 8'd1);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_ptr    <= '0;
      out_valid <= 1'b0;
      out       <= '0;
      done      <= 1'b0;
      remaining <= '0;
      agg       <= 1'b0;
      widx      <= '0;
      bidx      <= '0;
      body_left <= '0;
      wbuf      <= '0;
      lane      <= '0;
      mpdu_cnt  <= '0;
      for (int i = 0; i < 8; i++) desc[i] <= '0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start && count != 0) begin
          remaining <= count;
          agg       <= aggregate;
          widx      <= '0;
          state     <= S_DFETCH;
        end
        S_DFETCH: if (avail) state <= S_DWAIT;
        S_DWAIT: begin
          desc[widx] <= rd_data;
          rd_ptr     <= rd_ptr + 1'b1;
          widx       <= widx + 1'b1;
          bidx       <= '0;
          if (widx == 3'd7) state <= agg ? S_DELIM : S_HDR;
          else              state <= S_DFETCH;
        end
        S_DELIM: if (can_emit) begin
          out_valid <= 1'b1;
          out       <= '{data: delim[8*bidx[1:0] +: 8], kind: K_DELIM, mpdu_last: 1'b0, ppdu_last: 1'b0};
          bidx      <= bidx + 1'b1;
          if (bidx == 5'd3) begin
            bidx  <= '0;
            state <= S_HDR;
          end
        end
        S_HDR: if (can_emit) begin
          out_valid <= 1'b1;
          out.data  <= hdr_vec[8*bidx +: 8];
          out.kind  <= K_HDR;
          out.mpdu_last <= (bidx == hdr_len - 1'b1) && (body_len == 0);
          out.ppdu_last <= (bidx == hdr_len - 1'b1) && (body_len == 0) && last_mpdu;
          bidx      <= bidx + 1'b1;
          if (bidx == hdr_len - 1'b1) begin
            body_left <= body_len;
            state     <= (body_len == 0) ? S_NEXT : S_BFETCH;
          end
        end
        S_BFETCH: if (avail) state <= S_BWAIT;
        S_BWAIT: begin
          wbuf   <= rd_data;
          rd_ptr <= rd_ptr + 1'b1;
          lane   <= '0;
          state  <= S_BEMIT;
        end
        S_BEMIT: if (can_emit) begin
          out_valid     <= 1'b1;
          out.data      <= wbuf[8*lane +: 8];
          out.kind      <= K_BODY;
          out.mpdu_last <= (body_left == 16'd1);
          out.ppdu_last <= (body_left == 16'd1) && last_mpdu;
          body_left     <= body_left - 1'b1;
          lane          <= lane + 1'b1;
          if (body_left == 16'd1)  state <= S_NEXT;
          else if (lane == 2'd3)   state <= S_BFETCH;
        end
        S_NEXT: begin
          mpdu_cnt  <= mpdu_cnt + 1'b1;
          remaining <= remaining - 1'b1;
          widx      <= '0;
          state     <= last_mpdu ? S_DONE : S_DFETCH;
        end
        S_DONE: if (!out_valid || out_ready) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- bus interface: read-only status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp <= '0;
    end else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      bus_rsp.rdata <= bus_req.addr[2] ? 32'(rd_ptr) : mpdu_cnt;
    end
  end
endmodule
