// plcp_rx: PLCP Receive block, the MAC side of the MAC/PHY receive interface.
//
// While the PHY holds `phy_rx_enable`, every cycle with `phy_rx_indication`
// carries one byte: first the 16-byte RXVECTOR (same layout as the TXVECTOR
// of PLCP Transmit: bytes 0..2 PSDU length, byte 4 bit 0 aggregation), then
// the PSDU. A non-aggregated PSDU is passed on as one MPDU. An A-MPDU is
// de-aggregated: each 4-byte delimiter is checked (signature 0x4E and CRC-8);
// a good one gives the length of the MPDU that follows, which is passed on,
// then the padding to the next 4-byte boundary is skipped. A bad delimiter is
// counted and skipped, and the search continues at the next 4-byte boundary.
// If `phy_rx_enable` falls in the middle of an MPDU, `mpdu_abort` pulses so that
// the MPDU is discarded downstream.
//
// Output: one byte per received byte, with MPDU first/last flags, one cycle
// after the PHY presents it (no back-pressure). `ppdu_end` pulses when
// `phy_rx_enable` falls; `rx_agg` tells whether the current PPDU is an
// A-MPDU. The PLCP Receive interrupt `intr` is set at every PPDU end and
// cleared by writing 1 to bit 0 of register 0x8.
// Bus registers: 0x0 PPDUs received, 0x4 bad delimiters, 0x8 interrupt.
module plcp_rx
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        phy_rx_enable,
  input  logic        phy_rx_indication,
  input  logic [7:0]  phy_rx_data,
  output logic        out_valid,
  output rxbyte_t     out,
  output logic        mpdu_abort,
  output logic        ppdu_end,
  output logic        rx_agg,
  output logic        intr,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp
);
  typedef enum logic [2:0] { P_IDLE, P_VEC, P_DELIM, P_MPDU, P_PAD, P_DRAIN } pstate_e;

  pstate_e     state;
  logic [3:0]  vidx;
  logic [23:0] psdu_len, pos;     // PSDU length and bytes of it seen
  logic [31:0] dbuf;              // delimiter bytes
  logic [1:0]  didx;
  logic [15:0] mlen, mpos;
  logic        en_q;
  logic [31:0] ppdu_cnt, delim_err;

  wire byte_in = phy_rx_enable && phy_rx_indication;
  wire [31:0] dword = {phy_rx_data, dbuf[23:0]};
  wire [11:0] dlen  = dword[15:4];
  wire delim_ok = (dword[31:24] == DELIM_SIGNATURE) &&
                  (dword[23:16] == delim_crc8(dword[15:0])) && (dlen != 0);
  wire psdu_last = (pos + 1'b1 == psdu_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE; vidx <= '0; psdu_len <= '0; pos <= '0; dbuf <= '0;
      didx <= '0; mlen <= '0; mpos <= '0; en_q <= 1'b0; rx_agg <= 1'b0;
      out_valid <= 1'b0; out <= '0; mpdu_abort <= 1'b0; ppdu_end <= 1'b0;
      ppdu_cnt <= '0; delim_err <= '0;
    end else begin
      out_valid <= 1'b0;
      mpdu_abort <= 1'b0;
      ppdu_end  <= 1'b0;
      en_q      <= phy_rx_enable;
      if (en_q && !phy_rx_enable) begin
        ppdu_end <= 1'b1;
        ppdu_cnt <= ppdu_cnt + 1'b1;
        if (state == P_MPDU && mpos != 0) mpdu_abort <= 1'b1;
        state <= P_IDLE;
      end else if (phy_rx_enable && state == P_IDLE) begin
        state <= P_VEC;
        vidx  <= '0;
        if (byte_in) begin                 // first RXVECTOR byte
          psdu_len[7:0] <= phy_rx_data;
          vidx <= 4'd1;
        end
      end else if (byte_in) begin
        unique case (state)
          P_VEC: begin
            vidx <= vidx + 1'b1;
            case (vidx)
              4'd0: psdu_len[7:0]   <= phy_rx_data;
              4'd1: psdu_len[15:8]  <= phy_rx_data;
              4'd2: psdu_len[23:16] <= phy_rx_data;
              4'd4: rx_agg          <= phy_rx_data[0];
              default: ;
            endcase
            if (vidx == 4'(TXVECTOR_BYTES - 1)) begin
              pos  <= '0;
              didx <= '0;
              mpos <= '0;
              mlen <= 16'(psdu_len);
              state <= (psdu_len == 0) ? P_DRAIN : (rx_agg ? P_DELIM : P_MPDU);
            end
          end
          P_DELIM: begin
            pos  <= pos + 1'b1;
            didx <= didx + 1'b1;
            dbuf[8*didx +: 8] <= phy_rx_data;
            if (didx == 2'd3) begin
              if (delim_ok) begin
                mlen  <= 16'(dlen);
                mpos  <= '0;
                state <= P_MPDU;
              end else begin
                delim_err <= delim_err + 1'b1;
              end
            end
            if (psdu_last) state <= P_DRAIN;
          end
          P_MPDU: begin
            pos       <= pos + 1'b1;
            mpos      <= mpos + 1'b1;
            out_valid <= 1'b1;
            out       <= '{data: phy_rx_data, first: (mpos == 0), last: (mpos + 1'b1 == mlen)};
            if (mpos + 1'b1 == mlen) begin
              didx  <= '0;
              if (psdu_last)          state <= P_DRAIN;
              else if (!rx_agg)       state <= P_DRAIN;
              else if (pos[1:0] == 2'd3) state <= P_DELIM;
              else                    state <= P_PAD;
            end else if (psdu_last) begin
              // PSDU ended inside an MPDU: close it so it is discarded
              mpdu_abort <= 1'b1;
              state <= P_DRAIN;
            end
          end
          P_PAD: begin
            pos <= pos + 1'b1;
            if (psdu_last)              state <= P_DRAIN;
            else if (pos[1:0] == 2'd3)  state <= P_DELIM;
          end
          default: ;   // P_DRAIN: ignore until enable falls
        endcase
      end
    end
  end

  // ---- interrupt and bus interface
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      intr    <= 1'b0;
      bus_rsp <= '0;
    end else begin
      if (ppdu_end) intr <= 1'b1;
      else if (bus_req.valid && bus_req.we && !bus_rsp.ready &&
               bus_req.addr[3:2] == 2'd2 && bus_req.wdata[0])
        intr <= 1'b0;
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      unique case (bus_req.addr[3:2])
        2'd0:    bus_rsp.rdata <= ppdu_cnt;
        2'd1:    bus_rsp.rdata <= delim_err;
        default: bus_rsp.rdata <= {31'h0, intr};
      endcase
    end
  end
endmodule
