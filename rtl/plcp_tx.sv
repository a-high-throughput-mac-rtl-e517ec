// plcp_tx: PLCP Transmit block, the MAC side of the MAC/PHY transmit interface.
//
// Write side: MPDU bytes from FCS Generation are stored in a PPDU FIFO. A PPDU
// whose first byte is a delimiter is an A-MPDU; after every MPDU of it except
// the last, zero bytes are inserted so that the next subframe starts on a
// 4-byte boundary (A-MPDU aggregation). When the last byte of a PPDU has been
// written, its PSDU length is queued; the PPDU is then ready.
// Read side: on `tx_go` with a ready PPDU, `phy_tx_enable` rises and the PHY
// takes one byte per cycle in which it asserts `phy_tx_confirm`: first the
// 16-byte TXVECTOR, then the PSDU. `tx_done` pulses after the last byte.
//
// The store-and-forward FIFO lets a whole A-MPDU be prepared while the
// channel is being won or a CTS awaited, so it can start one SIFS later. Its
// default size, 65536 bytes, equals the 16K x 32-bit FIFO of the SoC and holds
// the largest 802.11n A-MPDU. TXVECTOR layout (this design's choice):
// byte0..2 PSDU length (little-endian), byte3 MCS, byte4 bit0 aggregation,
// bytes 5..15 zero.
// Bus registers (read only): 0x0 PPDUs sent, 0x4 FIFO fill in bytes.
module plcp_tx
  import mac_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,   // PPDU FIFO bytes
  parameter int unsigned LQ     = 4        // PPDUs that can be queued
) (
  input  logic        clk,
  input  logic        rst_n,
  // from FCS Generation
  input  logic        in_valid,
  input  txbyte_t     in,
  output logic        in_ready,
  // from the Protocol Manager
  input  logic        tx_go,
  input  logic        flush,
  input  logic [6:0]  mcs,
  output logic        ppdu_ready,
  output logic        tx_busy,
  output logic        tx_done,
  output logic        empty,
  // to the PHY
  output logic        phy_tx_enable,
  output logic [7:0]  phy_tx_data,
  input  logic        phy_tx_confirm,
  // bus interface
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned LAW = $clog2(LQ);

  typedef struct packed { logic [23:0] len; logic agg; } lq_t;

  logic [7:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  lq_t         lq [LQ];
  logic [LAW:0] lq_wp, lq_rp;
  logic [23:0] cur_len;
  logic        cur_agg;
  logic [1:0]  sub_cnt;       // bytes of the current subframe, modulo 4
  logic [1:0]  pad_left;
  logic [AW:0] fill;

  assign fill = wp - rp;
  wire full     = (fill == (AW+1)'(DEPTH));
  wire lq_full  = ((lq_wp - lq_rp) == (LAW+1)'(LQ));
  wire lq_empty = (lq_wp == lq_rp);
  wire padding  = (pad_left != 0);
  assign in_ready   = !full && !padding && !lq_full && !flush;
  assign ppdu_ready = !lq_empty;
  assign empty      = lq_empty && (cur_len == 0) && (fill == 0);

  // ------------------------------------------------------------ write side
  wire wr_byte = (in_valid && in_ready) || (padding && !full);
  wire first   = (cur_len == 0);
  wire agg_now = first ? (in.kind == K_DELIM) : cur_agg;

  always_ff @(posedge clk) begin
    if (wr_byte) mem[wp[AW-1:0]] <= padding ? 8'h00 : in.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; lq_wp <= '0; cur_len <= '0; cur_agg <= 1'b0;
      sub_cnt <= '0; pad_left <= '0;
      for (int i = 0; i < LQ; i++) lq[i] <= '0;
    end else if (flush) begin
      wp <= rp; lq_wp <= lq_rp; cur_len <= '0; cur_agg <= 1'b0;
      sub_cnt <= '0; pad_left <= '0;
    end else if (padding) begin
      if (!full) begin
        wp       <= wp + 1'b1;
        cur_len  <= cur_len + 1'b1;
        pad_left <= pad_left - 1'b1;
      end
    end else if (in_valid && in_ready) begin
      wp      <= wp + 1'b1;
      cur_agg <= agg_now;
      if (in.ppdu_last) begin
        lq[lq_wp[LAW-1:0]] <= '{len: cur_len + 1'b1, agg: agg_now};
        lq_wp   <= lq_wp + 1'b1;
        cur_len <= '0;
        sub_cnt <= '0;
      end else begin
        cur_len <= cur_len + 1'b1;
        sub_cnt <= sub_cnt + 1'b1;
        if (in.mpdu_last && agg_now) begin
          pad_left <= 2'd0 - (sub_cnt + 2'd1);
          sub_cnt  <= '0;
        end
      end
    end
  end

  // ------------------------------------------------------------ read side
  typedef enum logic [1:0] { R_IDLE, R_VEC, R_DATA } rstate_e;
  rstate_e     rstate;
  logic [3:0]  vidx;
  logic [23:0] left;
  lq_t         cur;
  logic [31:0] sent;
  logic [127:0] txvector;

  assign txvector = {88'h0, 7'h0, cur.agg, 1'b0, mcs, cur.len};
  assign tx_busy  = (rstate != R_IDLE);
  assign phy_tx_enable = tx_busy;
  assign phy_tx_data   = (rstate == R_VEC) ? txvector[8*vidx +: 8] : mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE; vidx <= '0; left <= '0; cur <= '0;
      rp <= '0; lq_rp <= '0; tx_done <= 1'b0; sent <= '0;
    end else begin
      tx_done <= 1'b0;
      unique case (rstate)
        R_IDLE: if (tx_go && !lq_empty && !flush) begin
          cur    <= lq[lq_rp[LAW-1:0]];
          left   <= lq[lq_rp[LAW-1:0]].len;
          vidx   <= '0;
          rstate <= R_VEC;
        end
        R_VEC: if (phy_tx_confirm) begin
          vidx <= vidx + 1'b1;
          if (vidx == 4'(TXVECTOR_BYTES - 1)) rstate <= R_DATA;
        end
        R_DATA: if (phy_tx_confirm) begin
          rp   <= rp + 1'b1;
          left <= left - 1'b1;
          if (left == 24'd1) begin
            lq_rp   <= lq_rp + 1'b1;
            tx_done <= 1'b1;
            sent    <= sent + 1'b1;
            rstate  <= R_IDLE;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rsp <= '0;
    else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      bus_rsp.rdata <= bus_req.addr[2] ? 32'(fill) : sent;
    end
  end
endmodule
