// mac_hw: the MAC hardware of an IEEE 802.11n/11e station or access point.
//
// Transmit chain: software puts descriptors and MSDUs into the Tx Buffer
// ring; Header Generation turns them into MPDUs (MPDU delimiter for an
// A-MPDU, MAC header, body); FCS Generation appends the FCS; PLCP Transmit
// pads A-MPDU subframes, stores whole PPDUs and hands TXVECTOR + PSDU to the
// PHY when the Protocol Manager says so. ACK Generation shares FCS Generation
// and PLCP Transmit for ACK, CTS and BlockAck responses.
// Receive chain: PLCP Receive takes RXVECTOR + PSDU from the PHY and splits an
// A-MPDU into MPDUs; FCS Check verifies each; Header Check decodes and filters
// the header, keeps the BlockAck scoreboard, stores frames in the Rx Buffer
// and interrupts software. The Protocol Manager times channel access and the
// RTS/CTS/data/BlockAck exchanges.
// Every block has its own bus interface behind the bus router; the eleventh
// interface, for the PHY, is brought out as `phy_bus_*`.
//
// One clock domain (the MAC clock, 50 MHz by default: CLK_PER_US = 50), active
// low asynchronous reset. The PHY interface moves one byte per cycle in which
// the PHY asserts `phy_tx_confirm` (transmit) or `phy_rx_indication` (receive).
module mac_hw
  import mac_pkg::*;
#(
  parameter int unsigned CLK_PER_US   = 50,
  parameter int unsigned TXBUF_WORDS  = 512,
  parameter int unsigned RXBUF_WORDS  = 2048,
  parameter int unsigned TXFIFO_BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // system bus slave port
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp,
  // PHY data interface
  output logic        phy_tx_enable,
  output logic [7:0]  phy_tx_data,
  input  logic        phy_tx_confirm,
  input  logic        phy_rx_enable,
  input  logic        phy_rx_indication,
  input  logic [7:0]  phy_rx_data,
  input  logic        phy_cca_busy,
  // PHY register interface (bus interface 11)
  output bus_req_t    phy_bus_req,
  input  bus_rsp_t    phy_bus_rsp,
  // interrupts
  output logic        pr_intr,       // PLCP Receive
  output logic        prmgr_intr,    // Protocol Manager
  output logic        hc_intr        // Header Check
);
  localparam int unsigned PW = 16;

  bus_req_t s_req [BUS_PORTS];
  bus_rsp_t s_rsp [BUS_PORTS];

  bus_router #(.N(BUS_PORTS)) u_router (
    .clk, .rst_n, .m_req(bus_req), .m_rsp(bus_rsp), .s_req, .s_rsp
  );
  assign phy_bus_req = s_req[10];
  assign s_rsp[10]   = phy_bus_rsp;

  // ------------------------------------------------------------ transmit
  logic [PW-1:0] tb_rd_ptr, tb_wr_ptr;
  logic [31:0]   tb_rd_data;

  tx_buffer #(.DEPTH(TXBUF_WORDS), .PW(PW)) u_tx_buffer (
    .clk, .rst_n, .bus_req(s_req[0]), .bus_rsp(s_rsp[0]),
    .rd_ptr(tb_rd_ptr), .rd_data(tb_rd_data), .wr_ptr(tb_wr_ptr)
  );

  logic       hg_start, hg_agg, hg_busy, hg_done;
  logic [7:0] hg_count;
  logic       hg_valid, hg_ready;
  txbyte_t    hg_byte;

  header_gen #(.PW(PW)) u_header_gen (
    .clk, .rst_n, .start(hg_start), .count(hg_count), .aggregate(hg_agg),
    .busy(hg_busy), .done(hg_done),
    .rd_ptr(tb_rd_ptr), .rd_data(tb_rd_data), .wr_ptr(tb_wr_ptr),
    .out_valid(hg_valid), .out(hg_byte), .out_ready(hg_ready),
    .bus_req(s_req[1]), .bus_rsp(s_rsp[1])
  );

  logic        ag_gen, ag_busy, ag_valid, ag_ready;
  resp_e       ag_kind;
  logic [47:0] ag_ra, own_addr;
  logic [15:0] ag_dur;
  logic [3:0]  ag_tid;
  logic [11:0] ba_ssn;
  logic [63:0] ba_bitmap;
  txbyte_t     ag_byte;

  ack_gen u_ack_gen (
    .clk, .rst_n, .gen(ag_gen), .kind(ag_kind), .ra(ag_ra), .ta(own_addr),
    .dur_in(ag_dur), .tid(ag_tid), .ssn(ba_ssn), .bitmap(ba_bitmap),
    .busy(ag_busy), .out_valid(ag_valid), .out(ag_byte), .out_ready(ag_ready),
    .bus_req(s_req[5]), .bus_rsp(s_rsp[5])
  );

  // FCS Generation input: a response from ACK Generation while it is busy,
  // otherwise Header Generation (the Protocol Manager never runs both).
  logic    fg_in_valid, fg_in_ready, fg_out_valid, fg_out_ready;
  txbyte_t fg_in, fg_out;

  assign fg_in_valid = ag_busy ? ag_valid : hg_valid;
  assign fg_in       = ag_busy ? ag_byte  : hg_byte;
  assign ag_ready    = ag_busy && fg_in_ready;
  assign hg_ready    = !ag_busy && fg_in_ready;

  fcs_gen u_fcs_gen (
    .clk, .rst_n, .in_valid(fg_in_valid), .in(fg_in), .in_ready(fg_in_ready),
    .out_valid(fg_out_valid), .out(fg_out), .out_ready(fg_out_ready),
    .bus_req(s_req[2]), .bus_rsp(s_rsp[2])
  );

  logic       tx_go, tx_flush, ppdu_ready, tx_busy, tx_done, txq_empty;
  logic [6:0] mcs;

  plcp_tx #(.DEPTH(TXFIFO_BYTES)) u_plcp_tx (
    .clk, .rst_n, .in_valid(fg_out_valid), .in(fg_out), .in_ready(fg_out_ready),
    .tx_go, .flush(tx_flush), .mcs, .ppdu_ready, .tx_busy, .tx_done,
    .empty(txq_empty),
    .phy_tx_enable, .phy_tx_data, .phy_tx_confirm,
    .bus_req(s_req[3]), .bus_rsp(s_rsp[3])
  );

  // ------------------------------------------------------------ receive
  logic    pr_valid, pr_abort, pr_ppdu_end, rx_agg;
  rxbyte_t pr_byte;

  plcp_rx u_plcp_rx (
    .clk, .rst_n, .phy_rx_enable, .phy_rx_indication, .phy_rx_data,
    .out_valid(pr_valid), .out(pr_byte), .mpdu_abort(pr_abort), .ppdu_end(pr_ppdu_end),
    .rx_agg, .intr(pr_intr), .bus_req(s_req[9]), .bus_rsp(s_rsp[9])
  );

  logic    fc_valid, fc_ok, fc_abort;
  rxbyte_t fc_byte;

  fcs_check u_fcs_check (
    .clk, .rst_n, .in_valid(pr_valid), .in(pr_byte), .in_abort(pr_abort),
    .out_valid(fc_valid), .out(fc_byte), .fcs_ok(fc_ok), .out_abort(fc_abort),
    .bus_req(s_req[8]), .bus_rsp(s_rsp[8])
  );

  logic                           rb_wr_en;
  logic [$clog2(RXBUF_WORDS)+1:0] rb_wr_addr;
  logic [7:0]                     rb_wr_data;
  logic        evt_valid;
  rxkind_e     evt_kind;
  resp_e       evt_resp;
  logic [47:0] evt_ta;
  logic [15:0] evt_dur;
  logic [3:0]  evt_tid;

  header_check #(.BUF_WORDS(RXBUF_WORDS)) u_header_check (
    .clk, .rst_n, .in_valid(fc_valid), .in(fc_byte), .fcs_ok(fc_ok),
    .in_abort(fc_abort), .rx_agg,
    .buf_wr_en(rb_wr_en), .buf_wr_addr(rb_wr_addr), .buf_wr_data(rb_wr_data),
    .evt_valid, .evt_kind, .evt_resp, .evt_ta, .evt_dur, .evt_tid,
    .ba_ssn, .ba_bitmap, .own_addr, .intr(hc_intr),
    .bus_req(s_req[7]), .bus_rsp(s_rsp[7])
  );

  rx_buffer #(.DEPTH(RXBUF_WORDS)) u_rx_buffer (
    .clk, .rst_n, .bus_req(s_req[6]), .bus_rsp(s_rsp[6]),
    .wr_en(rb_wr_en), .wr_addr(rb_wr_addr), .wr_data(rb_wr_data)
  );

  // ------------------------------------------------------------ control
  protocol_manager #(.CLK_PER_US(CLK_PER_US)) u_protocol_manager (
    .clk, .rst_n, .cca_busy(phy_cca_busy), .phy_rx_enable,
    .hg_start, .hg_count, .hg_aggregate(hg_agg), .hg_busy,
    .tx_go, .tx_flush, .mcs, .ppdu_ready, .tx_busy, .tx_done, .txq_empty,
    .rx_ppdu_end(pr_ppdu_end), .evt_valid, .evt_kind, .evt_resp, .evt_ta,
    .evt_dur, .evt_tid,
    .ag_gen, .ag_kind, .ag_ra, .ag_dur, .ag_tid, .ag_busy,
    .intr(prmgr_intr), .bus_req(s_req[4]), .bus_rsp(s_rsp[4])
  );
endmodule
