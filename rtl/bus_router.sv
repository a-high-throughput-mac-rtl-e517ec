// bus_router: MAC HW bus router.
//
// Connects the system-bus slave port of the MAC hardware to the eleven bus
// interfaces of its blocks. Address bits [16:13] pick the interface, so each
// block owns an 8 KB window (this design's map):
//   0 Tx Buffer        1 Header Generation   2 FCS Generation
//   3 PLCP Transmit    4 Protocol Manager    5 ACK Generation
//   6 Rx Buffer        7 Header Check        8 FCS Check
//   9 PLCP Receive    10 PHY
// The request goes, unchanged, only to the selected interface; its response
// comes back combinationally. Addresses above the last window are answered
// by the router itself, one cycle later, with read data 0.
module bus_router
  import mac_pkg::*;
#(
  parameter int unsigned N = BUS_PORTS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [N],
  input  bus_rsp_t s_rsp [N]
);
  wire [3:0] sel = m_req.addr[16:13];
  logic      miss_ready;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_req[i]       = m_req;
      s_req[i].valid = m_req.valid && (sel == 4'(i));
    end
    if (32'(sel) < N) m_rsp = s_rsp[sel];
    else              m_rsp = '{ready: miss_ready, rdata: 32'h0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_ready <= 1'b0;
    else        miss_ready <= m_req.valid && (32'(sel) >= N) && !miss_ready;
  end
endmodule
