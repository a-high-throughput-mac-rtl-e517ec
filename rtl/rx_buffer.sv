// rx_buffer: receive buffer between Header Check and the MAC software.
//
// A dual-port RAM of DEPTH 32-bit words (2k words, the size of the receive
// header/data memory of the SoC). Header Check writes received frames into it
// one byte at a time through port B, using a byte address and a byte-lane
// write; software reads whole words through its bus interface
// (byte offset 4*i : word i, read only; writes are ignored). Frame bytes are
// packed little-endian: byte address 4*i+k is bits 8k+7:8k of word i.
// The ring management (pointers, descriptors) lives in Header Check.
module rx_buffer
  import mac_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  bus_req_t                   bus_req,
  output bus_rsp_t                   bus_rsp,
  // Header Check byte write port
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH)+1:0]   wr_addr,   // byte address
  input  logic [7:0]                 wr_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic [31:0] bus_rd_word;

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int k = 0; k < 4; k++)
        if (wr_addr[1:0] == 2'(k))
          mem[wr_addr[AW+1:2]][8*k +: 8] <= wr_data;
    bus_rd_word <= mem[bus_req.addr[AW+1:2]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rsp.ready <= 1'b0;
    else        bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
  end

  assign bus_rsp.rdata = bus_rd_word;
endmodule
