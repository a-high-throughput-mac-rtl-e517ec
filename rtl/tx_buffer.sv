// tx_buffer: transmit buffer between the MAC software and Header Generation.
//
// A dual-port RAM of DEPTH 32-bit words (512 words, the size of the transmit
// header/data memory of the SoC) used as a ring. Software writes transmit
// descriptors and MSDU bytes through its bus interface and then advances the
// write pointer register; Header Generation reads the ring through port B and
// stalls while its read pointer equals the write pointer. The ring, the
// pointer register and the bus map are this design's choices:
//   byte offset 0x0000 + 4*i : word i of the RAM (read/write)
//   byte offset 0x1000       : TX_WPTR, free-running word write pointer (r/w)
//   byte offset 0x1004       : TX_RPTR, Header Generation read pointer (r/o)
// Port B has a one-cycle read latency. Bus accesses complete in one cycle
// after `valid` (ready is registered).
module tx_buffer
  import mac_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned PW    = 16          // pointer width, free running
) (
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        bus_req,
  output bus_rsp_t        bus_rsp,
  // Header Generation read port
  input  logic [PW-1:0]   rd_ptr,            // word pointer (modulo DEPTH used)
  output logic [31:0]     rd_data,           // word at rd_ptr, one cycle later
  output logic [PW-1:0]   wr_ptr             // words made available by software
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic [31:0] bus_rd_word;

  wire is_reg = bus_req.addr[12];
  wire [AW-1:0] bus_waddr = bus_req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (bus_req.valid && bus_req.we && !is_reg && !bus_rsp.ready)
      mem[bus_waddr] <= bus_req.wdata;
    bus_rd_word <= mem[bus_waddr];
    rd_data     <= mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr        <= '0;
      bus_rsp.ready <= 1'b0;
    end else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      if (bus_req.valid && bus_req.we && is_reg && !bus_req.addr[2] && !bus_rsp.ready)
        wr_ptr <= bus_req.wdata[PW-1:0];
    end
  end

  // Registered address phase: the rdata mux uses the address still held by the master
  always_comb begin
    if (!is_reg)            bus_rsp.rdata = bus_rd_word;
    else if (bus_req.addr[2]) bus_rsp.rdata = 32'(rd_ptr);
    else                    bus_rsp.rdata = 32'(wr_ptr);
  end
endmodule
