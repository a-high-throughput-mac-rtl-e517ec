// mac_pkg: types, constants and CRC helpers shared by the IEEE 802.11n MAC
// hardware blocks.
//
// Byte streams: the transmit chain (Header Generation -> FCS Generation ->
// PLCP Transmit) and the receive chain (PLCP Receive -> FCS Check -> Header
// Check) move one byte per transfer over an 8-bit data path, each byte tagged
// with where it lies in the MPDU / PPDU.
//
// Register bus: every block has its own bus interface behind the bus router.
// A master drives bus_req_t and holds `valid` until the slave returns `ready`
// for one cycle; read data is valid in that cycle.
//
// Frame-control codes and the CRC-32 frame check sequence follow IEEE 802.11.
// The CRC-8 of the A-MPDU delimiter uses the 802.11n polynomial
// x^8+x^2+x+1 with an all-ones preset and an inverted result; the order in
// which the 16 header bits are fed in is this design's choice.
package mac_pkg;

  // ---------------------------------------------------------------- timing
  localparam int unsigned SIFS_US = 16;   // short inter-frame space
  localparam int unsigned SLOT_US = 9;    // OFDM slot time

  // ---------------------------------------------------------------- frames
  localparam logic [1:0] FT_MGMT = 2'b00;
  localparam logic [1:0] FT_CTRL = 2'b01;
  localparam logic [1:0] FT_DATA = 2'b10;

  localparam logic [3:0] ST_BAR = 4'b1000;
  localparam logic [3:0] ST_BA  = 4'b1001;
  localparam logic [3:0] ST_RTS = 4'b1011;
  localparam logic [3:0] ST_CTS = 4'b1100;
  localparam logic [3:0] ST_ACK = 4'b1101;

  localparam logic [7:0] DELIM_SIGNATURE = 8'h4E;
  localparam int unsigned TXVECTOR_BYTES = 16;

  // Frame control, first octet: {subtype, type, protocol version}
  function automatic logic [15:0] fc_word(logic [1:0] ftype, logic [3:0] subtype);
    return {8'h00, subtype, ftype, 2'b00};
  endfunction

  // Position of a transmit byte inside an MPDU subframe
  typedef enum logic [1:0] {
    K_DELIM = 2'd0,   // A-MPDU delimiter, not covered by the FCS
    K_HDR   = 2'd1,   // MAC header
    K_BODY  = 2'd2,   // frame body (MSDU)
    K_FCS   = 2'd3    // frame check sequence
  } kind_e;

  typedef struct packed {
    logic [7:0] data;
    kind_e      kind;
    logic       mpdu_last;   // last byte of this MPDU
    logic       ppdu_last;   // last byte of the whole PSDU
  } txbyte_t;

  typedef struct packed {
    logic [7:0] data;
    logic       first;       // first byte of an MPDU
    logic       last;        // last byte of an MPDU
  } rxbyte_t;

  // Response a received frame asks for
  typedef enum logic [1:0] {
    RESP_NONE = 2'd0,
    RESP_ACK  = 2'd1,
    RESP_CTS  = 2'd2,
    RESP_BA   = 2'd3
  } resp_e;

  // Frame a received MPDU reports to the Protocol Manager
  typedef enum logic [2:0] {
    RX_OTHER = 3'd0,
    RX_CTS   = 3'd1,
    RX_ACK   = 3'd2,
    RX_BA    = 3'd3,
    RX_RTS   = 3'd4,
    RX_DATA  = 3'd5,
    RX_BAR   = 3'd6
  } rxkind_e;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [16:0] addr;     // byte address inside the MAC hardware
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ready;
    logic [31:0] rdata;
  } bus_rsp_t;

  localparam int unsigned BUS_PORTS = 11;

  // ---------------------------------------------------------------- CRCs
  // One byte of the reflected CRC-32 (polynomial 0x04C11DB7), LSB first.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Register value left after running a correct MPDU, FCS included.
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

  // CRC-8 of the delimiter: bits 0..15 of {length, reserved}, bit 0 first.
  function automatic logic [7:0] delim_crc8(logic [15:0] bits16);
    logic [7:0] c;
    logic       fb;
    c = 8'hFF;
    for (int i = 0; i < 16; i++) begin
      fb = c[7] ^ bits16[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return ~c;
  endfunction

endpackage
