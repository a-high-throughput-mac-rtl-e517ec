// fcs_check: FCS Check block of the MAC hardware.
//
// Runs the IEEE 802.11 CRC-32 over every byte of each MPDU from PLCP Receive,
// its 4-byte FCS included; the MPDU is good when the register then holds the
// CRC-32 residue 0xDEBB20E3. The bytes are passed on to Header Check one
// cycle later, unchanged, and `fcs_ok` is valid with the last byte. `abort`
// is passed on with the same delay.
// Bus registers (read only): 0x0 good MPDUs, 0x4 MPDUs with a bad FCS.
module fcs_check
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  rxbyte_t  in,
  input  logic     in_abort,
  output logic     out_valid,
  output rxbyte_t  out,
  output logic     fcs_ok,
  output logic     out_abort,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp
);
  logic [31:0] crc, good_cnt, bad_cnt;
  logic [31:0] crc_next;

  assign crc_next = crc32_byte(in.first ? 32'hFFFF_FFFF : crc, in.data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc <= '1; out_valid <= 1'b0; out <= '0; fcs_ok <= 1'b0; out_abort <= 1'b0;
      good_cnt <= '0; bad_cnt <= '0;
    end else begin
      out_valid <= in_valid;
      out_abort <= in_abort;
      if (in_valid) begin
        out    <= in;
        crc    <= crc_next;
        fcs_ok <= in.last && (crc_next == CRC32_RESIDUE);
        if (in.last) begin
          if (crc_next == CRC32_RESIDUE) good_cnt <= good_cnt + 1'b1;
          else                           bad_cnt  <= bad_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rsp <= '0;
    else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      bus_rsp.rdata <= bus_req.addr[2] ? bad_cnt : good_cnt;
    end
  end
endmodule
