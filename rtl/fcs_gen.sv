// fcs_gen: FCS Generation block of the MAC hardware.
//
// Passes the byte stream from Header Generation (or from ACK Generation,
// selected in the top) through to PLCP Transmit and appends the 4-byte
// IEEE 802.11 frame check sequence (CRC-32, preset all ones, inverted result,
// sent least significant byte first) after the last byte of every MPDU.
// Delimiter bytes pass through without entering the CRC. The MPDU/PPDU end
// flags move from the last input byte to the last FCS byte.
//
// Timing: a single registered stage; one byte per cycle while the output is
// ready, and four extra cycles per MPDU in which the input is held off.
// Bus register (read only): 0x0 number of FCS fields appended.
module fcs_gen
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  txbyte_t  in,
  output logic     in_ready,
  output logic     out_valid,
  output txbyte_t  out,
  input  logic     out_ready,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp
);
  logic [31:0] crc;
  logic [31:0] fcs;          // inverted CRC being sent
  logic [2:0]  fcs_left;     // FCS bytes still to send
  logic        end_ppdu;
  logic [31:0] fcs_cnt;

  wire can_load = !out_valid || out_ready;
  assign in_ready = can_load && (fcs_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc       <= '1;
      fcs       <= '0;
      fcs_left  <= '0;
      end_ppdu  <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
      fcs_cnt   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fcs_left != 0) begin
        if (can_load) begin
          out_valid     <= 1'b1;
          out.data      <= fcs[7:0];
          out.kind      <= K_FCS;
          out.mpdu_last <= (fcs_left == 3'd1);
          out.ppdu_last <= (fcs_left == 3'd1) && end_ppdu;
          fcs           <= fcs >> 8;
          fcs_left      <= fcs_left - 1'b1;
          if (fcs_left == 3'd1) fcs_cnt <= fcs_cnt + 1'b1;
        end
      end else if (in_valid && in_ready) begin
        out_valid     <= 1'b1;
        out.data      <= in.data;
        out.kind      <= in.kind;
        out.mpdu_last <= 1'b0;
        out.ppdu_last <= 1'b0;
        if (in.kind != K_DELIM) begin
          if (in.mpdu_last) begin
            fcs      <= ~crc32_byte(crc, in.data);
            fcs_left <= 3'd4;
            end_ppdu <= in.ppdu_last;
            crc      <= '1;
          end else begin
            crc <= crc32_byte(crc, in.data);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rsp <= '0;
    else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      bus_rsp.rdata <= fcs_cnt;
    end
  end
endmodule
