// ack_gen: ACK Generation block of the MAC hardware.
//
// On `gen` it builds one response control frame and streams it, without FCS,
// into FCS Generation, which appends the FCS. The frames follow IEEE 802.11:
//   ACK, CTS : frame control, duration, RA                      (10 bytes)
//   BlockAck : frame control, duration, RA, TA, BA control,
//              starting sequence control, 64-bit bitmap          (32 bytes)
// The BlockAck is the compressed form (BA control bit 2 set, TID in bits
// 15:12). The duration is the one carried by the frame being answered, less
// SIFS and the response time RESP_US, floored at zero; RESP_US is this
// design's estimate of a control response's air time.
//
// Timing: one byte per cycle while FCS Generation accepts; `busy` is high
// from `gen` until the last byte has been accepted.
// Bus register (read only): 0x0 responses generated.
module ack_gen
  import mac_pkg::*;
#(
  parameter int unsigned RESP_US = 44
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gen,
  input  resp_e       kind,
  input  logic [47:0] ra,          // transmitter of the frame being answered
  input  logic [47:0] ta,          // own address
  input  logic [15:0] dur_in,      // duration field of the frame being answered
  input  logic [3:0]  tid,
  input  logic [11:0] ssn,         // BlockAck starting sequence number
  input  logic [63:0] bitmap,
  output logic        busy,
  output logic        out_valid,
  output txbyte_t     out,
  input  logic        out_ready,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp
);
  logic [255:0] frame;
  logic [5:0]   len, idx;
  logic [31:0]  resp_cnt;
  logic         run;

  assign busy = run || out_valid;

  function automatic logic [15:0] resp_dur(logic [15:0] d);
    if (d[15]) return 16'd0;                          // not a duration value
    if (d > 16'(SIFS_US + RESP_US)) return d - 16'(SIFS_US + RESP_US);
    return 16'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '0; len <= '0; idx <= '0; run <= 1'b0;
      out_valid <= 1'b0; out <= '0; resp_cnt <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!run) begin
        if (gen && kind != RESP_NONE) begin
          run  <= 1'b1;
          idx  <= '0;
          unique case (kind)
            RESP_ACK: begin
              frame <= {176'h0, ra, resp_dur(dur_in), fc_word(FT_CTRL, ST_ACK)};
              len   <= 6'd10;
            end
            RESP_CTS: begin
              frame <= {176'h0, ra, resp_dur(dur_in), fc_word(FT_CTRL, ST_CTS)};
              len   <= 6'd10;
            end
            default: begin
              frame <= {32'h0, bitmap, ssn, 4'h0, tid, 9'h0, 3'b100, ta, ra,
                        resp_dur(dur_in), fc_word(FT_CTRL, ST_BA)};
              len   <= 6'd32;
            end
          endcase
        end
      end else if (!out_valid || out_ready) begin
        out_valid     <= 1'b1;
        out.data      <= frame[8*idx[4:0] +: 8];
        out.kind      <= K_HDR;
        out.mpdu_last <= (idx == len - 1'b1);
        out.ppdu_last <= (idx == len - 1'b1);
        idx           <= idx + 1'b1;
        if (idx == len - 1'b1) begin
          run      <= 1'b0;
          resp_cnt <= resp_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rsp <= '0;
    else begin
      bus_rsp.ready <= bus_req.valid && !bus_rsp.ready;
      bus_rsp.rdata <= resp_cnt;
    end
  end
endmodule
