// tb_fcs_gen: FCS Generation. Streams an A-MPDU of two MPDUs (delimiter,
// header and body bytes) and a single MPDU through the block with random
// output stalls; checks that every byte passes unchanged, that a 4-byte FCS
// equal to the reference CRC-32 follows each MPDU, that delimiters do not
// enter the CRC, the end flags, and the known CRC-32 check value.
`timescale 1ns/1ps
module tb_fcs_gen;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready, out_valid, out_ready;
  txbyte_t in, out;
  bus_req_t bq; bus_rsp_t bs;
  fcs_gen dut (.clk, .rst_n, .in_valid, .in, .in_ready, .out_valid, .out, .out_ready,
               .bus_req(bq), .bus_rsp(bs));

  txbyte_t sent [$], got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out);

  task automatic send(txbyte_t b);
    in = b; in_valid = 1;
    sent.push_back(b);
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] m [];
    int lens [3] = '{30, 57, 10};
    int gi, si;
    logic [7:0] c9 [] = '{8'h31,8'h32,8'h33,8'h34,8'h35,8'h36,8'h37,8'h38,8'h39};
    check(fcs_of(c9, 9) == 32'hCBF4_3926,
          "reference CRC-32 of \"123456789\" is CBF43926");
    in_valid = 0; in = '0; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      m = new[lens[f]];
      if (f < 2) for (int k = 0; k < 4; k++)
        send('{data: 8'(8'hA0 + k), kind: K_DELIM, mpdu_last: 0, ppdu_last: 0});
      for (int k = 0; k < lens[f]; k++) begin
        m[k] = 8'($urandom);
        send('{data: m[k], kind: (k < 24 ? K_HDR : K_BODY), mpdu_last: (k == lens[f]-1),
               ppdu_last: (k == lens[f]-1) && (f != 0)});
      end
    end
    repeat (50) @(posedge clk);
    gi = 0; si = 0;
    for (int f = 0; f < 3; f++) begin
      logic [7:0] body [];
      logic [31:0] fcs;
      body = new[lens[f]];
      if (f < 2) for (int k = 0; k < 4; k++) begin
        check(got[gi].kind == K_DELIM && got[gi].data == 8'(8'hA0 + k), "delimiter byte passes");
        gi++; si++;
      end
      for (int k = 0; k < lens[f]; k++) begin
        body[k] = sent[si].data;
        check(got[gi].data == sent[si].data && got[gi].kind == sent[si].kind, "MPDU byte passes unchanged");
        check(!got[gi].mpdu_last && got[gi].kind != K_FCS, "MPDU byte passes without end flag");
        gi++; si++;
      end
      fcs = fcs_of(body, lens[f]);
      for (int k = 0; k < 4; k++) begin
        check(got[gi].kind == K_FCS && got[gi].data == fcs[8*k +: 8],
              $sformatf("MPDU %0d FCS byte %0d = %h (exp %h)", f, k, got[gi].data, fcs[8*k +: 8]));
        check(got[gi].mpdu_last == (k == 3) && got[gi].ppdu_last == ((k == 3) && f != 0), "FCS end flags");
        gi++;
      end
    end
    check(got.size() == gi, "no extra bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // random output stalls
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
endmodule
