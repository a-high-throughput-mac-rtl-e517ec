// tb_plcp_rx: PLCP Receive. A PHY model sends PPDUs byte by byte with
// random gaps in RXINDICATION: a single MPDU, an A-MPDU of four subframes
// where the delimiter of the second is corrupted, and a PPDU cut short in the
// middle of an MPDU. Checks the MPDUs passed on (bytes and first/last flags,
// one cycle after each PHY byte), that the corrupted subframe is skipped and
// counted while the following ones are found, the abort of the cut MPDU,
// rx_agg, the PPDU-end pulse, and the interrupt and its clearing.
`timescale 1ns/1ps
module tb_plcp_rx;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en, ind, out_valid, mpdu_abort, ppdu_end, rx_agg, intr;
  logic [7:0] data;
  rxbyte_t out;
  bus_req_t bq; bus_rsp_t bs;
  plcp_rx dut (.clk, .rst_n, .phy_rx_enable(en), .phy_rx_indication(ind), .phy_rx_data(data),
               .out_valid, .out, .mpdu_abort, .ppdu_end, .rx_agg, .intr, .bus_req(bq), .bus_rsp(bs));

  rxbyte_t exp_q [$];
  int got = 0, bad = 0, aborts = 0, ends = 0, late = 0;
  logic byte_q;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      got++;
      if (!byte_q) late++;                       // must follow a PHY byte by one cycle
      if (exp_q.size() == 0 || out != exp_q.pop_front()) bad++;
    end
    if (mpdu_abort) aborts++;
    if (ppdu_end) ends++;
    byte_q <= en && ind;
  end

  logic [7:0] psdu [$];
  // one MPDU of n bytes, expected on the output when `expect_out`
  task automatic mpdu(int n, bit agg, bit expect_out, bit bad_delim);
    if (agg) begin
      logic [15:0] v = {12'(n), 4'h0};
      psdu.push_back(v[7:0]); psdu.push_back(v[15:8]);
      psdu.push_back(crc8_of(v) ^ (bad_delim ? 8'h01 : 8'h00)); psdu.push_back(8'h4E);
    end
    for (int i = 0; i < n; i++) begin
      logic [7:0] d = 8'($urandom);
      psdu.push_back(d);
      if (expect_out) exp_q.push_back('{data: d, first: (i == 0), last: (i == n - 1)});
    end
    if (agg) while (psdu.size() % 4 != 0) psdu.push_back(8'h00);
  endtask

  // send the PPDU; `cut` bytes are dropped from its end
  task automatic ppdu(bit agg, int cut);
    logic [7:0] vec [16];
    int len = psdu.size();
    foreach (vec[i]) vec[i] = 0;
    {vec[2], vec[1], vec[0]} = 24'(len);
    vec[4][0] = agg;
    @(negedge clk) en = 1;
    for (int i = 0; i < 16 + len - cut; i++) begin
      while ($urandom_range(0, 3) == 0) begin ind = 0; @(negedge clk); end
      ind = 1; data = (i < 16) ? vec[i] : psdu[i - 16];
      @(negedge clk);
    end
    ind = 0;
    repeat (3) @(negedge clk);
    en = 0;
    repeat (3) @(negedge clk);
    psdu.delete();
  endtask

  task automatic rd(logic [16:0] a, output logic [31:0] v);
    @(negedge clk) bq = '{valid: 1, we: 0, addr: a, wdata: 0};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    en = 0; ind = 0; data = 0; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // single MPDU
    mpdu(53, 0, 1, 0);
    ppdu(0, 0);
    check(ends == 1 && intr, "PPDU end and interrupt");
    check(!rx_agg, "single MPDU is not an A-MPDU");
    @(negedge clk) bq = '{valid: 1, we: 1, addr: 17'h8, wdata: 1};
    do @(negedge clk); while (!bs.ready);
    bq = '0;
    check(!intr, "interrupt cleared");
    // A-MPDU: 4 subframes, second delimiter corrupted
    mpdu(41, 1, 1, 0);
    mpdu(66, 1, 0, 1);
    mpdu(30, 1, 1, 0);
    mpdu(102, 1, 1, 0);
    ppdu(1, 0);
    check(rx_agg, "A-MPDU flagged");
    rd(17'h4, v);
    check(v >= 1, $sformatf("bad delimiters counted (%0d)", v));
    check(aborts == 0, "no abort so far");
    // PPDU cut 10 bytes before the end of its second MPDU
    mpdu(20, 1, 1, 0);
    mpdu(50, 1, 0, 0);
    begin
      // expected: bytes of the second MPDU up to the cut, then abort
      logic [7:0] keep [$];
      keep = psdu;
      for (int i = 28; i < keep.size() - 12; i++)
        exp_q.push_back('{data: keep[i], first: (i == 28), last: 0});
    end
    ppdu(1, 12);
    check(aborts == 1, $sformatf("cut MPDU aborted (%0d)", aborts));
    check(exp_q.size() == 0, $sformatf("all expected bytes seen (%0d left)", exp_q.size()));
    check(bad == 0, $sformatf("bytes and flags (%0d bad of %0d)", bad, got));
    check(late == 0, "one-cycle latency");
    rd(17'h0, v);
    check(v == 3 && ends == 3, $sformatf("PPDU counter %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
