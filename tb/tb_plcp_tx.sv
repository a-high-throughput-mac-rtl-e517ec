// tb_plcp_tx: PLCP Transmit. Streams a single MPDU and an A-MPDU of three
// subframes (of lengths that need 1, 2 and 3 pad bytes) into the FIFO with
// random gaps, then has a PHY model take them, with random and with constant
// TXCONFIRM. Checks the TXVECTOR (PSDU length, MCS, aggregation bit), every
// PSDU byte including the zero padding between subframes, that TXENABLE
// covers exactly 16 + length bytes, the cycle count with constant confirm,
// the ready/empty flags, and that flush discards a partly written PPDU.
`timescale 1ns/1ps
module tb_plcp_tx;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready, tx_go, flush, ppdu_ready, tx_busy, tx_done, empty;
  logic phy_tx_enable, phy_tx_confirm;
  logic [7:0] phy_tx_data;
  logic [6:0] mcs;
  txbyte_t in;
  bus_req_t bq; bus_rsp_t bs;
  plcp_tx dut (.clk, .rst_n, .in_valid, .in, .in_ready, .tx_go, .flush, .mcs, .ppdu_ready,
               .tx_busy, .tx_done, .empty, .phy_tx_enable, .phy_tx_data, .phy_tx_confirm,
               .bus_req(bq), .bus_rsp(bs));

  logic [7:0] psdu_q [$];    // expected PSDU bytes of queued PPDUs
  int lens [$]; bit aggs [$];

  task automatic send(bit agg, int n_sub, int base_len);
    int total = 0;
    for (int s = 0; s < n_sub; s++) begin
      int l = base_len + s;          // lengths base, base+1, ...
      int sub = (agg ? 4 : 0) + l;
      for (int i = 0; i < sub; i++) begin
        logic [7:0] d = 8'($urandom);
        bit ml = (i == sub - 1);
        bit pl = ml && (s == n_sub - 1);
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in = '{data: d, kind: (agg && i < 4) ? K_DELIM : K_BODY, mpdu_last: ml, ppdu_last: pl};
        @(posedge clk); while (!in_ready) @(posedge clk);
        psdu_q.push_back(d); total++;
        if (ml && !pl && agg) while (total % 4 != 0) begin psdu_q.push_back(8'h00); total++; end
      end
    end
    @(negedge clk) in_valid = 0;
    lens.push_back(total); aggs.push_back(agg);
  endtask

  bit rand_conf = 1;
  always @(negedge clk) phy_tx_confirm = rand_conf ? ($urandom_range(0, 4) != 0) : 1'b1;

  task automatic receive(output int cyc, output int bad);
    logic [7:0] v [16];
    int n = 0, len = lens.pop_front();
    bit agg = aggs.pop_front();
    bad = 0;
    @(negedge clk) tx_go = 1;
    @(negedge clk) tx_go = 0;
    cyc = 1;
    while (!tx_done) begin
      if (phy_tx_enable && phy_tx_confirm) begin
        if (n < 16) v[n] = phy_tx_data;
        else if (phy_tx_data != psdu_q.pop_front()) bad++;
        n++;
      end
      @(negedge clk); cyc++;
    end
    check(!phy_tx_enable, "TXENABLE falls after the last byte");
    check(n == 16 + len, $sformatf("16 + %0d bytes sent (%0d)", len, n));
    check({v[2], v[1], v[0]} == 24'(len), "TXVECTOR length");
    check(v[3] == 8'(mcs), "TXVECTOR MCS");
    check(v[4][0] == agg, "TXVECTOR aggregation bit");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, bad;
    logic [31:0] v;
    in_valid = 0; in = '0; tx_go = 0; flush = 0; mcs = 7'd31; bq = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(empty && !ppdu_ready, "empty after reset");
    send(0, 1, 40);
    check(ppdu_ready, "PPDU ready after its last byte");
    send(1, 3, 29);                          // subframes 33, 34, 35 bytes
    receive(cyc, bad);
    check(bad == 0, "single MPDU bytes");
    rand_conf = 0;
    receive(cyc, bad);
    check(bad == 0, "A-MPDU bytes and padding");
    check(lens.size() == 0 && psdu_q.size() == 0, "everything sent");
    // constant confirm: one start cycle, then one byte per cycle:
    // 16 + 33+3 + 34+2 + 35 = 123 bytes
    check(cyc == 1 + 16 + 107, $sformatf("A-MPDU cycle count %0d", cyc));
    check(empty && !ppdu_ready, "empty at the end");
    // flush discards a partial PPDU
    fork
      send(0, 1, 30);
      begin
        wait (psdu_q.size() == 10);
        @(negedge clk) flush = 1;
        @(negedge clk) flush = 0;
      end
    join_any
    disable fork;
    @(negedge clk) in_valid = 0;
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    check(empty && !ppdu_ready, "flush empties the FIFO");
    psdu_q.delete(); lens.delete(); aggs.delete();
    send(0, 1, 12);
    rand_conf = 1;
    receive(cyc, bad);
    check(bad == 0, "frame after flush");
    @(negedge clk) bq = '{valid: 1, we: 0, addr: 17'h0, wdata: 0};
    do @(negedge clk); while (!bs.ready);
    v = bs.rdata; bq = '0;
    check(v == 3, $sformatf("PPDU counter %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
