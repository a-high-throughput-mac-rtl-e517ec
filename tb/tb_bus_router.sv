// tb_bus_router: MAC HW bus router. Eleven slave models answer after a
// random number of cycles with read data that identifies them. Random
// accesses check that only the addressed slave sees `valid`, that the
// request fields reach it unchanged, that the right response returns, and
// that addresses beyond the last window are answered with 0 in one cycle.
`timescale 1ns/1ps
module tb_bus_router;
  import mac_pkg::*;
  localparam int N = BUS_PORTS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_req_t m_req; bus_rsp_t m_rsp;
  bus_req_t s_req [N]; bus_rsp_t s_rsp [N];
  bus_router dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  int wrong_valid = 0, wrong_field = 0;
  logic [16:0] exp_addr; logic [31:0] exp_wdata; logic exp_we;

  for (genvar g = 0; g < N; g++) begin : g_slave
    int wait_n;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin s_rsp[g] <= '0; wait_n <= 0; end
      else begin
        s_rsp[g].ready <= 1'b0;
        s_rsp[g].rdata <= 32'hA000_0000 | 32'(g << 20) | 32'(s_req[g].addr);
        if (s_req[g].valid && !s_rsp[g].ready) begin
          if (s_req[g].addr[16:13] != 4'(g)) wrong_valid++;
          if (s_req[g].addr != exp_addr || s_req[g].wdata != exp_wdata || s_req[g].we != exp_we)
            wrong_field++;
          if (wait_n == 0) begin s_rsp[g].ready <= 1'b1; wait_n <= $urandom_range(0, 3); end
          else wait_n <= wait_n - 1;
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bad = 0, miss_bad = 0, hits [N];
    m_req = '0; exp_addr = 0; exp_wdata = 0; exp_we = 0;
    foreach (hits[i]) hits[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      int sel, cyc;
      sel = $urandom_range(0, 15);
      cyc = 0;
      exp_addr  = {4'(sel), 13'($urandom)};
      exp_wdata = $urandom;
      exp_we    = 1'($urandom);
      @(negedge clk) m_req = '{valid: 1, we: exp_we, addr: exp_addr, wdata: exp_wdata};
      do begin @(negedge clk); cyc++; end while (!m_rsp.ready && cyc < 20);
      if (sel < N) begin
        hits[sel]++;
        if (!m_rsp.ready || m_rsp.rdata != (32'hA000_0000 | 32'(sel << 20) | 32'(exp_addr))) bad++;
      end else if (!m_rsp.ready || m_rsp.rdata != 0 || cyc != 1) miss_bad++;
      m_req = '0;
    end
    check(bad == 0, $sformatf("responses from the addressed slave (%0d bad)", bad));
    check(miss_bad == 0, "unmapped windows answered with 0 after one cycle");
    check(wrong_valid == 0, "valid reaches only the addressed slave");
    check(wrong_field == 0, "request fields passed unchanged");
    for (int i = 0; i < N; i++) check(hits[i] > 0, $sformatf("window %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
