// tb_tx_buffer: Tx Buffer. Fills the whole RAM with random words over the
// bus, reads them back over the bus and through the Header Generation port
// (checking its one-cycle read latency), and checks the write pointer
// register, the read-only read pointer register and the one-cycle bus
// response.
`timescale 1ns/1ps
module tb_tx_buffer;
  import mac_pkg::*;
  localparam int DEPTH = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_req_t bq; bus_rsp_t bs;
  logic [15:0] rd_ptr, wr_ptr;
  logic [31:0] rd_data;
  tx_buffer dut (.clk, .rst_n, .bus_req(bq), .bus_rsp(bs), .rd_ptr, .rd_data, .wr_ptr);

  logic [31:0] model [DEPTH];

  task automatic acc(bit we, logic [16:0] a, logic [31:0] d, output logic [31:0] v, output int cyc);
    @(negedge clk) bq = '{valid: 1, we: we, addr: a, wdata: d};
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v; int cyc, bad = 0, badc = 0;
    bq = '0; rd_ptr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      acc(1, 17'(4 * i), model[i], v, cyc);
      if (cyc != 1) badc++;
    end
    check(badc == 0, "bus writes answered after one cycle");
    for (int k = 0; k < 64; k++) begin
      int i;
      i = $urandom_range(0, DEPTH - 1);
      acc(0, 17'(4 * i), 0, v, cyc);
      if (v != model[i] || cyc != 1) bad++;
    end
    check(bad == 0, "bus read-back");
    // Header Generation port: address at a negedge, data after the next posedge
    bad = 0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      @(negedge clk) rd_ptr = 16'(i);
      @(negedge clk) if (rd_data != model[i % DEPTH]) bad++;
    end
    check(bad == 0, "read port data, one-cycle latency, pointer taken modulo size");
    acc(1, 17'h1000, 32'd300, v, cyc);
    check(wr_ptr == 16'd300, "write pointer register drives wr_ptr");
    acc(0, 17'h1000, 0, v, cyc);
    check(v == 300, "write pointer read-back");
    @(negedge clk) rd_ptr = 16'd123;
    acc(0, 17'h1004, 0, v, cyc);
    check(v == 123, "read pointer register");
    acc(1, 17'h1004, 32'd7, v, cyc);
    check(wr_ptr == 16'd300, "read pointer register is read only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
