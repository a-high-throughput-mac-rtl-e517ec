// tb_rx_buffer: Rx Buffer. Writes random bytes at random byte addresses
// through the Header Check port and reads the words back over the bus,
// checking every word for the little-endian byte packing, that bus writes do
// not change the RAM, the one-cycle bus response, and that a read in the same
// cycle as a byte write to that word returns the word from before the write.
`timescale 1ns/1ps
module tb_rx_buffer;
  import mac_pkg::*;
  localparam int DEPTH = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_req_t bq; bus_rsp_t bs;
  logic wr_en; logic [12:0] wr_addr; logic [7:0] wr_data;
  rx_buffer dut (.clk, .rst_n, .bus_req(bq), .bus_rsp(bs), .wr_en, .wr_addr, .wr_data);

  logic [7:0] model [4 * DEPTH];

  task automatic rd(logic [16:0] a, output logic [31:0] v, output int cyc);
    @(negedge clk) bq = '{valid: 1, we: 0, addr: a, wdata: 0};
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!bs.ready);
    v = bs.rdata; bq = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v; int cyc;
    bq = '0; wr_en = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 4 * DEPTH; i++) begin       // fill in order
      model[i] = 8'($urandom);
      @(negedge clk) begin wr_en = 1; wr_addr = 13'(i); wr_data = model[i]; end
    end
    for (int k = 0; k < 3000; k++) begin            // then random overwrites
      int i;
      i = $urandom_range(0, 4 * DEPTH - 1);
      model[i] = 8'($urandom);
      @(negedge clk) begin wr_en = 1; wr_addr = 13'(i); wr_data = model[i]; end
    end
    @(negedge clk) wr_en = 0;
    // a bus write must be ignored
    @(negedge clk) bq = '{valid: 1, we: 1, addr: 17'h8, wdata: 32'hDEADBEEF};
    do @(negedge clk); while (!bs.ready);
    bq = '0;
    for (int w = 0; w < DEPTH; w++) begin
      rd(17'(4 * w), v, cyc);
      check(v == {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]},
            $sformatf("word %0d = %h, little-endian packing", w, v));
      check(cyc == 1, $sformatf("bus read of word %0d answered after %0d cycles", w, cyc));
    end
    // read and byte write to the same word in one cycle: old data is read
    for (int k = 0; k < 50; k++) begin
      int w, b;
      logic [31:0] old;
      w = $urandom_range(0, DEPTH - 1);
      b = $urandom_range(0, 3);
      old = {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]};
      model[4*w+b] = 8'($urandom);
      @(negedge clk) begin
        bq = '{valid: 1, we: 0, addr: 17'(4 * w), wdata: 0};
        wr_en = 1; wr_addr = 13'(4 * w + b); wr_data = model[4*w+b];
      end
      @(negedge clk) begin wr_en = 0; bq = '0; end
      check(bs.ready && bs.rdata == old, $sformatf("read during write of word %0d gives %h, exp %h", w, bs.rdata, old));
      rd(17'(4 * w), v, cyc);
      check(v == {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]}, $sformatf("word %0d after the write", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
