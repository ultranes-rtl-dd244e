// tb_oam_dma: a $4014 write of page $02 must produce 256 read/write pairs
// ($0200+i then $2004 carrying the byte just read), 512 bus cycles, with
// active high throughout and low afterwards.
module tb_oam_dma;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic        rst, bus_ce, start, active, we;
  logic [7:0]  page, rdata, wdata;
  logic [15:0] addr;
  oam_dma dut (.*);
  int cyc, writes;
  logic [15:0] last_raddr;
  bit was_read;
  initial begin
    rst = 1; bus_ce = 0; start = 0; page = 0; rdata = 0;
    @(negedge clk); rst = 0;
    @(negedge clk); bus_ce = 1; start = 1; page = 8'h02;
    @(negedge clk); bus_ce = 0; start = 0;
    chk(active, "active after start");
    cyc = 0; writes = 0;
    while (active && cyc < 2000) begin
      @(negedge clk); bus_ce = 1;
      was_read = !we;
      if (!we) begin
        chk(addr == {8'h02, 8'(writes)}, $sformatf("read addr %h", addr));
        last_raddr = addr;
      end else begin
        chk(addr == 16'h2004 && wdata == 8'(last_raddr ^ 16'h00A7), "write $2004 with read byte");
        writes++;
      end
      @(negedge clk); bus_ce = 0; cyc++;
      if (was_read) rdata = 8'(last_raddr ^ 16'h00A7);   // bus returns the byte after the read cycle
      repeat (2) @(negedge clk);
    end
    chk(cyc == 512, $sformatf("512 bus cycles, got %0d", cyc));
    chk(writes == 256, "256 writes");
    chk(!active, "inactive at end");
    finish();
  end
endmodule
