// tb_cpu_bus: checks address decoding across the map (with mirrors),
// master selection between CPU and DMA, and the registered read mux.
module tb_cpu_bus;
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
  logic        rst, bus_ce, cpu_we, dma_active, dma_we, m_we, mem_cs, ppu_cs, dma_cs;
  logic [15:0] cpu_addr, dma_addr, m_addr;
  logic [7:0]  cpu_wdata, dma_wdata, m_wdata, mem_rdata, ppu_rdata, rdata;
  cpu_bus dut (.*);
  initial begin
    rst = 1; bus_ce = 0; cpu_we = 0; dma_active = 0; dma_we = 0; cpu_addr = 0; dma_addr = 0;
    cpu_wdata = 0; dma_wdata = 0; mem_rdata = 8'hA5; ppu_rdata = 8'h3C;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 400; i++) begin
      logic [15:0] a;
      bit e_mem, e_ppu, e_dma;
      a = (i < 8) ? 16'(16'h4010 + i) : 16'($urandom);
      cpu_addr = a; #1;
      e_mem = a < 16'h2000 || a >= 16'h8000;
      e_ppu = a >= 16'h2000 && a < 16'h4000;
      e_dma = a == 16'h4014;
      chk(mem_cs == e_mem && ppu_cs == e_ppu && dma_cs == e_dma, $sformatf("decode %h", a));
      chk(m_addr == a, "cpu master address");
      @(negedge clk); bus_ce = 1; @(negedge clk); bus_ce = 0;
      chk(rdata == (e_mem ? 8'hA5 : e_ppu ? 8'h3C : 8'h00), $sformatf("read mux %h", a));
    end
    cpu_addr = 16'h5000; @(negedge clk); bus_ce = 1; @(negedge clk); bus_ce = 0;
    chk(rdata == 8'h00, "unmapped read");
    mem_rdata = 8'hA6;
    dma_active = 1; dma_addr = 16'h2004; dma_we = 1; dma_wdata = 8'h77; cpu_addr = 16'h0000; cpu_we = 0; #1;
    chk(m_addr == 16'h2004 && m_we && m_wdata == 8'h77 && ppu_cs && !mem_cs, "dma master");
    // writes do not change the read source
    @(negedge clk); bus_ce = 1; @(negedge clk); bus_ce = 0;
    chk(rdata == 8'h00, "source kept across write");
    finish();
  end
endmodule
