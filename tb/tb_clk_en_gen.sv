// tb_clk_en_gen: checks the enable periods (2, 8, 24 clocks), that they
// are single-clock pulses and that all three coincide once per CPU period.
module tb_clk_en_gen;
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
    #(100000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic rst, vga_en, ppu_en, cpu_ce;
  clk_en_gen dut (.clk, .rst, .vga_en, .ppu_en, .cpu_ce);
  int n, nv, np, nc, lastv, lastp, lastc;
  initial begin
    rst = 1'b1; repeat (3) @(posedge clk); #1 rst = 1'b0;
    n = 0; nv = 0; np = 0; nc = 0; lastv = -1; lastp = -1; lastc = -1;
    repeat (240) begin
      @(negedge clk);
      if (vga_en) begin if (lastv >= 0) chk(n - lastv == 2, "vga period 2"); lastv = n; nv++; end
      if (ppu_en) begin if (lastp >= 0) chk(n - lastp == 8, "ppu period 8"); lastp = n; np++; end
      if (cpu_ce) begin
        if (lastc >= 0) chk(n - lastc == 24, "cpu period 24");
        chk(ppu_en && vga_en, "cpu_ce coincides with ppu_en and vga_en");
        lastc = n; nc++;
      end
      if (ppu_en) chk(vga_en, "ppu_en coincides with vga_en");
      n++;
    end
    chk(nv == 120 && np == 30 && nc == 10, $sformatf("counts %0d %0d %0d", nv, np, nc));
    finish();
  end
endmodule
