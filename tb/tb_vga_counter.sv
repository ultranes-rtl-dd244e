// tb_vga_counter: runs with vga_en every other clock (25 of 50 MHz) and
// checks the frame length of 357,368 VGA cycles (four PPU frames of
// 89,342 cycles), 524 hsync pulses of 96 cycles per frame, a 2-line
// vsync, 512x480 active pixels, the row/col mapping and the resync.
module tb_vga_counter;
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
    #(20000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic rst, vga_en, resync, active, hsync_n, vsync_n;
  logic [9:0] hcount, vcount;
  logic [7:0] row, col;
  vga_counter dut (.*);
  int n, nact, nhs, hsw, vsw, frame_len, start;
  logic hs_prev;
  always @(posedge clk) if (!rst) vga_en <= !vga_en;
  initial begin
    rst = 1; resync = 0; vga_en = 0;
    repeat (2) @(negedge clk); rst = 0;
    // wait for frame start (0,0)
    while (!(hcount == 0 && vcount == 0 && vga_en)) @(negedge clk);
    n = 0; nact = 0; nhs = 0; hsw = 0; vsw = 0; hs_prev = 1; frame_len = -1;
    forever begin
      if (vga_en) begin
        if (n > 0 && hcount == 0 && vcount == 0) begin frame_len = n; break; end
        if (active) begin
          nact++;
          chk(col == 8'(hcount >> 1) && row == 8'((vcount - 10'd2) >> 1), "row/col");
        end
        if (!hsync_n) hsw++;
        if (!hsync_n && hs_prev) nhs++;
        if (!vsync_n) vsw++;
        hs_prev = hsync_n;
        n++;
      end
      @(negedge clk);
    end
    chk(frame_len == 357368, $sformatf("frame length %0d", frame_len));
    chk(nact == 512 * 480, $sformatf("active %0d", nact));
    chk(nhs == 524 && hsw == 524 * 96, $sformatf("hsync %0d %0d", nhs, hsw));
    chk(vsw == 2 * 682, $sformatf("vsync %0d", vsw));
    // resync in the middle of a frame
    repeat (1001) @(negedge clk);
    while (!vga_en) @(negedge clk);
    resync = 1; @(negedge clk); resync = 0;
    chk(hcount == 1 && vcount == 0, "resync position");
    finish();
  end
endmodule
