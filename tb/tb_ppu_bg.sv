// tb_ppu_bg: feeds a sequence of tiles into the tile renderer the way the
// fetch sequencer does (8 shifts per tile, load on the 8th) and compares
// every pixel with one computed directly from the tile list, for all fine
// X values, plus left-column clipping and the enable.
module tb_ppu_bg;
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
    #(5000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic rst, shift_tk, load_tk, bg_en, bg_left;
  logic [7:0] tile_lo, tile_hi, x;
  logic [1:0] tile_at, pixel, pal;
  logic [2:0] fine_x;
  ppu_bg dut (.*);
  logic [7:0] lo [40], hi [40];
  logic [1:0] at [40];
  task automatic tick(input bit ld, input int t);
    @(negedge clk); shift_tk = 1; load_tk = ld;
    if (ld) begin tile_lo = lo[t]; tile_hi = hi[t]; tile_at = at[t]; end
    @(negedge clk); shift_tk = 0; load_tk = 0;
  endtask
  initial begin
    rst = 1; shift_tk = 0; load_tk = 0; bg_en = 1; bg_left = 1; x = 0;
    tile_lo = 0; tile_hi = 0; tile_at = 0; fine_x = 0;
    for (int t = 0; t < 40; t++) begin lo[t] = 8'($urandom); hi[t] = 8'($urandom); at[t] = 2'($urandom); end
    @(negedge clk); rst = 0;
    for (int f = 0; f < 8; f++) begin
      fine_x = 3'(f);
      // prefetch two tiles: 16 shift ticks, loads at ticks 8 and 16
      for (int k = 1; k <= 16; k++) tick(k % 8 == 0, k / 8 - 1);
      // 256 pixels, tile t+2 loaded at the 8th tick of each group
      for (int p = 0; p < 256; p++) begin
        int px, t, b;
        x = 8'(p);
        bg_left = (f != 3);
        #1;
        px = p + f; t = px / 8; b = 7 - px % 8;
        if (!bg_left && p < 8) chk(pixel == 0, "left clip");
        else chk(pixel == {hi[t][b], lo[t][b]} && (pixel == 0 || pal == at[t]),
                 $sformatf("fx %0d x %0d", f, p));
        tick(p % 8 == 7, p / 8 + 2);
      end
    end
    bg_en = 0; #1 chk(pixel == 0, "disabled");
    finish();
  end
endmodule
