// tb_ppu_sprite: runs the sprite unit over 40 scanlines with the line/
// cycle counters and a pattern memory modelled here, in 8x8 and in 8x16
// mode, with random flips, palettes and priorities, nine sprites on one
// band of lines (to force the 8-per-line limit and the overflow flag) and
// a sprite 0. Every pixel of lines 1-39 is compared with a reference that
// selects the first eight covering sprites in OAM order and draws them
// straight from the pattern memory.
module tb_ppu_sprite;
  import nes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #(50000000);
    failures++;
    $display("watchdog expired");
    finish();
  end

  logic rst, ppu_en, rendering, pixel_tk, oam_we, behind, zero_opaque, ovf_tk;
  logic [8:0] scanline, cycle;
  logic [2:0] phase;
  ppuctrl_t ctrl; ppumask_t mask;
  logic [7:0] rdata, oam_addr, oam_wdata, oam_rdata, x;
  logic [13:0] spr_addr;
  logic [1:0] pixel, pal;
  ppu_sprite dut (.*);

  logic [7:0] chr [8192];
  logic [7:0] oam_m [256];
  always_ff @(posedge clk) rdata <= chr[spr_addr[12:0]];

  always_comb begin
    phase     = 3'(cycle - 9'd1);
    rendering = scanline < 240 || scanline == 261;
    pixel_tk  = ppu_en && scanline < 240 && cycle >= 1 && cycle <= 256;
    x         = 8'(cycle - 9'd1);
  end

  // reference: {behind, palette, pixel value, opaque}
  function automatic logic [7:0] ref_full(input int line, input int px, input bit h16);
    int sel [8]; int cnt, h, row, col, addr, y, t;
    logic [1:0] p;
    h = h16 ? 16 : 8; cnt = 0;
    for (int n = 0; n < 64; n++) begin
      y = int'(oam_m[4*n]);
      if (line - 1 - y >= 0 && line - 1 - y < h && cnt < 8) begin sel[cnt] = n; cnt++; end
    end
    for (int k = 0; k < cnt; k++) begin
      int n; n = sel[k];
      col = px - int'(oam_m[4*n+3]);
      if (col >= 0 && col < 8) begin
        row = line - 1 - int'(oam_m[4*n]);
        if (oam_m[4*n+2][7]) row = h - 1 - row;
        if (oam_m[4*n+2][6]) col = 7 - col;
        t = int'(oam_m[4*n+1]);
        if (h16) addr = (t & 1) * 4096 + (t & 254) * 16 + (row >= 8 ? 16 : 0) + (row & 7);
        else     addr = (ctrl.spr_tbl ? 4096 : 0) + t * 16 + row;
        p = {chr[addr + 8][7 - col], chr[addr][7 - col]};
        if (p != 0) return {2'b00, oam_m[4*n+2][5], oam_m[4*n+2][1:0], p, 1'b1};
      end
    end
    return 8'd0;
  endfunction

  function automatic int covering(input int line, input bit h16);
    int c; c = 0;
    for (int n = 0; n < 64; n++)
      if (line - int'(oam_m[4*n]) >= 0 && line - int'(oam_m[4*n]) < (h16 ? 16 : 8)) c++;
    return c;
  endfunction

  int ovf_lines, zero_seen, opaque_px;
  initial begin
    rst = 1; ppu_en = 0; scanline = 261; cycle = 0; oam_we = 0; oam_addr = 0; oam_wdata = 0;
    ctrl = '0; mask = '0; mask.spr_en = 1; mask.spr_left = 1;
    for (int i = 0; i < 8192; i++) chr[i] = 8'($urandom);
    ovf_lines = 0; zero_seen = 0; opaque_px = 0;
    @(negedge clk); rst = 0;
    for (int mode = 0; mode < 2; mode++) begin
      ctrl.spr_h16 = mode[0];
      ctrl.spr_tbl = !mode[0];
      // OAM: all off-screen, then 9 sprites on lines 10.., sprite 0 and a few others
      for (int i = 0; i < 256; i++) oam_m[i] = (i % 4 == 0) ? 8'hF0 : 8'($urandom);
      oam_m[0] = 8'd3; oam_m[3] = 8'd20;
      for (int k = 1; k <= 9; k++) begin oam_m[4*k] = 8'd12; oam_m[4*k+3] = 8'(k * 20 + 3); end
      oam_m[4*10] = 8'd25; oam_m[4*10+3] = 8'd250;
      oam_m[4*11] = 8'd26; oam_m[4*11+3] = 8'd252;
      oam_m[4*12] = 8'd30; oam_m[4*12+3] = 8'd0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); oam_we = 1; oam_addr = 8'(i); oam_wdata = oam_m[i];
      end
      @(negedge clk); oam_we = 0;
      oam_addr = 8'd5; #1 chk(oam_rdata == oam_m[5], "OAM read port");
      scanline = 261; cycle = 0;
      while (!(scanline == 40 && cycle == 0)) begin
        @(negedge clk); ppu_en = 1; #1;
        if (pixel_tk && scanline >= 1) begin
          logic [7:0] e;
          e = ref_full(int'(scanline), int'(x), mode[0]);
          chk({behind, pal, pixel} == e[5:1], $sformatf("mode %0d line %0d x %0d got %b%b%b exp %h",
              mode, scanline, x, behind, pal, pixel, e));
          if (pixel != 0) opaque_px++;
          if (zero_opaque) zero_seen++;
          chk(!zero_opaque || (pixel != 0 && x >= oam_m[3] && x < oam_m[3] + 8), "sprite 0 opaque flag");
        end
        if (ovf_tk) begin
          ovf_lines++;
          chk(covering(int'(scanline), mode[0]) > 8, $sformatf("overflow on line %0d", scanline));
        end
        @(negedge clk); ppu_en = 0;
        if (cycle == 340) begin cycle = 0; scanline = (scanline == 261) ? 0 : scanline + 1; end
        else cycle = cycle + 1;
      end
    end
    chk(ovf_lines > 0, "overflow happened");
    chk(zero_seen > 0, "sprite 0 opaque seen");
    chk(opaque_px > 200, $sformatf("enough sprite pixels %0d", opaque_px));
    finish();
  end
endmodule
