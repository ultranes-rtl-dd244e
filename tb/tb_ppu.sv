// tb_ppu: programs the PPU only through its CPU registers, as a game
// would: random pattern ROM (through the loader port), two nametables with
// random tiles and attributes, all 32 palette entries, 16 sprites through
// OAMADDR/OAMDATA, a scroll position, then enables rendering. One whole
// frame of pixel output is captured and every pixel is compared with a
// reference renderer written here from the NES rules (scrolling across
// nametables with vertical mirroring, attribute quadrants, sprite
// selection and priority, palette mirroring). Also checked: a frame is
// 89,342 PPU cycles, NMI rises at vblank, PPUSTATUS shows sprite 0 hit
// and overflow, PPUDATA reads are buffered, and every pixel carries the
// emphasis bits written to PPUMASK.
module tb_ppu;
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
    #(80000000);
    failures++;
    $display("watchdog expired");
    finish();
  end

  logic rst, ppu_en, bus_ce, cs, we, nmi, mirror_v, chr_we, pix_valid, hsync, vsync;
  logic [2:0] ra;
  logic [7:0] wdata, rdata, chr_wdata, pix_x, pix_y;
  logic [12:0] chr_addr;
  logic [5:0] pix_color;
  logic [2:0] pix_emph;
  int emph_bad;
  logic [8:0] scanline, cycle;
  ppu dut (.*);

  // ppu_en every 4th clock
  logic [1:0] div;
  always_ff @(posedge clk) if (rst) div <= '0; else div <= div + 1'b1;
  assign ppu_en = !rst && div == 2'd0;

  logic [7:0] chr [8192];
  logic [7:0] nt [2][1024];
  logic [5:0] pal [32];
  logic [7:0] oam_m [256];
  logic [5:0] frame [240][256];
  int sx, sy, base;

  task automatic wr(input int r, input logic [7:0] d);
    @(negedge clk); bus_ce = 1; cs = 1; we = 1; ra = 3'(r); wdata = d;
    @(negedge clk); bus_ce = 0; cs = 0; we = 0;
    @(negedge clk);
  endtask
  task automatic rd(input int r, output logic [7:0] d);
    @(negedge clk); bus_ce = 1; cs = 1; we = 0; ra = 3'(r);
    @(negedge clk); bus_ce = 0; cs = 0; d = rdata;
    @(negedge clk);
  endtask

  function automatic logic [4:0] bg_ref(input int x, input int y);
    int wx, wy, t, lx, ly, tile, a, sh, addr;
    logic [1:0] p;
    wx = (x + sx + (base & 1) * 256) % 512;
    wy = (y + sy + (base >> 1) * 240) % 480;
    t = wx / 256;                // vertical mirroring: only the X table matters
    lx = wx % 256; ly = wy % 240;
    tile = int'(nt[t][(ly / 8) * 32 + lx / 8]);
    a = int'(nt[t][960 + (ly / 32) * 8 + lx / 32]);
    sh = ((ly / 16) % 2) * 4 + ((lx / 16) % 2) * 2;
    addr = 4096 + tile * 16 + ly % 8;    // background table 1
    p = {chr[addr + 8][7 - lx % 8], chr[addr][7 - lx % 8]};
    return {1'b0, 2'((a >> sh) & 3), p};
  endfunction

  function automatic logic [5:0] spr_ref(input int line, input int px);
    // {opaque, behind, palette, pixel}; 8x8 sprites from table 0
    int cnt, row, col, addr, n;
    logic [1:0] p;
    cnt = 0;
    if (line == 0) return 0;
    for (n = 0; n < 64 && cnt < 8; n++) begin
      row = line - 1 - int'(oam_m[4*n]);
      if (row >= 0 && row < 8) begin
        cnt++;
        col = px - int'(oam_m[4*n+3]);
        if (col >= 0 && col < 8) begin
          if (oam_m[4*n+2][7]) row = 7 - row;
          if (oam_m[4*n+2][6]) col = 7 - col;
          addr = oam_m[4*n+1] * 16 + row;
          p = {chr[addr + 8][7 - col], chr[addr][7 - col]};
          if (p != 0) return {1'b1, oam_m[4*n+2][5], oam_m[4*n+2][1:0], p};
        end
      end
    end
    return 0;
  endfunction

  function automatic logic [5:0] pix_ref(input int x, input int y);
    logic [4:0] b; logic [5:0] s; logic [4:0] a;
    b = bg_ref(x, y); s = spr_ref(y, x);
    if (s[5] && (b[1:0] == 0 || !s[4])) a = {1'b1, s[3:0]};
    else if (b[1:0] != 0)               a = {1'b0, b[3:0]};
    else                                a = 5'd0;
    // colour 0 of a sprite palette is stored with the background's
    return pal[(a[1:0] == 0) ? {1'b0, a[3:0]} : a];
  endfunction

  logic [7:0] d;
  int nlast, nmi_rise, px_cnt;
  time n0;
  logic nmi_q;
  initial begin
    rst = 1; bus_ce = 0; cs = 0; we = 0; ra = 0; wdata = 0; mirror_v = 1; chr_we = 0;
    chr_addr = 0; chr_wdata = 0;
    for (int i = 0; i < 8192; i++) chr[i] = 8'($urandom);
    for (int t = 0; t < 2; t++) for (int i = 0; i < 1024; i++) nt[t][i] = 8'($urandom);
    for (int i = 0; i < 32; i++) pal[i] = 6'($urandom);
    for (int i = 0; i < 4; i++) pal[16 + 4*i] = pal[4*i];
    for (int i = 0; i < 256; i++) oam_m[i] = (i % 4 == 0) ? 8'hF8 : 8'($urandom);
    // sprite 0 fully opaque over the background, plus a row of 10 sprites on line 100
    for (int k = 0; k < 16; k++) begin oam_m[4*k] = 8'($urandom % 200); oam_m[4*k+3] = 8'($urandom % 240 + 8); end
    for (int k = 3; k < 13; k++) begin oam_m[4*k] = 8'd100; oam_m[4*k+3] = 8'(k * 20); end
    oam_m[0] = 8'd50; oam_m[1] = 8'hFF; oam_m[2] = 8'h00; oam_m[3] = 8'd60;
    chr[16'hFF * 16 + 0 +: 8] = '{default: 8'hFF};
    sx = 77; sy = 45; base = 1;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); chr_we = 1; chr_addr = 13'(i); chr_wdata = chr[i];
    end
    @(negedge clk); chr_we = 0;
    // nametables 0 and 1 through PPUADDR/PPUDATA
    rd(2, d);
    wr(6, 8'h20); wr(6, 8'h00);
    for (int t = 0; t < 2; t++) for (int i = 0; i < 1024; i++) wr(7, nt[t][i]);
    wr(6, 8'h3F); wr(6, 8'h00);
    for (int i = 0; i < 32; i++) wr(7, {2'b00, pal[i]});
    // buffered read: first read returns stale buffer, second the byte at $2005
    wr(6, 8'h20); wr(6, 8'h05); rd(7, d); rd(7, d);
    chk(d == nt[0][5], "PPUDATA buffered read");
    wr(6, 8'h2C); wr(6, 8'h07); rd(7, d); rd(7, d);   // $2C07 mirrors $2407 (table 1)
    chk(d == nt[1][7], "vertical mirroring through PPUDATA");
    wr(3, 8'h00);
    for (int i = 0; i < 256; i++) wr(4, oam_m[i]);
    rd(2, d);
    wr(5, 8'(sx)); wr(5, 8'(sy));
    wr(0, 8'h90 | 8'(base));    // NMI on, bg table 1, sprite table 0
    wr(1, 8'h3E);               // rendering on, red emphasis
    // skip to the start of a full frame, then capture it
    @(posedge vsync); n0 = $time;
    px_cnt = 0; emph_bad = 0;
    while (px_cnt < 256 * 240) begin
      @(negedge clk);
      if (pix_valid) begin frame[pix_y][pix_x] = pix_color; px_cnt++; if (pix_emph != 3'b001) emph_bad++; end
    end
    chk(emph_bad == 0, $sformatf("%0d pixels without the red emphasis bit", emph_bad));
    nmi_rise = 0; nmi_q = nmi;
    while (!vsync) begin
      @(negedge clk);
      if (nmi && !nmi_q) begin
        nmi_rise++;
        chk(scanline == 241, $sformatf("nmi at line %0d", scanline));
      end
      nmi_q = nmi;
    end
    chk(($time - n0) / 40 == 89342, $sformatf("frame time %0d", $time - n0));
    chk(nmi_rise == 1, "one NMI per frame");
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 256; x++)
        chk(frame[y][x] == pix_ref(x, y), $sformatf("pixel %0d,%0d got %h exp %h", x, y, frame[y][x], pix_ref(x, y)));
    // status after a frame: sprite 0 hit and overflow were set and are
    // cleared at the pre-render line, so read them during vblank
    repeat (250 * 341 * 4) @(negedge clk);
    rd(2, d);
    chk(d[6] && d[5], $sformatf("status hit/overflow %h", d));
    finish();
  end
endmodule
