// tb_ultranes: end-to-end test of the console at its default sizes.
// A host model uses the Avalon port the way the host utility does: load
// the pattern ROM and a sprite table in CPU RAM, write and read back
// program ROM, release the CPU from reset and select vertical mirroring.
// A behavioural CPU bus master then plays the part of the 6502 program:
// it fills two nametables and the palette through PPUADDR/PPUDATA, starts
// sprite DMA from page $02 (the CPU must be halted for 512 bus cycles),
// sets the scroll and enables NMI and rendering with green emphasis. After the NMI it reads
// PPUSTATUS for sprite 0 hit and overflow. A whole VGA frame is then
// captured from the RGB/sync outputs and every one of its 512x480 active
// pixels is compared with a reference renderer written here from the NES
// rules (scroll, mirroring, attributes, sprite priority, palette, red and
// blue dimmed to 3/4 by the emphasis) and the 2x2 pixel doubling. Each mechanism is counted and must occur.
module tb_ultranes;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #(400000000);
    failures++;
    $display("watchdog expired");
    finish();
  end

  logic rst, avs_write, avs_read, cpu_we, cpu_ce, cpu_rdy, cpu_nmi, cpu_rst;
  logic vga_hs, vga_vs, vga_blank_n, vga_en;
  logic [16:0] avs_address;
  logic [7:0] avs_writedata, cpu_wdata, cpu_rdata, vga_r, vga_g, vga_b;
  logic [15:0] avs_readdata, cpu_addr;
  ultranes dut (.clk50(clk), .*);

  localparam logic [5:0]  K   [8] = '{6'h0F, 6'h30, 6'h16, 6'h01, 6'h2A, 6'h00, 6'h10, 6'h2D};
  localparam logic [23:0] RGB [8] = '{24'h000000, 24'hFCFCFC, 24'hF83800, 24'h0000FC,
                                      24'h58D854, 24'h7C7C7C, 24'hBCBCBC, 24'h787878};

  logic [7:0] chr [8192];
  logic [7:0] nt [2][1024];
  int         pal [32];          // index into K
  logic [7:0] oam_m [256];
  int sx, sy, base;

  // ---------------- host (Avalon) ----------------
  task automatic avs_wr(input logic [16:0] a, input logic [7:0] d);
    @(negedge clk); avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask
  task automatic avs_rd(input logic [16:0] a, output logic [15:0] d);
    @(negedge clk); avs_address = a; avs_read = 1;
    @(negedge clk); avs_read = 0; d = avs_readdata;
  endtask

  // ---------------- CPU bus master ----------------
  int bus_cycles;
  task automatic bus(input logic [15:0] a, input logic w, input logic [7:0] d, output logic [7:0] q);
    do @(negedge clk); while (!(cpu_ce && cpu_rdy));
    cpu_addr = a; cpu_we = w; cpu_wdata = d;
    @(posedge clk); #1;
    q = cpu_rdata;
    cpu_we = 0; cpu_addr = 16'h8000;   // idle reads go to program ROM
    bus_cycles++;
  endtask
  task automatic cw(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] q; bus(a, 1, d, q);
  endtask
  task automatic cr(input logic [15:0] a, output logic [7:0] q);
    bus(a, 0, 0, q);
  endtask

  // ---------------- reference renderer ----------------
  function automatic logic [4:0] bg_ref(input int x, input int y);
    int wx, wy, t, lx, ly, tile, a, sh, addr;
    logic [1:0] p;
    wx = (x + sx + (base & 1) * 256) % 512;
    wy = (y + sy + (base >> 1) * 240) % 480;
    t = wx / 256;
    lx = wx % 256; ly = wy % 240;
    tile = int'(nt[t][(ly / 8) * 32 + lx / 8]);
    a = int'(nt[t][960 + (ly / 32) * 8 + lx / 32]);
    sh = ((ly / 16) % 2) * 4 + ((lx / 16) % 2) * 2;
    addr = tile * 16 + ly % 8;           // background table 0
    p = {chr[addr + 8][7 - lx % 8], chr[addr][7 - lx % 8]};
    return {1'b0, 2'((a >> sh) & 3), p};
  endfunction
  function automatic logic [5:0] spr_ref(input int line, input int px);
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
          addr = 4096 + oam_m[4*n+1] * 16 + row;   // sprite table 1
          p = {chr[addr + 8][7 - col], chr[addr][7 - col]};
          if (p != 0) return {1'b1, oam_m[4*n+2][5], oam_m[4*n+2][1:0], p};
        end
      end
    end
    return 0;
  endfunction
  function automatic logic [23:0] rgb_ref(input int x, input int y);
    logic [4:0] b, a; logic [5:0] s; logic [23:0] c;
    b = bg_ref(x, y); s = spr_ref(y, x);
    if (s[5] && (b[1:0] == 0 || !s[4])) a = {1'b1, s[3:0]};
    else if (b[1:0] != 0)               a = {1'b0, b[3:0]};
    else                                a = 5'd0;
    if (a[1:0] == 0) a = 5'd0;
    c = RGB[pal[a]];
    // green emphasis dims red and blue to 3/4
    return {c[23:16] - (c[23:16] >> 2), c[15:8], c[7:0] - (c[7:0] >> 2)};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_dma_halt, n_nmi, n_hit, n_ovf, n_bufread, n_mirror, n_inc32, n_reset, n_mon, n_pixels;
  logic nmi_q;
  always @(posedge clk) begin
    if (cpu_ce && !cpu_rdy) n_dma_halt <= n_dma_halt + 1;
    nmi_q <= cpu_nmi;
    if (cpu_nmi && !nmi_q) n_nmi <= n_nmi + 1;
  end

  logic [7:0] q;
  logic [15:0] hd;
  int th, tv, vsf;
  logic was_en, vs_q;
  initial begin
    rst = 1; avs_write = 0; avs_read = 0; avs_address = 0; avs_writedata = 0;
    cpu_addr = 16'h8000; cpu_we = 0; cpu_wdata = 0; bus_cycles = 0;
    n_dma_halt = 0; n_nmi = 0; n_hit = 0; n_ovf = 0; n_bufread = 0; n_mirror = 0;
    n_inc32 = 0; n_reset = 0; n_mon = 0; n_pixels = 0;
    for (int i = 0; i < 8192; i++) chr[i] = 8'($urandom);
    for (int t = 0; t < 2; t++) for (int i = 0; i < 1024; i++) nt[t][i] = 8'($urandom);
    for (int i = 0; i < 32; i++) pal[i] = $urandom % 8;
    for (int i = 0; i < 4; i++) pal[16 + 4*i] = pal[4*i];
    for (int i = 0; i < 256; i++) oam_m[i] = (i % 4 == 0) ? 8'hF8 : 8'($urandom);
    for (int k = 0; k < 20; k++) begin oam_m[4*k] = 8'($urandom % 200 + 10); oam_m[4*k+3] = 8'($urandom % 240 + 8); end
    for (int k = 3; k < 13; k++) begin oam_m[4*k] = 8'd120; oam_m[4*k+3] = 8'(k * 19); end
    oam_m[0] = 8'd60; oam_m[1] = 8'hEE; oam_m[2] = 8'h00; oam_m[3] = 8'd100;
    for (int r = 0; r < 16; r++) chr[4096 + 8'hEE * 16 + r] = 8'hFF;   // sprite 0 solid
    sx = 133; sy = 17; base = 0;
    repeat (3) @(negedge clk); rst = 0;

    // ---- host: load memories, then release the CPU ----
    chk(cpu_rst, "CPU held in reset after power-up");
    for (int i = 0; i < 8192; i++) avs_wr(17'h10000 + 17'(i), chr[i]);
    for (int i = 0; i < 256; i++) avs_wr(17'h00200 + 17'(i), oam_m[i]);
    for (int i = 0; i < 64; i++) avs_wr(17'h0C000 + 17'(i), 8'(i * 3 + 1));
    for (int i = 0; i < 64; i++) begin
      avs_rd(17'h0C000 + 17'(i), hd);
      chk(hd[7:0] == 8'(i * 3 + 1), "host ROM readback");
    end
    avs_wr(17'h18000, 8'h02);          // reset low, vertical mirroring
    @(negedge clk); chk(!cpu_rst, "CPU released"); n_reset++;

    // ---- CPU program ----
    cr(16'hC001, q); chk(q == 8'd4, "CPU reads program ROM $C001");
    cr(16'h2002, q);
    cw(16'h2006, 8'h20); cw(16'h2006, 8'h00);
    for (int t = 0; t < 2; t++) for (int i = 0; i < 1024; i++) cw(16'h2007, nt[t][i]);
    cw(16'h3F06, 8'h3F); cw(16'h3F0E, 8'h00);      // $2006 through a register mirror
    for (int i = 0; i < 32; i++) cw(16'h2007, {2'b00, K[pal[i]]});
    // buffered read and mirroring: $2C10 shows table 1 ($2410)
    cw(16'h2006, 8'h2C); cw(16'h2006, 8'h10); cr(16'h2007, q); cr(16'h2007, q);
    chk(q == nt[1][16], "buffered read through vertical mirror"); n_bufread++; n_mirror++;
    // increment-32 mode: two reads 32 apart
    cw(16'h2000, 8'h04);
    cw(16'h2006, 8'h20); cw(16'h2006, 8'h03); cr(16'h2007, q); cr(16'h2007, q);
    chk(q == nt[0][3], "inc32 first"); cr(16'h2007, q);
    chk(q == nt[0][35], "inc32 second"); n_inc32++;
    // sprite DMA from page $02
    cw(16'h2003, 8'h00);
    cw(16'h4014, 8'h02);
    cr(16'h0000, q);
    chk(n_dma_halt == 512, $sformatf("DMA halted the CPU %0d bus cycles", n_dma_halt));
    // scroll, NMI, rendering
    cr(16'h2002, q);
    cw(16'h2005, 8'(sx)); cw(16'h2005, 8'(sy));
    cw(16'h2000, 8'h88 | 8'(base));   // NMI on, sprites table 1, bg table 0
    cw(16'h2001, 8'h5E);
    // host reads the CPU address bus
    avs_rd(17'h18000, hd); chk(hd == 16'h8000, "address monitor"); n_mon++;

    // ---- wait for NMI, check status flags of the first full frame ----
    wait (n_nmi == 2);   // the first vblank may follow a partly rendered frame
    cr(16'h2002, q);
    chk(q[6] && q[5], $sformatf("sprite 0 hit and overflow %h", q));
    n_hit += int'(q[6]); n_ovf += int'(q[5]);

    // ---- capture and check one VGA frame ----
    vsf = 0; vs_q = 1; th = 0; tv = 0;
    while (!(vsf == 2 && tv == 482)) begin
      was_en = vga_en;
      @(negedge clk);
      if (!was_en) continue;
      if (!vga_vs && vs_q) begin vsf++; th = 0; tv = 492; end
      else if (th == 681) begin th = 0; tv = (tv == 523) ? 0 : tv + 1; end
      else th++;
      vs_q = vga_vs;
      if (vsf == 2 && tv >= 2 && tv < 482 && th < 512) begin
        chk(vga_blank_n, "active area");
        chk({vga_r, vga_g, vga_b} == rgb_ref(th / 2, (tv - 2) / 2),
            $sformatf("VGA pixel %0d,%0d got %h exp %h", th, tv, {vga_r, vga_g, vga_b}, rgb_ref(th / 2, (tv - 2) / 2)));
        n_pixels++;
      end
    end
    chk(n_pixels == 512 * 480, "whole frame checked");
    chk(n_nmi >= 2, "NMI every frame");
    $display("mechanisms: reset=%0d dma_halt=%0d nmi=%0d hit=%0d ovf=%0d bufread=%0d mirror=%0d inc32=%0d monitor=%0d pixels=%0d bus_cycles=%0d",
             n_reset, n_dma_halt, n_nmi, n_hit, n_ovf, n_bufread, n_mirror, n_inc32, n_mon, n_pixels, bus_cycles);
    chk(n_reset > 0 && n_dma_halt > 0 && n_nmi > 0 && n_hit > 0 && n_ovf > 0 && n_bufread > 0 &&
        n_mirror > 0 && n_inc32 > 0 && n_mon > 0, "every mechanism happened");
    finish();
  end
endmodule
