// ultranes: the console, minus its 6502 core.
// One 50 MHz clock drives everything; clk_en_gen gives the VGA (25 MHz),
// PPU (6.25 MHz) and CPU (2.083 MHz) enables. The 6502 core attaches to
// the cpu_* ports: it presents address, write enable and write data in the
// clock where cpu_ce is high and takes cpu_rdata at its next cpu_ce; it
// must stall while cpu_rdy is low (sprite DMA owns the bus), take an
// interrupt on cpu_nmi (vblank with NMI enabled) and stay in reset while
// cpu_rst is high (set by the host). On the CPU bus sit the work RAM and
// program ROM (cpu_mem), the PPU registers and OAMDMA (oam_dma). The PPU
// renders into the VGA block, which doubles the 256x240 picture to
// 512x480 on a 682x524 VGA raster. The host reaches CPU memory, the
// pattern ROM and the control bits through the Avalon slave.
// The block split and the clocking follow the design; bus timing and the
// host address map are this design's own choices (see the blocks).
module ultranes (
  input  logic        clk50,
  input  logic        rst,
  // host (Avalon-MM slave)
  input  logic [16:0] avs_address,
  input  logic        avs_write,
  input  logic [7:0]  avs_writedata,
  input  logic        avs_read,
  output logic [15:0] avs_readdata,
  // 6502 core
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  output logic        cpu_ce,
  output logic        cpu_rdy,
  output logic        cpu_nmi,
  output logic        cpu_rst,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_en
);
  logic        ppu_en;
  logic [15:0] m_addr, dma_addr, ld_addr;
  logic        m_we, dma_we, dma_active, mem_cs, ppu_cs, dma_cs;
  logic [7:0]  m_wdata, dma_wdata, mem_rdata, ppu_rdata, ld_wdata, ld_rdata;
  logic        ld_we, chr_we, mirror_v;
  logic [12:0] chr_addr;
  logic [7:0]  chr_wdata;
  logic        pix_valid, hsync, vsync;
  logic [7:0]  pix_x, pix_y;
  logic [5:0]  pix_color;
  logic [2:0]  pix_emph;
  logic [8:0]  scanline, cycle;

  clk_en_gen u_clk (.clk(clk50), .rst, .vga_en, .ppu_en, .cpu_ce);

  cpu_bus u_bus (
    .clk(clk50), .rst, .bus_ce(cpu_ce),
    .cpu_addr, .cpu_we(cpu_we && !cpu_rst), .cpu_wdata,
    .dma_active, .dma_addr, .dma_we, .dma_wdata,
    .m_addr, .m_we, .m_wdata, .mem_cs, .ppu_cs, .dma_cs,
    .mem_rdata, .ppu_rdata, .rdata(cpu_rdata)
  );

  cpu_mem u_mem (
    .clk(clk50),
    .a_en(cpu_ce), .a_addr(m_addr), .a_we(m_we && mem_cs), .a_wdata(m_wdata),
    .a_rdata(mem_rdata),
    .b_addr(ld_addr), .b_we(ld_we), .b_wdata(ld_wdata), .b_rdata(ld_rdata)
  );

  oam_dma u_dma (
    .clk(clk50), .rst, .bus_ce(cpu_ce),
    .start(m_we && dma_cs && !dma_active), .page(m_wdata), .rdata(cpu_rdata),
    .active(dma_active), .addr(dma_addr), .we(dma_we), .wdata(dma_wdata)
  );

  ppu u_ppu (
    .clk(clk50), .rst, .ppu_en, .bus_ce(cpu_ce),
    .cs(ppu_cs), .ra(m_addr[2:0]), .we(m_we), .wdata(m_wdata),
    .rdata(ppu_rdata), .nmi(cpu_nmi),
    .mirror_v, .chr_addr, .chr_we, .chr_wdata,
    .pix_valid, .pix_x, .pix_y, .pix_color, .pix_emph, .hsync, .vsync,
    .scanline, .cycle
  );

  vga u_vga (
    .clk(clk50), .rst, .vga_en,
    .pix_valid, .pix_x, .pix_y, .pix_color, .pix_emph, .frame_start(vsync),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n
  );

  avalon_ctrl u_avs (
    .clk(clk50), .rst,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .mem_addr(ld_addr), .mem_we(ld_we), .mem_wdata(ld_wdata), .mem_rdata(ld_rdata),
    .chr_addr, .chr_we, .chr_wdata,
    .cpu_addr_mon(cpu_addr), .cpu_reset(cpu_rst), .mirror_v
  );

  assign cpu_rdy = !dma_active;
endmodule
