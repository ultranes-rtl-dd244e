// ppu: picture processing unit.
// Built from the FSM and registers (ppu_fsm, ppu_regs), the tile renderer
// (ppu_bg), the sprite renderer with OAM (ppu_sprite), the priority
// multiplexer (ppu_prio_mux) and three memories: VRAM (nametable_ram),
// pattern ROM (chr_rom) and palette (palette_ram). The 14-bit PPU address
// space is decoded as $0000-$1FFF pattern ROM, $2000-$3EFF nametables,
// $3F00-$3FFF palette. The memories are dual ported: one port serves the
// rendering fetches, the other the CPU's PPUDATA accesses at the VRAM
// address v, so both can proceed in the same cycle.
// Interface: the CPU side is the 8-register bus slave of ppu_regs (see
// there); nmi is vblank AND the NMI enable. Each visible pixel appears as
// a one-clock pix_valid pulse with its column, line, 6-bit colour
// index and the PPUMASK emphasis bits {B,G,R}, one clock after the PPU tick that produced it. hsync is a pulse
// at cycle 0 of every line, vsync at cycle 0 of line 0; scanline/cycle
// expose the counters. Everything runs on clk with ppu_en (PPU tick) and
// bus_ce (CPU bus cycle) as enables; ppu_en must not be high in two
// consecutive clocks of a fetch, which the 1-in-8 PPU enable guarantees.
module ppu
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ppu_en,
  input  logic        bus_ce,
  // CPU register port
  input  logic        cs,
  input  logic [2:0]  ra,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        nmi,
  // loader
  input  logic        mirror_v,
  input  logic [12:0] chr_addr,
  input  logic        chr_we,
  input  logic [7:0]  chr_wdata,
  // video
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [5:0]  pix_color,
  output logic [2:0]  pix_emph,
  output logic        hsync,
  output logic        vsync,
  output logic [8:0]  scanline,
  output logic [8:0]  cycle
);
  ppuctrl_t    ctrl;
  ppumask_t    mask;
  logic [14:0] v;
  logic [2:0]  fine_x, phase;
  scroll_op_t  sop;
  logic        rendering, pixel_tk, shift_tk, load_tk, set_vb, clr_fl;
  logic [7:0]  bg_lo, bg_hi, r_rdata;
  logic [1:0]  bg_at, bg_px, bg_pal, sp_px, sp_pal;
  logic        sp_behind, sp0_opq, sp_ovf_tk, sp0_hit;
  logic [13:0] vaddr, spr_addr;
  logic [7:0]  oam_addr, oam_wdata, oam_rdata;
  logic        oam_we;
  logic        vram_we;
  logic [7:0]  vram_wdata, vram_rdata;
  logic [5:0]  pal_rdata, color;
  logic [4:0]  pal_addr;
  logic [7:0]  x;
  logic [7:0]  nt_a, nt_b, chr_a, chr_b;
  logic        rsel_q, csel_q;
  logic        cpu_is_pal;

  assign x = 8'(cycle - 9'd1);

  ppu_fsm u_fsm (
    .clk, .rst, .ppu_en,
    .render_en(mask.bg_en | mask.spr_en), .v, .bg_tbl(ctrl.bg_tbl), .spr_addr,
    .rdata(r_rdata), .scanline, .cycle, .phase, .rendering, .pixel_tk,
    .bg_shift_tk(shift_tk), .bg_load_tk(load_tk), .bg_lo, .bg_hi, .bg_at,
    .scroll_op(sop), .set_vblank_tk(set_vb), .clr_flags_tk(clr_fl),
    .line_start_tk(hsync), .frame_start_tk(vsync), .vaddr
  );

  ppu_regs u_regs (
    .clk, .rst, .bus_ce, .cs, .ra, .we, .wdata, .rdata,
    .ctrl, .mask, .v, .fine_x,
    .set_vblank(set_vb), .clr_flags(clr_fl),
    .spr0_hit(sp0_hit && pixel_tk), .spr_ovf(sp_ovf_tk), .nmi,
    .scroll_op(sop),
    .oam_addr, .oam_we, .oam_wdata, .oam_rdata,
    .vram_we, .vram_wdata, .vram_rdata, .pal_rdata
  );

  ppu_bg u_bg (
    .clk, .rst, .shift_tk, .load_tk, .tile_lo(bg_lo), .tile_hi(bg_hi),
    .tile_at(bg_at), .fine_x, .bg_en(mask.bg_en), .bg_left(mask.bg_left),
    .x, .pixel(bg_px), .pal(bg_pal)
  );

  ppu_sprite u_spr (
    .clk, .rst, .ppu_en, .rendering, .scanline, .cycle, .phase, .pixel_tk,
    .ctrl, .mask, .rdata(r_rdata), .spr_addr,
    .oam_addr, .oam_we, .oam_wdata, .oam_rdata,
    .x, .pixel(sp_px), .pal(sp_pal), .behind(sp_behind),
    .zero_opaque(sp0_opq), .ovf_tk(sp_ovf_tk)
  );

  ppu_prio_mux u_mux (
    .bg_pixel(bg_px), .bg_pal, .spr_pixel(sp_px), .spr_pal(sp_pal),
    .spr_behind(sp_behind), .spr0_opaque(sp0_opq), .x,
    .pal_addr, .spr0_hit(sp0_hit)
  );

  // memories
  assign cpu_is_pal = v[13:8] == 6'h3F;

  nametable_ram u_vram (
    .clk, .mirror_v,
    .a_addr(vaddr[11:0]), .a_rdata(nt_a),
    .b_addr(v[11:0]), .b_we(vram_we && v[13] && !cpu_is_pal),
    .b_wdata(vram_wdata), .b_rdata(nt_b)
  );

  chr_rom u_chr (
    .clk,
    .a_addr(vaddr[12:0]), .a_rdata(chr_a),
    .b_addr(v[12:0]), .b_rdata(chr_b),
    .l_addr(chr_addr), .l_we(chr_we), .l_wdata(chr_wdata)
  );

  palette_ram u_pal (
    .clk, .rst, .r_addr(pal_addr), .grey(mask.grey), .r_color(color),
    .c_addr(v[4:0]), .c_we(vram_we && cpu_is_pal), .c_wdata(vram_wdata[5:0]),
    .c_rdata(pal_rdata)
  );

  always_ff @(posedge clk) begin
    rsel_q <= vaddr[13];
    csel_q <= v[13];
  end
  assign r_rdata    = rsel_q ? nt_a : chr_a;
  assign vram_rdata = csel_q ? nt_b : chr_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_valid <= 1'b0;
      pix_x     <= '0;
      pix_y     <= '0;
      pix_color <= '0;
      pix_emph  <= '0;
    end else begin
      pix_valid <= pixel_tk;
      if (pixel_tk) begin
        pix_x     <= x;
        pix_y     <= scanline[7:0];
        pix_color <= color;
        pix_emph  <= mask.emph;
      end
    end
  end
endmodule
