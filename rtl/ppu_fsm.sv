// ppu_fsm: the PPU's timing and VRAM fetch sequencer.
// A cycle counter (0..340) and a scanline counter (0..261, where 261 is
// the pre-render line "-1") advance once per ppu_en, giving 341 x 262 =
// 89,342 PPU cycles per frame with no odd-frame skip. Lines 0-239 are
// visible, 240 is idle, vblank is raised at line 241 cycle 1 and the
// status flags are cleared at line 261 cycle 1.
//
// On rendering lines the background fetch runs in 8-cycle groups during
// cycles 1-256 (tiles 2..33 of the line) and 321-336 (tiles 0 and 1 of
// the next line). Each group makes four fetches of two cycles each:
// nametable byte, attribute byte, pattern low, pattern high. The address
// is held for both cycles of a fetch, the memory answers one clock later,
// and the byte is taken at the second cycle's tick; at the last tick of a
// group the finished tile is handed to the tile renderer (bg_load) and
// coarse X is advanced. Fine/coarse Y is advanced at cycle 256, the
// horizontal scroll bits are copied at 257 and the vertical ones at
// 280-304 of the pre-render line. Cycles 257-320 fetch sprite patterns,
// whose address comes from the sprite unit. All *_tk outputs are already
// qualified by ppu_en. The sequencing follows the documented fetch order
// and line/cycle budget; the exact cycle of each event is the standard
// NES one.
module ppu_fsm
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ppu_en,
  input  logic        render_en,      // background or sprites enabled
  input  logic [14:0] v,              // current VRAM address (scroll)
  input  logic        bg_tbl,
  input  logic [13:0] spr_addr,       // sprite pattern address (257-320)
  input  logic [7:0]  rdata,          // render port read data
  output logic [8:0]  scanline,
  output logic [8:0]  cycle,
  output logic [2:0]  phase,          // (cycle-1) mod 8
  output logic        rendering,      // render_en on a rendering line
  output logic        pixel_tk,       // tick of a visible pixel
  output logic        bg_shift_tk,
  output logic        bg_load_tk,
  output logic [7:0]  bg_lo,
  output logic [7:0]  bg_hi,
  output logic [1:0]  bg_at,
  output scroll_op_t  scroll_op,
  output logic        set_vblank_tk,
  output logic        clr_flags_tk,
  output logic        line_start_tk,  // cycle 0 of any line (hsync)
  output logic        frame_start_tk, // line 0 cycle 0 (vsync)
  output logic [13:0] vaddr           // render port address
);
  logic [7:0] nt_q, at_q, lo_q;
  logic       vis_line, pre_line, bg_win, spr_win;

  always_ff @(posedge clk) begin
    if (rst) begin
      cycle    <= '0;
      scanline <= '0;
    end else if (ppu_en) begin
      if (cycle == 9'(PPU_CYCLES - 1)) begin
        cycle    <= '0;
        scanline <= (scanline == 9'(PPU_LINES - 1)) ? '0 : scanline + 1'b1;
      end else begin
        cycle <= cycle + 1'b1;
      end
    end
  end

  always_comb begin
    vis_line  = scanline < 9'(VIS_LINES);
    pre_line  = scanline == 9'(PRE_LINE);
    rendering = render_en && (vis_line || pre_line);
    phase     = 3'(cycle - 9'd1);
    bg_win    = (cycle >= 9'd1 && cycle <= 9'd256) || (cycle >= 9'd321 && cycle <= 9'd336);
    spr_win   = cycle >= 9'd257 && cycle <= 9'd320;

    pixel_tk       = ppu_en && vis_line && cycle >= 9'd1 && cycle <= 9'd256;
    bg_shift_tk    = ppu_en && rendering && bg_win;
    bg_load_tk     = bg_shift_tk && phase == 3'd7;
    scroll_op.inc_x  = bg_load_tk;
    scroll_op.inc_y  = ppu_en && rendering && cycle == 9'd256;
    scroll_op.copy_x = ppu_en && rendering && cycle == 9'd257;
    scroll_op.copy_y = ppu_en && render_en && pre_line && cycle >= 9'd280 && cycle <= 9'd304;
    set_vblank_tk  = ppu_en && scanline == 9'(VBLANK_LINE) && cycle == 9'd1;
    clr_flags_tk   = ppu_en && pre_line && cycle == 9'd1;
    line_start_tk  = ppu_en && cycle == 9'd0;
    frame_start_tk = line_start_tk && scanline == 9'd0;

    bg_lo = lo_q;
    bg_hi = rdata;
    // quadrant of the 32x32-pixel attribute block: coarse Y bit 1, coarse X bit 1
    bg_at = 2'(at_q >> {v[6], v[1], 1'b0});

    // address held for both cycles of a fetch
    if (spr_win && phase[2]) begin
      vaddr = spr_addr;
    end else begin
      unique case (phase[2:1])
        2'd0: vaddr = {2'b10, v[11:0]};
        2'd1: vaddr = {2'b10, v[11:10], 4'b1111, v[9:7], v[4:2]};
        2'd2: vaddr = {1'b0, bg_tbl, nt_q, 1'b0, v[14:12]};
        default: vaddr = {1'b0, bg_tbl, nt_q, 1'b1, v[14:12]};
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      nt_q <= '0;
      at_q <= '0;
      lo_q <= '0;
    end else if (bg_shift_tk) begin
      unique case (phase)
        3'd1: nt_q <= rdata;
        3'd3: at_q <= rdata;
        3'd5: lo_q <= rdata;
        default: ;
      endcase
    end
  end
endmodule
