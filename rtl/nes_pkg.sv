// nes_pkg: constants and register layouts shared by the ultraNES blocks.
// PPU frame geometry (341 cycles x 262 lines, 240 visible, vblank from
// line 241) follows the documented NES timing; the bit positions inside
// PPUCTRL/PPUMASK are the standard NES ones, which the register letters
// of the design (V P H B S I NN, BGR s b M m G) map onto.
package nes_pkg;
  localparam int unsigned PPU_CYCLES  = 341;
  localparam int unsigned PPU_LINES   = 262;
  localparam int unsigned VIS_LINES   = 240;
  localparam int unsigned VBLANK_LINE = 241;
  localparam int unsigned PRE_LINE    = 261;   // the "-1" pre-render line

  // PPUCTRL ($2000)
  typedef struct packed {
    logic       nmi_en;     // V
    logic       master;     // P
    logic       spr_h16;    // H: 8x16 sprites
    logic       bg_tbl;     // B: background pattern table
    logic       spr_tbl;    // S: 8x8 sprite pattern table
    logic       inc32;      // I: PPUDATA increment 32
    logic [1:0] nt_sel;     // NN
  } ppuctrl_t;

  // PPUMASK ($2001)
  typedef struct packed {
    logic [2:0] emph;       // BGR
    logic       spr_en;     // s
    logic       bg_en;      // b
    logic       spr_left;   // M
    logic       bg_left;    // m
    logic       grey;       // G
  } ppumask_t;

  // Strobes from the fetch sequencer to the scroll registers
  typedef struct packed {
    logic inc_x;
    logic inc_y;
    logic copy_x;
    logic copy_y;
  } scroll_op_t;

  // One OAM entry as stored (byte 0 .. byte 3)
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] attr;
    logic [7:0] tile;
    logic [7:0] y;
  } oam_entry_t;
endpackage
