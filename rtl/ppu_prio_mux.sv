// ppu_prio_mux: background/sprite priority multiplexer.
// Combines the 2-bit background pixel (with its palette) and the winning
// sprite pixel (palette, behind-background bit) into a 5-bit palette RAM
// address: $00 when both are transparent, $00-$0F for background colours
// and $10-$1F for sprite colours. When both are opaque the sprite wins
// unless its behind bit is set. sprite 0 hit is reported when sprite 0
// and the background are both opaque at a column other than 255. Purely
// combinational; the rules are the standard NES ones.
module ppu_prio_mux (
  input  logic [1:0] bg_pixel,
  input  logic [1:0] bg_pal,
  input  logic [1:0] spr_pixel,
  input  logic [1:0] spr_pal,
  input  logic       spr_behind,
  input  logic       spr0_opaque,
  input  logic [7:0] x,
  output logic [4:0] pal_addr,
  output logic       spr0_hit
);
  logic bg_on, spr_on;
  always_comb begin
    bg_on  = bg_pixel  != 2'd0;
    spr_on = spr_pixel != 2'd0;
    if (spr_on && (!bg_on || !spr_behind)) pal_addr = {1'b1, spr_pal, spr_pixel};
    else if (bg_on)                        pal_addr = {1'b0, bg_pal, bg_pixel};
    else                                   pal_addr = 5'd0;
    spr0_hit = spr0_opaque && bg_on && x != 8'd255;
  end
endmodule
