// ppu_bg: background tile renderer.
// Four 16-bit shift registers hold the pattern low/high bits and the two
// attribute (palette select) bits of two tiles: bit 15 is the pixel under
// the beam when fine X is 0, the lower byte is the next tile. On each
// shift tick the registers move one place towards bit 15; on a load tick
// (the last cycle of a tile's fetch group) they shift and take the new
// tile in their low byte, the attribute bits replicated 8 times. The
// pixel is taken combinationally from bit 15 - fine_x before the shift of
// the same tick. Left-column clipping and the enable bit of PPUMASK are
// applied here. The shift-register scheme is the standard NES one.
module ppu_bg (
  input  logic       clk,
  input  logic       rst,
  input  logic       shift_tk,
  input  logic       load_tk,
  input  logic [7:0] tile_lo,
  input  logic [7:0] tile_hi,
  input  logic [1:0] tile_at,
  input  logic [2:0] fine_x,
  input  logic       bg_en,
  input  logic       bg_left,
  input  logic [7:0] x,            // screen column of the current pixel
  output logic [1:0] pixel,        // 0 = transparent
  output logic [1:0] pal
);
  logic [15:0] sh_lo, sh_hi, sh_a0, sh_a1;
  logic [3:0]  sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh_lo <= '0; sh_hi <= '0; sh_a0 <= '0; sh_a1 <= '0;
    end else if (shift_tk) begin
      if (load_tk) begin
        sh_lo <= {sh_lo[14:7], tile_lo};
        sh_hi <= {sh_hi[14:7], tile_hi};
        sh_a0 <= {sh_a0[14:7], {8{tile_at[0]}}};
        sh_a1 <= {sh_a1[14:7], {8{tile_at[1]}}};
      end else begin
        sh_lo <= sh_lo << 1;
        sh_hi <= sh_hi << 1;
        sh_a0 <= sh_a0 << 1;
        sh_a1 <= sh_a1 << 1;
      end
    end
  end

  always_comb begin
    sel = 4'd15 - {1'b0, fine_x};
    if (!bg_en || (!bg_left && x < 8'd8)) begin
      pixel = 2'd0;
      pal   = 2'd0;
    end else begin
      pixel = {sh_hi[sel], sh_lo[sel]};
      pal   = {sh_a1[sel], sh_a0[sel]};
    end
  end
endmodule
