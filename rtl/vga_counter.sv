// vga_counter: VGA beam counters and sync for a picture that is the PPU
// frame doubled in both directions. Each PPU line (341 PPU cycles = 1364
// VGA cycles at 4 VGA cycles per PPU cycle) becomes two VGA lines of
// H_TOTAL = 682 cycles, and the 262 PPU lines become V_TOTAL = 524 VGA
// lines, so a VGA frame is 357,368 VGA cycles, exactly four PPU frames'
// worth of cycles, and the two stay locked. Line timing (this design's
// choice within those totals): 512 active pixels (256 doubled), 16 front
// porch, 96 sync, 58 back porch; 480 active lines starting at line 2
// (PPU line 0 is shown once it has been completely written), 10 front
// porch, 2 sync, 32 back porch. Syncs are active low. The counters
// advance on vga_en; a resync pulse (PPU frame start, coincident with a
// vga_en) puts them at the position that follows (0,0). row/col give the
// PPU line and column that the beam shows.
module vga_counter #(
  parameter int unsigned H_TOTAL  = 682,
  parameter int unsigned V_TOTAL  = 524,
  parameter int unsigned H_ACTIVE = 512,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned V_START  = 2,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       vga_en,
  input  logic       resync,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic [7:0] row,
  output logic [7:0] col
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (resync) begin
      hcount <= 10'd1;
      vcount <= '0;
    end else if (vga_en) begin
      if (hcount == 10'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  logic [9:0] vrel;
  always_comb begin
    vrel    = vcount - 10'(V_START);
    active  = hcount < 10'(H_ACTIVE) && vcount >= 10'(V_START) &&
              vcount < 10'(V_START + V_ACTIVE);
    hsync_n = !(hcount >= 10'(H_ACTIVE + H_FP) && hcount < 10'(H_ACTIVE + H_FP + H_SYNC));
    vsync_n = !(vcount >= 10'(V_START + V_ACTIVE + V_FP) &&
                vcount < 10'(V_START + V_ACTIVE + V_FP + V_SYNC));
    row     = vrel[8:1];
    col     = hcount[8:1];
  end
endmodule
