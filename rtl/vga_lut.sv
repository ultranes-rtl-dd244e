// vga_lut: converts a 6-bit NES colour index into 24-bit RGB for the
// VGA DAC ({R,G,B}, 8 bits each). The 64 values are a commonly used
// approximation of the NES's composite-video colours; indices $xD-$xF
// (except $2D) are black. Purely combinational. The lookup table itself
// is part of the design, the chosen colour values are this design's.
// Colour emphasis (PPUMASK bits 5-7, carried per pixel as emph = {B,G,R})
// is applied here: as on the NES, each set bit dims the other two
// channels, so a channel is dimmed to 3/4 (c - c/4) when any emphasis bit
// other than its own is set. The NES does this in the analog video
// signal; the 3/4 factor (applied once, not per bit) is this design's.
module vga_lut (
  input  logic [5:0]  idx,
  input  logic [2:0]  emph,
  output logic [23:0] rgb
);
  logic [23:0] base;
  logic [7:0]  ch [3];   // 0 = R, 1 = G, 2 = B

  always_comb begin
    {ch[0], ch[1], ch[2]} = base;
    for (int c = 0; c < 3; c++)
      if ((emph & ~(3'b001 << c)) != 3'b000) ch[c] = ch[c] - (ch[c] >> 2);
    rgb = {ch[0], ch[1], ch[2]};
  end

  always_comb begin
    unique case (idx)
      6'h00: base = 24'h7C7C7C;  6'h01: base = 24'h0000FC;  6'h02: base = 24'h0000BC;  6'h03: base = 24'h4428BC;
      6'h04: base = 24'h940084;  6'h05: base = 24'hA80020;  6'h06: base = 24'hA81000;  6'h07: base = 24'h881400;
      6'h08: base = 24'h503000;  6'h09: base = 24'h007800;  6'h0A: base = 24'h006800;  6'h0B: base = 24'h005800;
      6'h0C: base = 24'h004058;  6'h0D: base = 24'h000000;  6'h0E: base = 24'h000000;  6'h0F: base = 24'h000000;
      6'h10: base = 24'hBCBCBC;  6'h11: base = 24'h0078F8;  6'h12: base = 24'h0058F8;  6'h13: base = 24'h6844FC;
      6'h14: base = 24'hD800CC;  6'h15: base = 24'hE40058;  6'h16: base = 24'hF83800;  6'h17: base = 24'hE45C10;
      6'h18: base = 24'hAC7C00;  6'h19: base = 24'h00B800;  6'h1A: base = 24'h00A800;  6'h1B: base = 24'h00A844;
      6'h1C: base = 24'h008888;  6'h1D: base = 24'h000000;  6'h1E: base = 24'h000000;  6'h1F: base = 24'h000000;
      6'h20: base = 24'hF8F8F8;  6'h21: base = 24'h3CBCFC;  6'h22: base = 24'h6888FC;  6'h23: base = 24'h9878F8;
      6'h24: base = 24'hF878F8;  6'h25: base = 24'hF85898;  6'h26: base = 24'hF87858;  6'h27: base = 24'hFCA044;
      6'h28: base = 24'hF8B800;  6'h29: base = 24'hB8F818;  6'h2A: base = 24'h58D854;  6'h2B: base = 24'h58F898;
      6'h2C: base = 24'h00E8D8;  6'h2D: base = 24'h787878;  6'h2E: base = 24'h000000;  6'h2F: base = 24'h000000;
      6'h30: base = 24'hFCFCFC;  6'h31: base = 24'hA4E4FC;  6'h32: base = 24'hB8B8F8;  6'h33: base = 24'hD8B8F8;
      6'h34: base = 24'hF8B8F8;  6'h35: base = 24'hF8A4C0;  6'h36: base = 24'hF0D0B0;  6'h37: base = 24'hFCE0A8;
      6'h38: base = 24'hF8D878;  6'h39: base = 24'hD8F878;  6'h3A: base = 24'hB8F8B8;  6'h3B: base = 24'hB8F8D8;
      6'h3C: base = 24'h00FCFC;  6'h3D: base = 24'hF8D8F8;  6'h3E: base = 24'h000000;  6'h3F: base = 24'h000000;
    endcase
  end
endmodule
