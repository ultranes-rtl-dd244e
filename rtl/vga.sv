// vga: the VGA output subsystem. The PPU's pixel stream is written into
// the two-line scan buffer; vga_counter walks the VGA raster at 25 MHz
// (vga_en) and, for every active position, reads the colour index of PPU
// pixel (col, row) from the buffer half that is not being written, then
// the LUT turns it and the pixel's emphasis bits into RGB. Every PPU
// pixel therefore covers 2x2 VGA pixels, and each PPU scanline is shown
// on two VGA lines, displayed one PPU line after it was drawn. The
// buffer read takes one vga_en step, so sync and blank are delayed by the
// same step to stay aligned with rgb.
// Outside the active area rgb is 0. Structure (scanbuf, LUT,
// vga_counter, doubling) follows the design.
module vga (
  input  logic        clk,
  input  logic        rst,
  input  logic        vga_en,
  // from the PPU
  input  logic        pix_valid,
  input  logic [7:0]  pix_x,
  input  logic [7:0]  pix_y,
  input  logic [5:0]  pix_color,
  input  logic [2:0]  pix_emph,
  input  logic        frame_start,
  // to the DAC
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n
);
  logic [9:0]  hc, vc;
  logic        active, hs_n, vs_n;
  logic [7:0]  row, col;
  logic [5:0]  idx;
  logic [2:0]  emph;
  logic [23:0] rgb;

  vga_counter u_cnt (
    .clk, .rst, .vga_en, .resync(frame_start),
    .hcount(hc), .vcount(vc), .active, .hsync_n(hs_n), .vsync_n(vs_n),
    .row, .col
  );

  vga_scanbuf u_buf (
    .clk,
    .wr_en(pix_valid), .wr_line(pix_y[0]), .wr_x(pix_x), .wr_data({pix_emph, pix_color}),
    .rd_en(vga_en), .rd_line(row[0]), .rd_x(col), .rd_data({emph, idx})
  );

  vga_lut u_lut (.idx, .emph, .rgb);

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_hs <= 1'b1; vga_vs <= 1'b1; vga_blank_n <= 1'b0;
    end else if (vga_en) begin
      vga_hs <= hs_n; vga_vs <= vs_n; vga_blank_n <= active;
    end
  end

  always_comb begin
    {vga_r, vga_g, vga_b} = vga_blank_n ? rgb : 24'h0;
  end
endmodule
