// vga_scanbuf: the scan buffer between the PPU and VGA sides, a 256x2
// array of pixels, i.e. two full PPU scanlines. Each entry is DW bits: the
// 6-bit colour index and the 3 emphasis bits in force when it was drawn. The PPU
// writes line y into half y[0] pixel by pixel (wr_en pulses); meanwhile
// the VGA side reads the other half, the previous line, twice (once per
// doubled VGA line). Writes and reads are synchronous and independent;
// rd_data holds the byte addressed in the last clock with rd_en high.
// Size and double-line organisation follow the design.
module vga_scanbuf #(
  parameter int unsigned W  = 256,
  parameter int unsigned DW = 9
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic                 wr_line,
  input  logic [$clog2(W)-1:0] wr_x,
  input  logic [DW-1:0]        wr_data,
  input  logic                 rd_en,
  input  logic                 rd_line,
  input  logic [$clog2(W)-1:0] rd_x,
  output logic [DW-1:0]        rd_data
);
  logic [DW-1:0] mem [2*W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_line, wr_x}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_line, rd_x}];
  end
endmodule
