// cpu_mem: CPU-side memory, 2 KB work RAM plus program ROM, dual ported.
// Port A belongs to the CPU bus and acts only in clocks where a_en (the
// CPU clock enable) is high: a read captures the addressed byte into
// a_rdata, which then holds until the next enabled clock; a write reaches
// only the RAM, whose 2 KB image repeats
// through $0000-$1FFF because only the low RAM_AW address bits are used.
// Port B belongs to the host loader and may write RAM and ROM (ROM is
// $8000-$FFFF, a 16 KB image is loaded twice by the host). Sizes follow
// the NES memory map; sharing one dual-port module for RAM and ROM
// follows the design, the exact port split is this design's choice.
// A port A write to RAM wins over a port B write in the same clock; the
// host loads memory while it holds the CPU in reset.
module cpu_mem #(
  parameter int unsigned RAM_AW = 11,
  parameter int unsigned ROM_AW = 15
) (
  input  logic        clk,
  // port A: CPU bus
  input  logic        a_en,
  input  logic [15:0] a_addr,
  input  logic        a_we,
  input  logic [7:0]  a_wdata,
  output logic [7:0]  a_rdata,
  // port B: loader
  input  logic [15:0] b_addr,
  input  logic        b_we,
  input  logic [7:0]  b_wdata,
  output logic [7:0]  b_rdata
);
  logic [7:0] ram [2**RAM_AW];
  logic [7:0] rom [2**ROM_AW];

  logic a_is_rom, b_is_rom;
  assign a_is_rom = a_addr[15];
  assign b_is_rom = b_addr[15];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !a_is_rom) ram[a_addr[RAM_AW-1:0]] <= a_wdata;
    else if (b_we && !b_is_rom) ram[b_addr[RAM_AW-1:0]] <= b_wdata;
    if (b_we && b_is_rom) rom[b_addr[ROM_AW-1:0]] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= a_is_rom ? rom[a_addr[ROM_AW-1:0]] : ram[a_addr[RAM_AW-1:0]];
    b_rdata <= b_is_rom ? rom[b_addr[ROM_AW-1:0]] : ram[b_addr[RAM_AW-1:0]];
  end
endmodule
