// chr_rom: the cartridge pattern-table memory (CHR ROM), 8 KB holding
// pattern tables 0 and 1 ($0000-$1FFF of the PPU address space). Each
// tile is 16 bytes: 8 bytes of low bit planes followed by 8 bytes of high
// bit planes. Port A (renderer) and port B (CPU PPUDATA reads) are
// synchronous reads; the only write port belongs to the host loader, so
// the console itself cannot change it. Size follows the PPU memory map.
module chr_rom #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [7:0]    a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [7:0]    b_rdata,
  input  logic [AW-1:0] l_addr,
  input  logic          l_we,
  input  logic [7:0]    l_wdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (l_we) mem[l_addr] <= l_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
