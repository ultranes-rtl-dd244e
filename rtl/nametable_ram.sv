// nametable_ram: the PPU's 2 KB VRAM holding two nametables with their
// attribute tables. The PPU address space $2000-$2FFF (and its mirror up
// to $3EFF) names four 1 KB nametables; with vertical mirroring tables 0/2
// and 1/3 share storage (address bit 10 selects the bank), with
// horizontal mirroring tables 0/1 and 2/3 share it (bit 11 selects).
// Dual port, both synchronous: port A is the renderer's (read only), port
// B the CPU's PPUDATA path (read, and write when b_we). Reads return the
// byte one clock after the address. Mirroring modes follow the design,
// the mode input is set by the host loader.
module nametable_ram #(
  parameter int unsigned AW = 11
) (
  input  logic        clk,
  input  logic        mirror_v,
  input  logic [11:0] a_addr,
  output logic [7:0]  a_rdata,
  input  logic [11:0] b_addr,
  input  logic        b_we,
  input  logic [7:0]  b_wdata,
  output logic [7:0]  b_rdata
);
  logic [7:0] mem [2**AW];

  function automatic logic [AW-1:0] map(input logic [11:0] a, input logic mv);
    return AW'({mv ? a[10] : a[11], a[9:0]});
  endfunction

  always_ff @(posedge clk) begin
    if (b_we) mem[map(b_addr, mirror_v)] <= b_wdata;
    a_rdata <= mem[map(a_addr, mirror_v)];
    b_rdata <= mem[map(b_addr, mirror_v)];
  end
endmodule
