// cpu_bus: the CPU bus of the console, with its partial address decoder.
// Two masters share it: the 6502 core and, while it runs, the OAM DMA
// engine (which also halts the core). The decoder looks only at the
// address bits it needs, so memory repeats across the map:
//   $0000-$1FFF  work RAM (2 KB, mirrored)      A15..A13 = 000
//   $2000-$3FFF  PPU registers, 8 of them        A15..A13 = 001, A2..A0
//   $4014        OAMDMA                          full compare
//   $8000-$FFFF  program ROM                     A15 = 1
// Everything else reads as 0. A bus cycle is one clock where bus_ce is
// high: address, write enable and write data are valid in that clock and
// a write commits at its edge; read data is returned by the selected
// target after that edge, and rdata holds it until the next bus_ce. The
// selection of the read-data source is registered for that reason.
module cpu_bus (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_ce,
  // master 0: CPU
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  // master 1: OAM DMA
  input  logic        dma_active,
  input  logic [15:0] dma_addr,
  input  logic        dma_we,
  input  logic [7:0]  dma_wdata,
  // selected master
  output logic [15:0] m_addr,
  output logic        m_we,
  output logic [7:0]  m_wdata,
  // decoded selects
  output logic        mem_cs,     // RAM or ROM
  output logic        ppu_cs,
  output logic        dma_cs,
  // read data
  input  logic [7:0]  mem_rdata,
  input  logic [7:0]  ppu_rdata,
  output logic [7:0]  rdata
);
  typedef enum logic [1:0] {SRC_NONE, SRC_MEM, SRC_PPU} src_e;
  src_e src_q;

  always_comb begin
    m_addr  = dma_active ? dma_addr  : cpu_addr;
    m_we    = dma_active ? dma_we    : cpu_we;
    m_wdata = dma_active ? dma_wdata : cpu_wdata;
    mem_cs  = (m_addr[15:13] == 3'b000) || m_addr[15];
    ppu_cs  = (m_addr[15:13] == 3'b001);
    dma_cs  = (m_addr == 16'h4014);
  end

  always_ff @(posedge clk) begin
    if (rst) src_q <= SRC_NONE;
    else if (bus_ce && !m_we)
      src_q <= mem_cs ? SRC_MEM : ppu_cs ? SRC_PPU : SRC_NONE;
  end

  always_comb begin
    unique case (src_q)
      SRC_MEM: rdata = mem_rdata;
      SRC_PPU: rdata = ppu_rdata;
      default: rdata = 8'h00;
    endcase
  end
endmodule
