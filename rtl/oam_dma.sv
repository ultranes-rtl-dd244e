// oam_dma: sprite DMA started by a CPU write to OAMDMA ($4014).
// The written byte is the high address of a 256-byte CPU page. While
// active, the engine owns the CPU bus (and the CPU is held with its ready
// input low) and copies $XX00..$XXFF into OAMDATA ($2004): each byte takes
// two bus cycles, a read of the source byte and then a write of the byte
// just read to $2004, so a transfer lasts 512 bus cycles. The register and
// its purpose follow the NES register set; the two-cycle copy without the
// hardware's extra alignment cycle is this design's choice. The engine
// advances on bus_ce and takes read data from the bus one cycle later,
// matching cpu_bus timing.
module oam_dma (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_ce,
  input  logic        start,      // bus cycle writes $4014 (qualified by bus_ce)
  input  logic [7:0]  page,
  input  logic [7:0]  rdata,      // CPU bus read data
  output logic        active,
  output logic [15:0] addr,
  output logic        we,
  output logic [7:0]  wdata
);
  logic [7:0] page_q, idx_q;
  logic       wr_phase;           // 0: read source byte, 1: write $2004

  always_ff @(posedge clk) begin
    if (rst) begin
      active   <= 1'b0;
      page_q   <= '0;
      idx_q    <= '0;
      wr_phase <= 1'b0;
    end else if (bus_ce) begin
      if (!active) begin
        if (start) begin
          active   <= 1'b1;
          page_q   <= page;
          idx_q    <= '0;
          wr_phase <= 1'b0;
        end
      end else begin
        wr_phase <= !wr_phase;
        if (wr_phase) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == 8'hFF) active <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    addr  = wr_phase ? 16'h2004 : {page_q, idx_q};
    we    = active && wr_phase;
    wdata = rdata;
  end
endmodule
