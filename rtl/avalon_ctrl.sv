// avalon_ctrl: Avalon-MM slave through which the host (a Linux driver
// behind the HPS bridge) loads and controls the console. Address map
// (byte addresses, 8-bit write data, 16-bit read data, read latency 1):
//   0x00000-0x0FFFF  CPU memory: RAM $0000-$07FF and program ROM
//                    $8000-$FFFF by CPU address; read and write
//   0x10000-0x11FFF  CHR ROM (PPU pattern tables), write only
//   0x18000          control: write bit 0 = CPU reset, bit 1 = vertical
//                    nametable mirroring; read = the CPU address bus
// The CPU is held in reset after power-up until the host releases it.
// The commands it serves (reset high/low, load CPU/PPU memory, write a
// value to an address, show the address bus) are those of the host
// utility; the address map and register layout are this design's own.
module avalon_ctrl (
  input  logic        clk,
  input  logic        rst,
  input  logic [16:0] avs_address,
  input  logic        avs_write,
  input  logic [7:0]  avs_writedata,
  input  logic        avs_read,
  output logic [15:0] avs_readdata,
  // CPU memory loader port
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  // CHR loader port
  output logic [12:0] chr_addr,
  output logic        chr_we,
  output logic [7:0]  chr_wdata,
  // control
  input  logic [15:0] cpu_addr_mon,
  output logic        cpu_reset,
  output logic        mirror_v
);
  typedef enum logic [1:0] {R_MEM, R_CHR, R_CTL} region_e;
  region_e region, rsel_q;
  logic [15:0] ctl_q;

  always_comb begin
    if (!avs_address[16])      region = R_MEM;
    else if (!avs_address[15]) region = R_CHR;
    else                       region = R_CTL;
    mem_addr  = avs_address[15:0];
    mem_we    = avs_write && region == R_MEM;
    mem_wdata = avs_writedata;
    chr_addr  = avs_address[12:0];
    chr_we    = avs_write && region == R_CHR;
    chr_wdata = avs_writedata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_reset <= 1'b1;
      mirror_v  <= 1'b0;
      rsel_q    <= R_MEM;
      ctl_q     <= '0;
    end else begin
      if (avs_write && region == R_CTL) begin
        cpu_reset <= avs_writedata[0];
        mirror_v  <= avs_writedata[1];
      end
      if (avs_read) begin
        rsel_q <= region;
        ctl_q  <= cpu_addr_mon;
      end
    end
  end

  assign avs_readdata = (rsel_q == R_CTL) ? ctl_q :
                        (rsel_q == R_MEM) ? {8'h00, mem_rdata} : 16'h0000;
endmodule
