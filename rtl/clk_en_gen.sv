// clk_en_gen: clock enables for the single 50 MHz clock domain.
// Every clocked block runs on clk50 and advances only when its enable is
// high. One counter modulo CPU_DIV produces all three enables, so they
// line up: vga_en every VGA_DIV clocks (25 MHz), ppu_en every PPU_DIV
// clocks (6.25 MHz), cpu_ce every CPU_DIV clocks (2.083 MHz). The
// dividers are the documented ones; deriving them from one shared
// counter is this design's choice. Enables are one-clock pulses, all high
// in the clock after reset is released and periodic from there.
module clk_en_gen #(
  parameter int unsigned VGA_DIV = 2,
  parameter int unsigned PPU_DIV = 8,
  parameter int unsigned CPU_DIV = 24
) (
  input  logic clk,
  input  logic rst,
  output logic vga_en,
  output logic ppu_en,
  output logic cpu_ce
);
  logic [$clog2(CPU_DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || cnt == $bits(cnt)'(CPU_DIV - 1)) cnt <= '0;
    else                                       cnt <= cnt + 1'b1;
  end

  always_comb begin
    vga_en = !rst && (32'(cnt) % VGA_DIV == 0);
    ppu_en = !rst && (32'(cnt) % PPU_DIV == 0);
    cpu_ce = !rst && (cnt == '0);
  end

  initial begin
    assert (CPU_DIV % PPU_DIV == 0 && PPU_DIV % VGA_DIV == 0)
      else $error("clk_en_gen: dividers must nest");
  end
endmodule
