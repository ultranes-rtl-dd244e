// palette_ram: 32 entries of 6-bit NES colour index, 8 palettes of 4
// colours (0-3 background, 4-7 sprites). Entry 0 of each sprite palette
// ($3F10/$3F14/$3F18/$3F1C) is the same storage as the matching
// background entry, so a sprite palette's colour 0 shows the backdrop.
// Two ports: the renderer reads combinationally (r_addr -> r_color, with
// the PPUMASK greyscale bit masking the hue), the CPU port reads
// combinationally and writes at the clock edge when c_we is high. The
// size follows the design; the mirroring and greyscale are NES behaviour.
module palette_ram #(
  parameter int unsigned ENTRIES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] r_addr,
  input  logic       grey,
  output logic [5:0] r_color,
  input  logic [4:0] c_addr,
  input  logic       c_we,
  input  logic [5:0] c_wdata,
  output logic [5:0] c_rdata
);
  logic [5:0] pal [ENTRIES];

  function automatic logic [4:0] fold(input logic [4:0] a);
    return (a[1:0] == 2'b00) ? {1'b0, a[3:0]} : a;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) pal[i] <= '0;
    end else if (c_we) begin
      pal[fold(c_addr)] <= c_wdata;
    end
  end

  always_comb begin
    r_color = pal[fold(r_addr)];
    if (grey) r_color = r_color & 6'h30;
    c_rdata = pal[fold(c_addr)];
  end
endmodule
