// ppu_sprite: sprite renderer with its object memories.
// OAM holds NSPR sprites of 4 bytes (Y, tile, attribute, X); the CPU
// reaches it byte-wise through OAMADDR/OAMDATA. Per rendering line:
//   cycle 1       secondary OAM (NSEC entries) is cleared
//   cycles 65-128 (visible lines) evaluation looks at one sprite per cycle
//                 and copies the first NSEC that cover the next line into
//                 secondary OAM; a further one sets the overflow flag
//   cycles 257-320 eight 8-cycle groups fetch the pattern low and high
//                 byte of each secondary entry (fetch 3 and 4 of a group,
//                 the address goes out on spr_addr) and load one of the
//                 NSEC output units: pattern shift registers (flipped
//                 horizontally if asked), attribute and an X down-counter
//   cycles 1-256  (next line) each unit counts its X down to 0 and then
//                 shifts out its 8 pixels; the lowest-numbered unit with
//                 an opaque pixel wins
// Empty entries load a transparent pattern. Sprites are 8x8 or 8x16
// (PPUCTRL H); a sprite with Y = y covers lines y+1 .. y+height. The
// organisation (64 sprites, 8 per line, secondary OAM, 8 shift registers,
// counting down to 0) follows the design; evaluating one sprite per
// cycle and an overflow flag without the NES hardware's scan bug are this
// design's simplifications.
module ppu_sprite
  import nes_pkg::*;
#(
  parameter int unsigned NSPR = 64,
  parameter int unsigned NSEC = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ppu_en,
  input  logic        rendering,
  input  logic [8:0]  scanline,
  input  logic [8:0]  cycle,
  input  logic [2:0]  phase,
  input  logic        pixel_tk,
  input  ppuctrl_t    ctrl,
  input  ppumask_t    mask,
  input  logic [7:0]  rdata,          // render port data
  output logic [13:0] spr_addr,
  // OAM byte port
  input  logic [7:0]  oam_addr,
  input  logic        oam_we,
  input  logic [7:0]  oam_wdata,
  output logic [7:0]  oam_rdata,
  // pixel
  input  logic [7:0]  x,
  output logic [1:0]  pixel,
  output logic [1:0]  pal,
  output logic        behind,
  output logic        zero_opaque,    // sprite 0 is opaque here
  output logic        ovf_tk
);
  localparam int unsigned SW = $clog2(NSEC);

  logic [7:0]  oam [4*NSPR];
  oam_entry_t  sec [NSEC];
  logic [SW:0] sec_cnt;
  logic        sec_has0, line_has0;

  logic [7:0]  sh_lo [NSEC];
  logic [7:0]  sh_hi [NSEC];
  logic [7:0]  xcnt  [NSEC];
  logic [7:0]  sattr [NSEC];
  logic [7:0]  lo_q;

  logic [$clog2(NSPR)-1:0] n;
  oam_entry_t  cand;
  logic [8:0]  diff;
  logic [4:0]  height;
  logic        in_range;
  logic [SW-1:0] slot;
  oam_entry_t  fe;
  logic [8:0]  fdiff;
  logic [3:0]  row;

  // ---------------- OAM byte port ----------------
  always_ff @(posedge clk) begin
    if (oam_we) oam[oam_addr[$clog2(4*NSPR)-1:0]] <= oam_wdata;
  end
  assign oam_rdata = oam[oam_addr[$clog2(4*NSPR)-1:0]];

  // ---------------- evaluation ----------------
  always_comb begin
    n        = $bits(n)'(cycle - 9'd65);
    cand     = {oam[{n, 2'd3}], oam[{n, 2'd2}], oam[{n, 2'd1}], oam[{n, 2'd0}]};
    height   = ctrl.spr_h16 ? 5'd16 : 5'd8;
    diff     = scanline - {1'b0, cand.y};
    in_range = (scanline >= {1'b0, cand.y}) && (diff < {4'd0, height});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sec_cnt  <= '0;
      sec_has0 <= 1'b0;
      for (int i = 0; i < NSEC; i++) sec[i] <= '1;
    end else if (ppu_en && rendering) begin
      if (cycle == 9'd1) begin
        sec_cnt  <= '0;
        sec_has0 <= 1'b0;
        for (int i = 0; i < NSEC; i++) sec[i] <= '1;
      end else if (scanline < 9'(VIS_LINES) && cycle >= 9'd65 &&
                   cycle < 9'd65 + 9'(NSPR) && in_range) begin
        if (sec_cnt < (SW+1)'(NSEC)) begin
          sec[sec_cnt[SW-1:0]] <= cand;
          sec_cnt <= sec_cnt + 1'b1;
          if (n == '0) sec_has0 <= 1'b1;
        end
      end
    end
  end

  assign ovf_tk = ppu_en && rendering && scanline < 9'(VIS_LINES) &&
                  cycle >= 9'd65 && cycle < 9'd65 + 9'(NSPR) && in_range &&
                  sec_cnt == (SW+1)'(NSEC);

  // ---------------- pattern fetch ----------------
  always_comb begin
    slot  = SW'((cycle - 9'd257) >> 3);
    fe    = sec[slot];
    fdiff = scanline - {1'b0, fe.y};
    row   = fdiff[3:0];
    if (fe.attr[7]) row = ctrl.spr_h16 ? ~row : {1'b0, ~row[2:0]};
    if (ctrl.spr_h16)
      spr_addr = {1'b0, fe.tile[0], fe.tile[7:1], row[3], phase[1], row[2:0]};
    else
      spr_addr = {1'b0, ctrl.spr_tbl, fe.tile, phase[1], row[2:0]};
  end

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction

  logic fetch_tk;
  assign fetch_tk = ppu_en && rendering && cycle >= 9'd257 && cycle <= 9'd320;

  always_ff @(posedge clk) begin
    if (rst) begin
      lo_q      <= '0;
      line_has0 <= 1'b0;
      for (int i = 0; i < NSEC; i++) begin
        sh_lo[i] <= '0; sh_hi[i] <= '0; xcnt[i] <= '0; sattr[i] <= '0;
      end
    end else begin
      if (fetch_tk) begin
        if (cycle == 9'd257) line_has0 <= sec_has0;
        if (phase == 3'd5) lo_q <= rdata;
        if (phase == 3'd7) begin
          if ({1'b0, slot} < sec_cnt) begin
            sh_lo[slot] <= fe.attr[6] ? rev8(lo_q)  : lo_q;
            sh_hi[slot] <= fe.attr[6] ? rev8(rdata) : rdata;
          end else begin
            sh_lo[slot] <= '0;
            sh_hi[slot] <= '0;
          end
          xcnt[slot]  <= fe.x;
          sattr[slot] <= fe.attr;
        end
      end else if (pixel_tk && rendering) begin
        for (int i = 0; i < NSEC; i++) begin
          if (xcnt[i] != '0) xcnt[i] <= xcnt[i] - 1'b1;
          else begin
            sh_lo[i] <= sh_lo[i] << 1;
            sh_hi[i] <= sh_hi[i] << 1;
          end
        end
      end
    end
  end

  // ---------------- pixel select ----------------
  logic [1:0] p;
  always_comb begin
    p     = 2'd0;
    pixel = 2'd0; pal = 2'd0; behind = 1'b0; zero_opaque = 1'b0;
    if (mask.spr_en && !(x < 8'd8 && !mask.spr_left)) begin
      for (int i = NSEC - 1; i >= 0; i--) begin
        p = (xcnt[i] == '0) ? {sh_hi[i][7], sh_lo[i][7]} : 2'd0;
        if (p != 2'd0) begin
          pixel  = p;
          pal    = sattr[i][1:0];
          behind = sattr[i][5];
        end
      end
      zero_opaque = line_has0 && xcnt[0] == '0 && {sh_hi[0][7], sh_lo[0][7]} != 2'd0;
    end
  end
endmodule
