// ppu_regs: the PPU's CPU-visible registers and scroll state.
// Registers (index = CPU address bits 2..0, mirrored through $2000-$3FFF):
//   0 PPUCTRL   write   NMI enable, master/slave, sprite height, pattern
//                       tables, increment mode, nametable select
//   1 PPUMASK   write   emphasis, sprite/background enable, left-column
//                       enables, greyscale
//   2 PPUSTATUS read    vblank, sprite 0 hit, overflow in bits 7..5; the
//                       read clears vblank and the write-pair toggle
//   3 OAMADDR   write   OAM address
//   4 OAMDATA   r/w     OAM byte at OAMADDR; a write advances OAMADDR
//   5 PPUSCROLL write x2 X scroll, then Y scroll
//   6 PPUADDR   write x2 high byte, then low byte of the VRAM address
//   7 PPUDATA   r/w     VRAM byte at the VRAM address, which then advances
//                       by 1 or 32
// Scrolling uses the usual shared registers: v (current VRAM address,
// also the scroll position during rendering), t (its temporary copy),
// fine X and the write toggle w; the fetch sequencer's strobes advance
// and reload v during rendering. PPUDATA reads below $3F00 return a
// buffered byte (the buffer is then refilled), palette reads are direct.
// The register set and meanings follow the design; bit positions, the
// v/t/x/w scheme and the read buffer are the standard NES behaviour.
// Timing: a register access is the clock where cs and bus_ce are high;
// writes and read side effects happen at its edge and the read value is
// registered there (rdata holds it until the next access).
module ppu_regs
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_ce,
  input  logic        cs,
  input  logic [2:0]  ra,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // state
  output ppuctrl_t    ctrl,
  output ppumask_t    mask,
  output logic [14:0] v,
  output logic [2:0]  fine_x,
  // flags
  input  logic        set_vblank,
  input  logic        clr_flags,
  input  logic        spr0_hit,
  input  logic        spr_ovf,
  output logic        nmi,
  // rendering updates of v
  input  scroll_op_t  scroll_op,
  // OAM port
  output logic [7:0]  oam_addr,
  output logic        oam_we,
  output logic [7:0]  oam_wdata,
  input  logic [7:0]  oam_rdata,
  // VRAM port (CPU side): address is v[13:0]
  output logic        vram_we,
  output logic [7:0]  vram_wdata,
  input  logic [7:0]  vram_rdata,     // nametable/pattern byte at v, valid each clock
  input  logic [5:0]  pal_rdata       // palette entry at v
);
  logic [14:0] t;
  logic        w;
  logic        vblank, hit, ovf;
  logic [7:0]  rbuf;
  logic        acc, wr, rd;
  logic [14:0] v_step;

  assign acc = bus_ce && cs;
  assign wr  = acc && we;
  assign rd  = acc && !we;
  assign nmi = vblank && ctrl.nmi_en;
  assign v_step = v + (ctrl.inc32 ? 15'd32 : 15'd1);

  assign oam_we     = wr && ra == 3'd4;
  assign oam_wdata  = wdata;
  assign vram_we    = wr && ra == 3'd7;
  assign vram_wdata = wdata;

  // rendering updates of v
  function automatic logic [14:0] inc_x(input logic [14:0] a);
    if (a[4:0] == 5'd31) return {a[14:11], ~a[10], a[9:5], 5'd0};
    return {a[14:5], a[4:0] + 5'd1};
  endfunction
  function automatic logic [14:0] inc_y(input logic [14:0] a);
    logic [4:0] cy;
    if (a[14:12] != 3'd7) return {a[14:12] + 3'd1, a[11:0]};
    cy = a[9:5];
    if (cy == 5'd29)      return {3'd0, a[11], ~a[10], 5'd0, a[4:0]};
    else if (cy == 5'd31) return {3'd0, a[11:10], 5'd0, a[4:0]};
    return {3'd0, a[11:10], cy + 5'd1, a[4:0]};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0; mask <= '0; t <= '0; v <= '0; fine_x <= '0; w <= 1'b0;
      vblank <= 1'b0; hit <= 1'b0; ovf <= 1'b0; rbuf <= '0; oam_addr <= '0;
      rdata <= '0;
    end else begin
      // flags from the renderer
      if (set_vblank) vblank <= 1'b1;
      if (spr0_hit)   hit    <= 1'b1;
      if (spr_ovf)    ovf    <= 1'b1;
      if (clr_flags) begin
        vblank <= 1'b0; hit <= 1'b0; ovf <= 1'b0;
      end
      // scroll updates while rendering
      if (scroll_op.inc_x)  v <= inc_x(v);
      if (scroll_op.inc_y)  v <= inc_y(v);
      if (scroll_op.copy_x) v <= {v[14:11], t[10], v[9:5], t[4:0]};
      if (scroll_op.copy_y) v <= {t[14:11], v[10], t[9:5], v[4:0]};

      if (wr) begin
        unique case (ra)
          3'd0: begin ctrl <= ppuctrl_t'(wdata); t[11:10] <= wdata[1:0]; end
          3'd1: mask <= ppumask_t'(wdata);
          3'd3: oam_addr <= wdata;
          3'd4: oam_addr <= oam_addr + 1'b1;
          3'd5: begin
            if (!w) begin t[4:0] <= wdata[7:3]; fine_x <= wdata[2:0]; end
            else    begin t[14:12] <= wdata[2:0]; t[9:5] <= wdata[7:3]; end
            w <= !w;
          end
          3'd6: begin
            if (!w) t[14:8] <= {1'b0, wdata[5:0]};
            else begin t[7:0] <= wdata; v <= {t[14:8], wdata}; end
            w <= !w;
          end
          3'd7: v <= v_step;
          default: ;
        endcase
      end else if (rd) begin
        unique case (ra)
          3'd2: begin
            rdata <= {vblank, hit, ovf, 5'd0};
            vblank <= 1'b0;
            w <= 1'b0;
          end
          3'd4: rdata <= oam_rdata;
          3'd7: begin
            rdata <= (v[13:8] == 6'h3F) ? {2'b00, pal_rdata} : rbuf;
            rbuf  <= vram_rdata;
            v     <= v_step;
          end
          default: rdata <= 8'h00;
        endcase
      end
    end
  end
endmodule
