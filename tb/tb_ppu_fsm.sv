// tb_ppu_fsm: runs the sequencer with rendering on for two frames and
// checks: 89,342 PPU cycles per frame, vblank set at line 241 cycle 1 and
// flags cleared at line 261 cycle 1, per-line counts of scroll strobes
// (34 coarse-X steps, one Y step, one horizontal copy, 25 vertical copies
// on the pre-render line), the fetch address order of one tile group
// (nametable, attribute, pattern low, pattern high), 256 pixel ticks per
// visible line, and no strobes with rendering off.
module tb_ppu_fsm;
  import nes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #(200000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic rst, ppu_en, render_en, bg_tbl, rendering, pixel_tk, bg_shift_tk, bg_load_tk;
  logic set_vblank_tk, clr_flags_tk, line_start_tk, frame_start_tk;
  logic [14:0] v;
  logic [13:0] spr_addr, vaddr;
  logic [7:0] rdata, bg_lo, bg_hi;
  logic [8:0] scanline, cycle;
  logic [2:0] phase;
  logic [1:0] bg_at;
  scroll_op_t scroll_op;
  ppu_fsm dut (.*);
  int n, frames, last_frame, incx, incy, cpx, cpy, pix;
  int errs_line;
  always @(posedge clk) ppu_en <= !ppu_en;   // every other clock
  initial begin
    rst = 1; ppu_en = 0; render_en = 1; bg_tbl = 1;
    v = 15'h2C5; // coarse x 5, coarse y 22, NT 0, fine y 0
    spr_addr = 14'h1ABC; rdata = 8'h37;
    repeat (2) @(negedge clk); rst = 0;
    n = 0; frames = 0; last_frame = -1;
    while (frames < 3) begin
      @(negedge clk);
      if (!ppu_en) continue;
      if (frame_start_tk) begin
        if (last_frame >= 0) chk(n - last_frame == 89342, $sformatf("frame cycles %0d", n - last_frame));
        last_frame = n; frames++;
      end
      if (set_vblank_tk) chk(scanline == 241 && cycle == 1, "vblank set point");
      if (clr_flags_tk)  chk(scanline == 261 && cycle == 1, "flag clear point");
      if (cycle == 0) begin incx = 0; incy = 0; cpx = 0; cpy = 0; pix = 0; end
      incx += int'(scroll_op.inc_x); incy += int'(scroll_op.inc_y);
      cpx += int'(scroll_op.copy_x); cpy += int'(scroll_op.copy_y); pix += int'(pixel_tk);
      if (cycle == 340 && frames == 1 && (scanline < 240 || scanline == 261)) begin
        chk(incx == 34 && incy == 1 && cpx == 1, $sformatf("line %0d strobes %0d %0d %0d", scanline, incx, incy, cpx));
        chk(cpy == (scanline == 261 ? 25 : 0), "vertical copies");
        chk(pix == (scanline < 240 ? 256 : 0), "pixel ticks");
      end
      if (frames == 1 && scanline == 10) begin
        case (cycle)
          9'd1, 9'd2: chk(vaddr == 14'h22C5, $sformatf("nt addr %h", vaddr));
          9'd3, 9'd4: chk(vaddr == 14'h23E9, $sformatf("at addr %h", vaddr));
          9'd5, 9'd6: chk(vaddr == 14'h1370, $sformatf("pt lo addr %h", vaddr));
          9'd7, 9'd8: chk(vaddr == 14'h1378, $sformatf("pt hi addr %h", vaddr));
          9'd261, 9'd262: chk(vaddr == 14'h1ABC, "sprite fetch address");
          default: ;
        endcase
        if (cycle == 8) chk(bg_load_tk && bg_lo == 8'h37 && bg_hi == 8'h37, "tile handed over");
      end
      if (frames == 2 && scanline == 0 && cycle == 0) render_en = 0;
      if (frames == 2 && scanline == 5)
        chk(!bg_shift_tk && scroll_op == '0 && !rendering, "no strobes when disabled");
      n++;
    end
    finish();
  end
endmodule
