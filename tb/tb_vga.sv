// tb_vga: feeds the VGA block with a PPU-timed pixel stream (one PPU tick
// per 8 clocks, 341 x 262 ticks per frame, 256 pixels on lines 0-239)
// whose colours come from a set of eight NES colour indices with known
// RGB values, and checks every VGA clock of the second frame: blanking
// (512x480 active area starting at VGA line 2), both syncs, and that each
// PPU pixel appears as a 2x2 block of the right RGB colour. The emphasis
// bits change every 30 PPU lines through all 8 settings; a channel must be
// dimmed to 3/4 when an emphasis bit other than its own is set.
module tb_vga;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #(40000000);
    failures++;
    $display("watchdog expired");
    finish();
  end

  logic rst, vga_en, pix_valid, frame_start, vga_hs, vga_vs, vga_blank_n;
  logic [7:0] pix_x, pix_y, vga_r, vga_g, vga_b;
  logic [5:0] pix_color;
  logic [2:0] pix_emph;
  vga dut (.*);

  localparam logic [5:0]  K   [8] = '{6'h0F, 6'h30, 6'h16, 6'h01, 6'h2A, 6'h00, 6'h10, 6'h2D};
  localparam logic [23:0] RGB [8] = '{24'h000000, 24'hFCFCFC, 24'hF83800, 24'h0000FC,
                                      24'h58D854, 24'h7C7C7C, 24'hBCBCBC, 24'h787878};
  function automatic int cidx(input int x, input int y); return (x / 8 + y / 8 + y) % 8; endfunction
  function automatic logic [23:0] rgb_ref(input int x, input int y);
    logic [23:0] c; logic [2:0] e; logic [7:0] ch;
    c = RGB[cidx(x, y)]; e = 3'(y / 30);
    for (int k = 0; k < 3; k++) begin   // k = 0 is red
      ch = c[23 - 8*k -: 8];
      if ((e & ~(3'b001 << k)) != 0) ch = ch - ch / 4;
      c[23 - 8*k -: 8] = ch;
    end
    return c;
  endfunction

  // PPU-timed source
  int div, line, cyc;
  logic ppu_tk;
  always_ff @(posedge clk) begin
    if (rst) begin div <= 0; line <= 0; cyc <= 0; pix_valid <= 0; end
    else begin
      div <= (div == 7) ? 0 : div + 1;
      pix_valid <= 1'b0;
      if (div == 0) begin
        if (line < 240 && cyc >= 1 && cyc <= 256) begin
          pix_valid <= 1'b1; pix_x <= 8'(cyc - 1); pix_y <= 8'(line);
          pix_color <= K[cidx(cyc - 1, line)];
          pix_emph  <= 3'(line / 30);
        end
        if (cyc == 340) begin cyc <= 0; line <= (line == 261) ? 0 : line + 1; end
        else cyc <= cyc + 1;
      end
    end
  end
  assign vga_en      = !rst && div % 2 == 0;
  assign ppu_tk      = !rst && div == 0;
  assign frame_start = ppu_tk && line == 0 && cyc == 0;

  int frames, th, tv, nhs, nvs;
  logic was_en, was_fs;
  initial begin
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    frames = 0; th = 0; tv = 0; nhs = 0; nvs = 0;
    while (frames < 3) begin
      was_en = vga_en; was_fs = frame_start;
      @(negedge clk);
      if (!was_en) continue;
      if (was_fs) begin frames++; th = 0; tv = 0; end
      else if (th == 681) begin th = 0; tv = (tv == 523) ? 0 : tv + 1; end
      else th++;
      if (frames == 2) begin
        bit act;
        act = th < 512 && tv >= 2 && tv < 482;
        chk(vga_blank_n == act, $sformatf("blank at %0d,%0d", th, tv));
        chk(vga_hs == !(th >= 528 && th < 624), "hsync");
        chk(vga_vs == !(tv >= 492 && tv < 494), "vsync");
        if (!vga_hs && th == 528) nhs++;
        if (!vga_vs && th == 0) nvs++;
        if (act) chk({vga_r, vga_g, vga_b} == rgb_ref(th / 2, (tv - 2) / 2),
                     $sformatf("rgb at %0d,%0d", th, tv));
        else chk({vga_r, vga_g, vga_b} == 24'h0, "black outside active area");
      end
    end
    chk(nhs == 524 && nvs == 2, $sformatf("sync counts %0d %0d", nhs, nvs));
    finish();
  end
endmodule
