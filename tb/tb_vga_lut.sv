// tb_vga_lut: spot-checks the colour table (black, white, greys, primary
// hues) and that the unused $xE/$xF entries are black, then all 8
// emphasis settings on every colour: a channel must be dimmed to 3/4
// exactly when an emphasis bit other than its own is set.
module tb_vga_lut;
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
    #(1000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic [5:0] idx;
  logic [2:0] emph;
  logic [23:0] base;
  logic [7:0] exp_c [3];
  logic [23:0] rgb;
  vga_lut dut (.*);
  initial begin
    emph = 3'b000;
    idx = 6'h0F; #1 chk(rgb == 24'h000000, "0F black");
    idx = 6'h30; #1 chk(rgb == 24'hFCFCFC, "30 white");
    idx = 6'h00; #1 chk(rgb == 24'h7C7C7C, "00 grey");
    idx = 6'h10; #1 chk(rgb == 24'hBCBCBC, "10 grey");
    idx = 6'h2D; #1 chk(rgb == 24'h787878, "2D grey");
    idx = 6'h16; #1 chk(rgb == 24'hF83800, "16 red");
    idx = 6'h01; #1 chk(rgb == 24'h0000FC, "01 blue");
    idx = 6'h2A; #1 chk(rgb == 24'h58D854, "2A green");
    for (int i = 0; i < 4; i++) begin
      idx = 6'(i * 16 + 14); #1 chk(rgb == 24'h0, "xE black");
      idx = 6'(i * 16 + 15); #1 chk(rgb == 24'h0, "xF black");
      idx = 6'(i * 16 + 1);  #1 chk(rgb[7:0] > rgb[23:16], "x1 is blue-ish");
    end
    emph = 3'b001; idx = 6'h30; #1 chk(rgb == 24'hFCBDBD, "30 red emphasis");
    emph = 3'b100; idx = 6'h30; #1 chk(rgb == 24'hBDBDFC, "30 blue emphasis");
    emph = 3'b111; idx = 6'h30; #1 chk(rgb == 24'hBDBDBD, "30 all emphasis");
    for (int i = 0; i < 64; i++) begin
      emph = 3'b000; idx = 6'(i); #1 base = rgb;
      for (int e = 1; e < 8; e++) begin
        emph = 3'(e); #1;
        for (int c = 0; c < 3; c++) begin
          exp_c[c] = base[23 - 8*c -: 8];
          if ((e & ~(1 << c)) != 0) exp_c[c] = exp_c[c] - exp_c[c] / 4;
        end
        chk(rgb == {exp_c[0], exp_c[1], exp_c[2]}, $sformatf("emph %0d idx %0h", e, i));
      end
    end
    finish();
  end
endmodule
