// tb_ppu_prio_mux: exhaustive check of the priority rules and sprite-0
// hit against a reference written out case by case.
module tb_ppu_prio_mux;
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
  logic [1:0] bg_pixel, bg_pal, spr_pixel, spr_pal;
  logic spr_behind, spr0_opaque, spr0_hit;
  logic [7:0] x;
  logic [4:0] pal_addr;
  ppu_prio_mux dut (.*);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      logic [4:0] e;
      {bg_pixel, bg_pal, spr_pixel, spr_pal, spr_behind, spr0_opaque} = 10'(i);
      x = (i % 7 == 0) ? 8'd255 : 8'(i);
      #1;
      if (bg_pixel == 0 && spr_pixel == 0) e = 5'h00;
      else if (bg_pixel == 0)              e = 5'h10 + 5'(spr_pal) * 4 + 5'(spr_pixel);
      else if (spr_pixel == 0)             e = 5'(bg_pal) * 4 + 5'(bg_pixel);
      else if (spr_behind)                 e = 5'(bg_pal) * 4 + 5'(bg_pixel);
      else                                 e = 5'h10 + 5'(spr_pal) * 4 + 5'(spr_pixel);
      chk(pal_addr == e, $sformatf("case %0d", i));
      chk(spr0_hit == (spr0_opaque && bg_pixel != 0 && x != 255), "sprite 0 hit");
    end
    finish();
  end
endmodule
