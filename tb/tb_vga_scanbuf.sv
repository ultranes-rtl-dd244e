// tb_vga_scanbuf: writes two lines with different data and reads each
// back, also while the other half is being rewritten.
module tb_vga_scanbuf;
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
    #(2000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic wr_en, wr_line, rd_en, rd_line;
  logic [7:0] wr_x, rd_x;
  logic [8:0] wr_data, rd_data;
  vga_scanbuf dut (.*);
  initial begin
    wr_en = 0; rd_en = 0; wr_line = 0; rd_line = 0; wr_x = 0; rd_x = 0; wr_data = 0;
    for (int l = 0; l < 2; l++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); wr_en = 1; wr_line = l[0]; wr_x = 8'(i); wr_data = 9'(i * 3 + l * 17);
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 256; i++) begin
      // rewrite line 1 while reading line 0
      @(negedge clk); rd_en = 1; rd_line = 0; rd_x = 8'(i); wr_en = 1; wr_line = 1; wr_x = 8'(i); wr_data = 9'(~i);
      @(negedge clk); rd_en = 0; wr_en = 0; chk(rd_data == 9'(i * 3), $sformatf("line0 x%0d", i));
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rd_en = 1; rd_line = 1; rd_x = 8'(i);
      @(negedge clk); rd_en = 0; chk(rd_data == 9'(~i), $sformatf("line1 x%0d", i));
      repeat (2) @(negedge clk); chk(rd_data == 9'(~i), "held without rd_en");
    end
    finish();
  end
endmodule
