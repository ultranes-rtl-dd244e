// tb_palette_ram: writes all 32 addresses in order and checks reads
// against a reference model with the $3F10/$14/$18/$1C mirrors, plus the
// greyscale masking on the render port.
module tb_palette_ram;
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
  logic rst, grey, c_we;
  logic [4:0] r_addr, c_addr;
  logic [5:0] r_color, c_wdata, c_rdata;
  logic [5:0] ref_m [32];
  palette_ram dut (.*);
  initial begin
    rst = 1; grey = 0; c_we = 0; r_addr = 0; c_addr = 0; c_wdata = 0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) ref_m[i] = 0;
    for (int k = 0; k < 64; k++) begin
      logic [4:0] a; logic [5:0] d;
      a = 5'($urandom); d = 6'($urandom);
      @(negedge clk); c_addr = a; c_wdata = d; c_we = 1;
      ref_m[a] = d;
      if (a[1:0] == 0) ref_m[a ^ 5'h10] = d;
    end
    @(negedge clk); c_we = 0;
    for (int i = 0; i < 32; i++) begin
      r_addr = 5'(i); c_addr = 5'(i); grey = 0; #1;
      chk(r_color == ref_m[i] && c_rdata == ref_m[i], $sformatf("entry %0d", i));
      grey = 1; #1;
      chk(r_color == (ref_m[i] & 6'h30), "greyscale");
    end
    finish();
  end
endmodule
