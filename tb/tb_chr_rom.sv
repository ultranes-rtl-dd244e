// tb_chr_rom: loads a pattern through the loader port and reads it back
// through both read ports.
module tb_chr_rom;
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
  logic [12:0] a_addr, b_addr, l_addr;
  logic [7:0] a_rdata, b_rdata, l_wdata;
  logic l_we;
  chr_rom dut (.*);
  function automatic logic [7:0] f(input int a); return 8'(a * 13 + (a >> 5)); endfunction
  initial begin
    l_we = 0; a_addr = 0; b_addr = 0; l_addr = 0; l_wdata = 0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); l_addr = 13'(i); l_wdata = f(i); l_we = 1;
    end
    @(negedge clk); l_we = 0;
    for (int i = 0; i < 300; i++) begin
      int x, y;
      x = $urandom % 8192; y = $urandom % 8192;
      @(negedge clk); a_addr = 13'(x); b_addr = 13'(y);
      @(negedge clk); chk(a_rdata == f(x) && b_rdata == f(y), "readback");
    end
    finish();
  end
endmodule
