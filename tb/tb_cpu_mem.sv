// tb_cpu_mem: loads ROM and RAM through the loader port, then checks CPU
// reads (with the enable gating), RAM mirroring through $1FFF, CPU writes
// to RAM and that CPU writes to ROM are ignored.
module tb_cpu_mem;
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
  logic        a_en, a_we, b_we;
  logic [15:0] a_addr, b_addr;
  logic [7:0]  a_wdata, a_rdata, b_wdata, b_rdata;
  cpu_mem dut (.*);
  function automatic logic [7:0] romv(input int a); return 8'((a * 7 + 3) ^ (a >> 8)); endfunction
  task automatic cpu(input logic [15:0] a, input logic w, input logic [7:0] d);
    @(negedge clk); a_en = 1; a_addr = a; a_we = w; a_wdata = d;
    @(negedge clk); a_en = 0; a_we = 0;
  endtask
  initial begin
    a_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 32768; i += 97) begin
      @(negedge clk); b_addr = 16'h8000 + 16'(i); b_wdata = romv(i); b_we = 1;
    end
    for (int i = 0; i < 2048; i += 13) begin
      @(negedge clk); b_addr = 16'(i); b_wdata = 8'(i ^ 8'h5A); b_we = 1;
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 32768; i += 97) begin
      cpu(16'h8000 + 16'(i), 0, 0); chk(a_rdata == romv(i), $sformatf("rom %h", i));
    end
    for (int i = 0; i < 2048; i += 13) begin
      cpu(16'(i) | 16'h1800, 0, 0); chk(a_rdata == 8'(i ^ 8'h5A), $sformatf("ram mirror %h", i));
    end
    cpu(16'h0123, 1, 8'hC3); cpu(16'h0923, 0, 0); chk(a_rdata == 8'hC3, "cpu write ram, mirror read");
    // enable gating: rdata holds while a_en low
    @(negedge clk); a_addr = 16'h8000; repeat (3) @(negedge clk);
    chk(a_rdata == 8'hC3, "rdata held without enable");
    cpu(16'h8000, 1, 8'h11); cpu(16'h8000, 0, 0); chk(a_rdata == romv(0), "cpu write to rom ignored");
    @(negedge clk); b_addr = 16'h8000 + 97; @(negedge clk); chk(b_rdata == romv(97), "loader readback");
    finish();
  end
endmodule
