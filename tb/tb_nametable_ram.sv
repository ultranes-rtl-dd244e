// tb_nametable_ram: fills the four logical nametables through port B in
// both mirroring modes and checks which ones alias, reading back through
// both ports (one clock read latency).
module tb_nametable_ram;
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
  logic mirror_v, b_we;
  logic [11:0] a_addr, b_addr;
  logic [7:0] a_rdata, b_wdata, b_rdata;
  nametable_ram dut (.*);
  task automatic wr(input logic [11:0] a, input logic [7:0] d);
    @(negedge clk); b_addr = a; b_wdata = d; b_we = 1; @(negedge clk); b_we = 0;
  endtask
  initial begin
    b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    for (int m = 0; m < 2; m++) begin
      mirror_v = m[0];
      for (int off = 0; off < 1024; off += 37) begin
        wr(12'(off), 8'(off));            // table 0
        wr(12'(off + 1024), 8'(off + 1)); // table 1
      end
      for (int off = 0; off < 1024; off += 37) begin
        for (int t = 0; t < 4; t++) begin
          logic [7:0] e;
          // vertical: tables 0/2 and 1/3 alias; horizontal: 0/1 and 2/3
          if (m == 1) e = (t % 2 == 0) ? 8'(off) : 8'(off + 1);
          else        e = (t < 2) ? 8'(off + 1) : 8'hxx;
          @(negedge clk); a_addr = 12'(t * 1024 + off); b_addr = 12'(t * 1024 + off);
          @(negedge clk);
          if (m == 1 || t < 2) chk(a_rdata == e && b_rdata == e, $sformatf("m%0d t%0d off%0d", m, t, off));
        end
      end
    end
    // horizontal: writing table 2 must not disturb table 0
    mirror_v = 0; wr(12'h800, 8'h99); wr(12'h000, 8'h11);
    @(negedge clk); a_addr = 12'hC00; @(negedge clk); chk(a_rdata == 8'h99, "table 3 aliases table 2");
    @(negedge clk); a_addr = 12'h400; @(negedge clk); chk(a_rdata == 8'h11, "table 1 aliases table 0");
    finish();
  end
endmodule
