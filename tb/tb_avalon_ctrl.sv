// tb_avalon_ctrl: checks the host address map: CPU-memory and CHR writes
// reach the right port, CPU memory and the address monitor read back with
// one cycle latency, the control bits set reset and mirroring. A
// randomized part then makes 4000 random reads and writes over the whole
// address range, with memories behind the loader ports, and checks each read,
// the control bits after every access, and finally every byte of both
// memories against reference copies.
module tb_avalon_ctrl;
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
  logic rst, avs_write, avs_read, mem_we, chr_we, cpu_reset, mirror_v;
  logic [16:0] avs_address;
  logic [7:0] avs_writedata, mem_wdata, mem_rdata, chr_wdata;
  logic [15:0] avs_readdata, mem_addr, cpu_addr_mon;
  logic [12:0] chr_addr;
  avalon_ctrl dut (.*);

  // randomized part: synchronous memories behind the loader ports (one
  // clock read latency, as in the console) and reference copies
  logic       model_on = 1'b0;
  logic [7:0] tb_mem [65536], ref_mem [65536];
  logic [7:0] tb_chr [8192],  ref_chr [8192];
  always @(posedge clk) if (model_on) begin
    if (mem_we) tb_mem[mem_addr] <= mem_wdata;
    mem_rdata <= tb_mem[mem_addr];
    if (chr_we) tb_chr[chr_addr] <= chr_wdata;
  end
  task automatic random_part();
    logic [16:0] a; logic [7:0] dd; logic m_rst, m_mv; logic [15:0] mon;
    int n_mem, n_chr, n_ctl, n_rd, bad_mem, bad_chr;
    for (int i = 0; i < 65536; i++) begin tb_mem[i] = 8'(i * 7); ref_mem[i] = 8'(i * 7); end
    for (int i = 0; i < 8192; i++)  begin tb_chr[i] = 8'(i * 5); ref_chr[i] = 8'(i * 5); end
    m_rst = cpu_reset; m_mv = mirror_v;
    n_mem = 0; n_chr = 0; n_ctl = 0; n_rd = 0;
    @(negedge clk); model_on = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      dd = 8'($urandom); mon = 16'($urandom);
      case ($urandom % 8)
        0, 1: a = {1'b0, 16'($urandom)};
        2, 3: a = {4'b1000, 13'($urandom)};
        4:    a = 17'h18000;
        default: a = ($urandom % 2 == 1) ? {1'b0, 16'($urandom % 64)} : 17'($urandom);
      endcase
      @(negedge clk);
      avs_address = a; avs_writedata = dd; cpu_addr_mon = mon;
      if ($urandom % 2 == 1) begin
        avs_write = 1;
        @(negedge clk); avs_write = 0;
        if (!a[16])      begin ref_mem[a[15:0]] = dd; n_mem++; end
        else if (!a[15]) begin ref_chr[a[12:0]] = dd; n_chr++; end
        else             begin m_rst = dd[0]; m_mv = dd[1]; n_ctl++; end
      end else begin
        avs_read = 1;
        @(negedge clk); avs_read = 0; n_rd++;
        if (!a[16])      chk(avs_readdata == {8'h00, ref_mem[a[15:0]]}, $sformatf("read %h", a));
        else if (!a[15]) chk(avs_readdata == 16'h0000, "CHR reads as 0");
        else             chk(avs_readdata == mon, "address monitor sampled at the read");
      end
      chk(cpu_reset == m_rst && mirror_v == m_mv, "control bits");
    end
    @(negedge clk); model_on = 1'b0;
    bad_mem = 0; bad_chr = 0;
    for (int i = 0; i < 65536; i++) if (tb_mem[i] != ref_mem[i]) bad_mem++;
    for (int i = 0; i < 8192; i++)  if (tb_chr[i] != ref_chr[i]) bad_chr++;
    chk(bad_mem == 0, $sformatf("%0d CPU memory bytes differ", bad_mem));
    chk(bad_chr == 0, $sformatf("%0d CHR bytes differ", bad_chr));
    chk(n_mem > 200 && n_chr > 200 && n_ctl > 50 && n_rd > 1000, "random mix covered every region");
  endtask
  initial begin
    rst = 1; avs_write = 0; avs_read = 0; avs_address = 0; avs_writedata = 0; mem_rdata = 8'h5E;
    cpu_addr_mon = 16'hC123;
    @(negedge clk); rst = 0; #1;
    chk(cpu_reset && !mirror_v, "reset defaults");
    avs_address = 17'h0C005; avs_writedata = 8'h42; avs_write = 1; #1;
    chk(mem_we && !chr_we && mem_addr == 16'hC005 && mem_wdata == 8'h42, "cpu memory write");
    avs_address = 17'h11FFF; #1;
    chk(chr_we && !mem_we && chr_addr == 13'h1FFF && chr_wdata == 8'h42, "chr write");
    avs_address = 17'h18000; avs_writedata = 8'h02; #1;
    chk(!chr_we && !mem_we, "control write touches no memory");
    @(negedge clk); avs_write = 0; #1;
    chk(!cpu_reset && mirror_v, "control bits");
    avs_read = 1; @(negedge clk); avs_read = 0; #1;
    chk(avs_readdata == 16'hC123, "address monitor");
    avs_address = 17'h00080; avs_read = 1; @(negedge clk); avs_read = 0; #1;
    chk(avs_readdata == 16'h005E, "cpu memory read");
    avs_address = 17'h18000; avs_writedata = 8'h01; avs_write = 1; @(negedge clk); avs_write = 0; #1;
    chk(cpu_reset && !mirror_v, "reset high again");
    random_part();
    finish();
  end
endmodule
