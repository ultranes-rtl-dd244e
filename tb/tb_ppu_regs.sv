// tb_ppu_regs: drives the register port like the CPU and checks, against
// values worked out by hand from the NES register rules: PPUCTRL/PPUMASK
// fields, the $2005/$2006 write pairs into t/v/fine X, the toggle reset by
// a PPUSTATUS read, vblank flag set/clear and NMI, OAMADDR/OAMDATA
// auto-increment, PPUDATA writes with +1/+32 increment, the buffered read
// and the direct palette read, and the rendering updates of v. A second,
// randomized part runs 3000 random register accesses and rendering
// updates against a model of the NES scroll registers (t, v, fine X, w),
// the read buffer and a reference copy of VRAM, checking v and fine X
// after every step and every PPUDATA read value.
module tb_ppu_regs;
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
    #(1000000);
    failures++;
    $display("watchdog expired");
    finish();
  end
  logic rst, bus_ce, cs, we, set_vblank, clr_flags, spr0_hit, spr_ovf, nmi, oam_we, vram_we;
  logic [2:0] ra, fine_x;
  logic [7:0] wdata, rdata, oam_addr, oam_wdata, oam_rdata, vram_wdata, vram_rdata;
  logic [5:0] pal_rdata;
  logic [14:0] v;
  ppuctrl_t ctrl; ppumask_t mask; scroll_op_t scroll_op;
  ppu_regs dut (.*);
  int oam_writes;
  logic [7:0] mem_model [16384];
  always @(posedge clk) if (oam_we) oam_writes <= oam_writes + 1;
  always_comb vram_rdata = mem_model[v[13:0]];
  always @(posedge clk) if (vram_we) mem_model[v[13:0]] <= vram_wdata;
  assign pal_rdata = 6'h2A;
  task automatic wr(input int r, input logic [7:0] d);
    @(negedge clk); bus_ce = 1; cs = 1; we = 1; ra = 3'(r); wdata = d;
    @(negedge clk); bus_ce = 0; cs = 0; we = 0;
  endtask
  task automatic rd(input int r, output logic [7:0] d);
    @(negedge clk); bus_ce = 1; cs = 1; we = 0; ra = 3'(r);
    @(negedge clk); bus_ce = 0; cs = 0; d = rdata;
  endtask
  task automatic sop(input scroll_op_t s);
    @(negedge clk); scroll_op = s; @(negedge clk); scroll_op = '0;
  endtask
  logic [7:0] d;
  // model for the randomized part
  logic [14:0] m_t, m_v;
  logic [2:0]  m_x;
  logic        m_w, m_inc32, m_buf_ok;
  logic [7:0]  m_buf, exp_d;
  logic [7:0]  ref_mem [16384];
  int          n_rd7, n_wr7, n_ops;
  function automatic logic [14:0] m_inc_x(input logic [14:0] a);
    logic [14:0] r = a;
    if (a[4:0] == 31) begin r[4:0] = 0; r[10] = !a[10]; end
    else r[4:0] = a[4:0] + 1;
    return r;
  endfunction
  function automatic logic [14:0] m_inc_y(input logic [14:0] a);
    logic [14:0] r = a;
    if (a[14:12] < 7) r[14:12] = a[14:12] + 1;
    else begin
      r[14:12] = 0;
      if (a[9:5] == 29)      begin r[9:5] = 0; r[11] = !a[11]; end
      else if (a[9:5] == 31) r[9:5] = 0;
      else                   r[9:5] = a[9:5] + 1;
    end
    return r;
  endfunction
  task automatic random_part();
    logic [7:0] q, dd;
    scroll_op_t so;
    rd(2, q); wr(6, 8'h00); wr(6, 8'h00);
    m_t = '0; m_v = '0; m_w = 0; m_x = fine_x; m_inc32 = ctrl.inc32; m_buf_ok = 0; m_buf = 0;
    for (int i = 0; i < 16384; i++) ref_mem[i] = mem_model[i];
    n_rd7 = 0; n_wr7 = 0; n_ops = 0;
    for (int k = 0; k < 3000; k++) begin
      dd = 8'($urandom);
      case ($urandom % 10)
        0: begin wr(0, dd & 8'h7F); m_t[11:10] = dd[1:0]; m_inc32 = dd[2]; end
        1, 2: begin
          wr(5, dd);
          if (!m_w) begin m_t[4:0] = dd[7:3]; m_x = dd[2:0]; end
          else begin m_t[14:12] = dd[2:0]; m_t[9:5] = dd[7:3]; end
          m_w = !m_w;
        end
        3, 4: begin
          wr(6, dd);
          if (!m_w) m_t[14:8] = {1'b0, dd[5:0]};
          else begin m_t[7:0] = dd; m_v = m_t; end
          m_w = !m_w;
        end
        5: begin
          wr(7, dd); ref_mem[m_v[13:0]] = dd;
          m_v = m_v + (m_inc32 ? 15'd32 : 15'd1); n_wr7++;
        end
        6: begin
          rd(7, q);
          exp_d = (m_v[13:8] == 6'h3F) ? 8'h2A : m_buf;
          if (m_v[13:8] == 6'h3F || m_buf_ok)
            chk(q == exp_d, $sformatf("PPUDATA read %h exp %h (v %h)", q, exp_d, m_v));
          m_buf = ref_mem[m_v[13:0]]; m_buf_ok = 1;
          m_v = m_v + (m_inc32 ? 15'd32 : 15'd1); n_rd7++;
        end
        7: begin rd(2, q); m_w = 0; end
        default: begin
          so = '0;
          case ($urandom % 4)
            0: begin so.inc_x = 1;  m_v = m_inc_x(m_v); end
            1: begin so.inc_y = 1;  m_v = m_inc_y(m_v); end
            2: begin so.copy_x = 1; m_v[10] = m_t[10]; m_v[4:0] = m_t[4:0]; end
            default: begin so.copy_y = 1; m_v[14:11] = m_t[14:11]; m_v[9:5] = m_t[9:5]; end
          endcase
          sop(so); n_ops++;
        end
      endcase
      chk(v == m_v && fine_x == m_x, $sformatf("step %0d: v %h exp %h, x %0d exp %0d", k, v, m_v, fine_x, m_x));
    end
    chk(n_rd7 > 100 && n_wr7 > 100 && n_ops > 300, "random mix covered reads, writes and rendering updates");
  endtask
  initial begin
    rst = 1; bus_ce = 0; cs = 0; we = 0; ra = 0; wdata = 0; set_vblank = 0; clr_flags = 0;
    spr0_hit = 0; spr_ovf = 0; scroll_op = '0; oam_rdata = 8'h77; oam_writes = 0;
    for (int i = 0; i < 16384; i++) mem_model[i] = 8'(i ^ (i >> 8));
    @(negedge clk); rst = 0;
    wr(0, 8'b1001_0110);
    chk(ctrl.nmi_en && ctrl.bg_tbl && ctrl.inc32 && !ctrl.spr_tbl && ctrl.nt_sel == 2'b10, "PPUCTRL fields");
    wr(1, 8'b0001_1110);
    chk(mask.spr_en && mask.bg_en && mask.spr_left && mask.bg_left && !mask.grey, "PPUMASK fields");
    // scroll: X = 0x7D (coarse 15, fine 5), Y = 0x5E (coarse 11, fine 6)
    wr(5, 8'h7D); wr(5, 8'h5E);
    chk(fine_x == 3'd5, "fine x");
    // t = fineY 6, NT 10, coarseY 11, coarseX 15 ; copy to v via ops
    sop('{inc_x:0, inc_y:0, copy_x:1, copy_y:0});
    sop('{inc_x:0, inc_y:0, copy_x:0, copy_y:1});
    chk(v == {3'd6, 2'b10, 5'd11, 5'd15}, $sformatf("v from t %h", v));
    sop('{inc_x:1, inc_y:0, copy_x:0, copy_y:0});
    chk(v[4:0] == 5'd16, "coarse x +1");
    sop('{inc_x:0, inc_y:1, copy_x:0, copy_y:0});
    chk(v[14:12] == 3'd7 && v[9:5] == 5'd11, "fine y +1");
    sop('{inc_x:0, inc_y:1, copy_x:0, copy_y:0});
    chk(v[14:12] == 3'd0 && v[9:5] == 5'd12, "fine y wrap into coarse y");
    // $2006 pair, then status read resets toggle
    wr(6, 8'h21); rd(2, d); wr(6, 8'h23); wr(6, 8'h45);
    chk(v == 15'h2345, $sformatf("PPUADDR after toggle reset %h", v));
    // PPUDATA write, +32 increment
    wr(7, 8'hAB);
    chk(v == 15'h2365, "increment 32");
    wr(0, 8'h00);
    wr(6, 8'h24); wr(6, 8'h00);
    rd(7, d); rd(7, d);
    chk(d == mem_model[14'h2400], "buffered read returns previous byte");
    chk(v == 15'h2402, "increment 1");
    wr(6, 8'h3F); wr(6, 8'h01); rd(7, d);
    chk(d == 8'h2A, "palette read direct");
    // flags and NMI
    wr(0, 8'h80);
    @(negedge clk); set_vblank = 1; spr0_hit = 1; @(negedge clk); set_vblank = 0; spr0_hit = 0;
    chk(nmi, "nmi with vblank");
    rd(2, d); chk(d[7:5] == 3'b110, $sformatf("status %h", d));
    chk(!nmi, "vblank cleared by read");
    rd(2, d); chk(d[7:5] == 3'b010, "hit stays");
    @(negedge clk); spr_ovf = 1; @(negedge clk); spr_ovf = 0;
    rd(2, d); chk(d[7:5] == 3'b011, "overflow");
    @(negedge clk); clr_flags = 1; @(negedge clk); clr_flags = 0;
    rd(2, d); chk(d[7:5] == 3'b000, "flags cleared");
    // OAM
    wr(3, 8'h10); wr(4, 8'h01); wr(4, 8'h02);
    chk(oam_addr == 8'h12 && oam_writes == 2, "OAM address increment");
    rd(4, d); chk(d == 8'h77, "OAMDATA read");
    random_part();
    finish();
  end
endmodule
