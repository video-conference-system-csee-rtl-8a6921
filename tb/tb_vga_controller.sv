// tb_vga_controller: the VGA controller reading, through the SRAM
// controller, a behavioural SRAM preloaded with two different 320x480
// pictures (local buffer and network buffer). For two full frames it checks
// at the VGA outputs:
//  * horizontal timing: 800 clocks per line, 96-clock sync pulse, 640
//    active clocks; vertical: 525 lines, 2-line sync, 480 active lines;
//  * every displayed pixel: left half from the local buffer, right half from
//    the network buffer, each 4-bit pixel bit-staggered to 10 bits and equal
//    on R, G and B;
//  * a half whose buffer is not marked ready is black, and the colour is 0
//    during blanking;
//  * the FRAMES register counts displayed frames.
module tb_vga_controller;
  import vcs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;

  logic vreq; logic [17:0] vaddr; logic [15:0] vrdata; logic vrvalid;
  av_req_t sreq, vgreq; av_rsp_t srsp, vgrsp;
  logic [17:0] a; logic [15:0] dqo, mdq; logic oe, ce_n, oe_n, we_n, ub_n, lb_n, mdrive;
  logic [9:0] r, g, b; logic hs_n, vs_n, blank_n;

  assign sreq = '0;

  sram_controller u_sc (
    .clk(clk), .rst_n(rst_n),
    .vga_req_i(vreq), .vga_addr_i(vaddr), .vga_rdata_o(vrdata), .vga_rvalid_o(vrvalid),
    .av_req_i(sreq), .av_rsp_o(srsp),
    .sram_addr_o(a), .sram_dq_o(dqo), .sram_dq_oe_o(oe), .sram_dq_i(mdq),
    .sram_ce_n_o(ce_n), .sram_oe_n_o(oe_n), .sram_we_n_o(we_n), .sram_ub_n_o(ub_n), .sram_lb_n_o(lb_n));

  is61lv25616_model u_sram (
    .addr_i(a), .dq_i(dqo), .dq_o(mdq), .drive_o(mdrive),
    .ce_n_i(ce_n), .oe_n_i(oe_n), .we_n_i(we_n), .ub_n_i(ub_n), .lb_n_i(lb_n));

  vga_controller dut (
    .clk(clk), .rst_n(rst_n),
    .mem_req_o(vreq), .mem_addr_o(vaddr), .mem_rdata_i(vrdata), .mem_rvalid_i(vrvalid),
    .av_req_i(vgreq), .av_rsp_o(vgrsp),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b),
    .vga_hs_n_o(hs_n), .vga_vs_n_o(vs_n), .vga_blank_n_o(blank_n));

  int checks = 0, failures = 0, bad_pix = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] local_word(int y, int w);
    return 16'((y * 131 + w * 17 + 5) * 40503);
  endfunction
  function automatic logic [15:0] remote_word(int y, int w);
    return 16'((y * 29 + w * 71 + 9) * 2654435761);
  endfunction
  function automatic logic [9:0] stagger10(logic [3:0] n);
    return {n[3], 1'b0, n[2], 1'b0, n[1], 1'b0, n[0], 1'b0, 2'b00};
  endfunction

  task automatic av_write(input logic [3:0] ad, input logic [15:0] d);
    @(negedge clk);
    vgreq = '0; vgreq.address = AV_AW'(ad); vgreq.write = 1; vgreq.writedata = d; vgreq.byteenable = 2'b11;
    @(negedge clk);
    vgreq = '0;
  endtask
  task automatic av_read(input logic [3:0] ad, output logic [15:0] d);
    @(negedge clk);
    vgreq = '0; vgreq.address = AV_AW'(ad); vgreq.read = 1;
    @(negedge clk);
    vgreq = '0;
    d = vgrsp.readdata;
    checks++;
    if (!vgrsp.readdatavalid) begin failures++; $display("FAIL register read latency"); end
  endtask

  // Output monitor.
  logic [1:0] ready_now = 2'b00;
  int x = 0, y = 0, hs_len = 0, line_len = 0, act_lines = 0, vs_lines = 0;
  int frames_seen = 0, line_clk = 0;
  logic hs_q = 1, vs_q = 1, blank_q = 0;
  bit synced = 0;
  int shown_local = 0, shown_remote = 0, black_halves = 0;

  always @(posedge clk) if (rst_n) begin
    line_clk++;
    if (!hs_n) hs_len++;
    if (hs_n && !hs_q) begin
      if (synced) check(hs_len == 96, $sformatf("hsync width %0d", hs_len));
      hs_len = 0;
    end
    if (!hs_n && hs_q) begin
      if (synced) check(line_clk == 800, $sformatf("line period %0d", line_clk));
      line_clk = 0;
      if (!vs_n) vs_lines++;
    end
    if (!vs_n && vs_q) begin
      if (synced) begin
        check(act_lines == 480, $sformatf("active lines %0d", act_lines));
        frames_seen++;
      end
      synced = 1;
      act_lines = 0; y = 0;
    end
    if (blank_n) begin
      logic [15:0] w; logic [3:0] nib; bit rhalf; int col; logic [9:0] exp;
      rhalf = x >= 320;
      col = rhalf ? x - 320 : x;
      w = rhalf ? remote_word(y, col / 4) : local_word(y, col / 4);
      nib = w[4 * (col % 4) +: 4];
      exp = ready_now[rhalf] ? stagger10(nib) : 10'd0;
      if (synced) begin
        checks++;
        if (r !== exp || g !== exp || b !== exp) begin
          failures++; bad_pix++;
          if (bad_pix < 10) $display("FAIL pixel (%0d,%0d) got %h exp %h word %h mem %h", x, y, r, exp, w, u_sram.mem[18'(y*80+col/4)]);
        end
        if (ready_now[rhalf] && x % 320 == 0 && y == 0) begin
          if (rhalf) shown_remote++; else shown_local++;
        end
        if (!ready_now[rhalf] && x % 320 == 0 && y == 0) black_halves++;
      end
      x++;
    end else begin
      if (synced && (r != 0 || g != 0 || b != 0)) begin
        checks++; failures++; $display("FAIL colour during blanking");
      end
      if (blank_q) begin
        if (synced) check(x == 640, $sformatf("active pixels per line %0d", x));
        x = 0; y++; act_lines++;
      end
    end
    hs_q = hs_n; vs_q = vs_n; blank_q = blank_n;
  end

  initial begin
    logic [15:0] d;
    vgreq = '0;
    #1;
    for (int yy = 0; yy < 480; yy++)
      for (int ww = 0; ww < 80; ww++) begin
        u_sram.mem[LOCAL_BASE + 18'(yy * 80 + ww)]  = local_word(yy, ww);
        u_sram.mem[REMOTE_BASE + 18'(yy * 80 + ww)] = remote_word(yy, ww);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Local half ready only, for the first whole frame seen.
    av_write(VGA_CONTROL, 16'h1);
    ready_now = 2'b01;
    av_read(VGA_CONTROL, d);
    check(d == 16'h1, "CONTROL reads back");
    wait (frames_seen == 1);
    // Both halves (write at the start of vertical sync, outside the picture).
    av_write(VGA_CONTROL, 16'h3);
    ready_now = 2'b11;
    wait (frames_seen == 2);
    wait (frames_seen == 3);
    av_read(VGA_FRAMES, d);
    check(d >= 3, $sformatf("FRAMES register %0d", d));
    check(shown_local == 3 && shown_remote == 2 && black_halves == 1,
          $sformatf("halves shown local %0d remote %0d black %0d", shown_local, shown_remote, black_halves));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
