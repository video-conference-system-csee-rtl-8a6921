// tb_vcs_top: end-to-end test of one board at full size (all parameters at
// their defaults): 640-sample NTSC-like interlaced video of 480 active lines
// in, 640x480 VGA out.
// The testbench plays the processor on the bus port. It
//  1. lets the first video frame pass while the frame buffer is not ready
//     (the frame is dropped), and meanwhile stores a 320x480 "network"
//     frame into the remote buffer in SRAM, word by word, while the display
//     is already fetching (its writes get stalled by display reads);
//  2. marks the frame buffer ready, then for every line the video
//     controller flags copies the 80 words from the line buffer to
//     LOCAL_BASE + 80*line and releases the buffer; one line is held back
//     on purpose so that the next one overflows and is dropped;
//  3. after one whole frame, stops capture, marks both display halves ready
//     and checks a complete VGA frame pixel by pixel: the left half must be
//     the captured camera frame (decimated by 2, 4-bit, bit-staggered to
//     10 bits), the right half the network frame; the dropped line stays
//     black (the SRAM starts cleared).
// Each mechanism is counted and a failure is recorded if one never
// happened: frame drop, line overflow drop, display priority stalls,
// held-back second read on the bus, black half while not ready, and both
// halves displayed. Accesses to the Ethernet, JTAG UART and SDRAM ports are
// checked to reach those ports.
module tb_vcs_top;
  import vcs_pkg::*;
  import tb_video_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 320, H = 480, WPL = 80;

  logic clk = 0, td_clk = 0, rst_n = 0;
  always #20   clk = ~clk;       // 25 MHz
  always #18.5 td_clk = ~td_clk; // 27 MHz

  logic [7:0] y; logic vs, field;
  int unsigned mframe, mline; logic mact;
  av_req_t nreq; av_rsp_t nrsp;
  av_req_t ereq, jreq, sreq; av_rsp_t ersp, jrsp, srsp;
  logic [17:0] a; logic [15:0] dqo, mdq; logic dq_oe, ce_n, oe_n, we_n, ub_n, lb_n, mdrive;
  logic [9:0] r, g, b; logic hs_n, vs_n, blank_n;
  logic [15:0] fcap, fdrop, lcap, ldrop;

  adv7181_model u_adv (.clk(td_clk), .en(rst_n), .y_o(y), .vs_o(vs), .field_o(field),
                       .frame_o(mframe), .act_o(mact), .line_o(mline));

  vcs_top dut (
    .clk(clk), .rst_n(rst_n),
    .td_clk(td_clk), .td_y_i(y), .td_vs_i(vs), .td_field_i(field),
    .nios_req_i(nreq), .nios_rsp_o(nrsp),
    .eth_req_o(ereq), .eth_rsp_i(ersp), .jtag_req_o(jreq), .jtag_rsp_i(jrsp),
    .sdram_req_o(sreq), .sdram_rsp_i(srsp),
    .sram_addr_o(a), .sram_dq_o(dqo), .sram_dq_oe_o(dq_oe), .sram_dq_i(mdq),
    .sram_ce_n_o(ce_n), .sram_oe_n_o(oe_n), .sram_we_n_o(we_n), .sram_ub_n_o(ub_n), .sram_lb_n_o(lb_n),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_n_o(hs_n), .vga_vs_n_o(vs_n), .vga_blank_n_o(blank_n),
    .frames_captured_o(fcap), .frames_dropped_o(fdrop), .lines_captured_o(lcap), .lines_dropped_o(ldrop));

  is61lv25616_model u_sram (.addr_i(a), .dq_i(dqo), .dq_o(mdq), .drive_o(mdrive),
    .ce_n_i(ce_n), .oe_n_i(oe_n), .we_n_i(we_n), .ub_n_i(ub_n), .lb_n_i(lb_n));

  // Simple external slaves: answer reads one cycle later with a fixed tag.
  logic e_rv = 0, j_rv = 0, s_rv = 0;
  int ext_writes = 0;
  always @(posedge clk) begin
    e_rv <= ereq.read; j_rv <= jreq.read; s_rv <= sreq.read;
    if (ereq.write || jreq.write || sreq.write) ext_writes++;
  end
  assign ersp = '{readdata: e_rv ? 16'hE7E7 : 16'h0, readdatavalid: e_rv, waitrequest: 1'b0};
  assign jrsp = '{readdata: j_rv ? 16'h1A6A : 16'h0, readdatavalid: j_rv, waitrequest: 1'b0};
  assign srsp = '{readdata: s_rv ? 16'h5D5D : 16'h0, readdatavalid: s_rv, waitrequest: 1'b0};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Which camera frame each line came from, noted at the start of the line.
  int unsigned frame_of_line [H];
  logic mact_q = 0; int unsigned mline_q = 0;
  always @(posedge td_clk) begin
    if (mact && (!mact_q || mline != mline_q)) frame_of_line[mline] = mframe;
    mact_q <= mact; mline_q <= mline;
  end

  // Processor bus access, with stall and held-read counting.
  int sram_stalls = 0, held_reads = 0;
  task automatic bus_write(input addr_t ad, input logic [15:0] d);
    @(negedge clk);
    nreq = '0; nreq.address = ad; nreq.write = 1; nreq.writedata = d; nreq.byteenable = 2'b11;
    @(posedge clk);
    while (nrsp.waitrequest) begin
      if (ad < MAP_SPAN[SL_SRAM]) sram_stalls++;
      @(posedge clk);
    end
    #1 nreq = '0;
  endtask
  task automatic bus_read(input addr_t ad, output logic [15:0] d);
    @(negedge clk);
    nreq = '0; nreq.address = ad; nreq.read = 1; nreq.byteenable = 2'b11;
    @(posedge clk);
    while (nrsp.waitrequest) @(posedge clk);
    #1 nreq = '0;
    while (!nrsp.readdatavalid) @(posedge clk) #1;
    d = nrsp.readdata;
  endtask
  // Two reads issued back to back: the second must wait for the first's data.
  task automatic bus_read_pair(input addr_t a0, input addr_t a1, output logic [15:0] d0, output logic [15:0] d1);
    bit got0;
    got0 = 0;
    @(negedge clk);
    nreq = '0; nreq.address = a0; nreq.read = 1; nreq.byteenable = 2'b11;
    @(posedge clk);
    while (nrsp.waitrequest) @(posedge clk);
    #1 nreq.address = a1;
    @(posedge clk);
    while (nrsp.waitrequest) begin
      held_reads++;
      if (nrsp.readdatavalid) begin d0 = nrsp.readdata; got0 = 1; end
      @(posedge clk);
    end
    if (nrsp.readdatavalid && !got0) begin d0 = nrsp.readdata; got0 = 1; end
    #1 nreq = '0;
    @(posedge clk);
    while (!nrsp.readdatavalid) @(posedge clk);
    d1 = nrsp.readdata;
  endtask

  function automatic logic [15:0] remote_word(int yy, int w);
    return 16'((yy * 29 + w * 71 + 9) * 40503);
  endfunction
  function automatic logic [9:0] stagger10(logic [3:0] n);
    return {n[3], 1'b0, n[2], 1'b0, n[1], 1'b0, n[0], 1'b0, 2'b00};
  endfunction

  // Frame the camera line was copied from; -1 when it was never copied.
  int copied_from [H];

  // VGA monitor: checks one whole frame when armed.
  bit arm = 0, frame_checked = 0, black_seen = 0;
  logic [1:0] ready_now = 0;
  int x = 0, vy = 0, bad = 0, pix_local = 0, pix_remote = 0, pix_black_local = 0, frames_seen = 0;
  logic blank_q = 0, vs_q = 1;
  bit in_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (!vs_n && vs_q) begin
      frames_seen++;
      if (in_frame) frame_checked = 1;
      in_frame = arm;
      vy = 0;
    end
    if (blank_n) begin
      bit rh; int col; logic [15:0] w; logic [3:0] nib; logic [9:0] exp;
      rh = x >= W; col = rh ? x - W : x;
      if (rh) begin
        w = remote_word(vy, col / 4); nib = w[4 * (col % 4) +: 4];
      end else begin
        nib = copied_from[vy] < 0 ? 4'h0 : pix_of(copied_from[vy], vy, col, 2);
      end
      exp = ready_now[rh] ? stagger10(nib) : 10'h0;
      if (!ready_now[0] && !rh && ready_now[1] == 0) black_seen = 1;
      if (in_frame) begin
        checks++;
        if (r !== exp || g !== exp || b !== exp) begin
          failures++; bad++;
          if (bad < 10) $display("FAIL vga (%0d,%0d) got %h exp %h", x, vy, r, exp);
        end else if (rh) pix_remote++;
        else if (copied_from[vy] < 0) pix_black_local++;
        else pix_local++;
      end
      x++;
    end else if (blank_q) begin
      x = 0; vy++;
    end
    blank_q = blank_n; vs_q = vs_n;
  end

  logic [15:0] st, ln, d, d0, d1;
  int copied = 0, cap_frame = -1;
  bit held = 0;
  realtime max_copy = 0;

  initial begin
    nreq = '0;
    foreach (copied_from[i]) copied_from[i] = -1;
    foreach (frame_of_line[i]) frame_of_line[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // Registers and the external slaves.
    bus_read(MAP_BASE[SL_VIDEO] + VID_STATUS, st);
    check(st == 0, "line buffer empty after reset");
    bus_read(MAP_BASE[SL_ETH], d);
    check(d == 16'hE7E7, "Ethernet port reached");
    bus_read(MAP_BASE[SL_JTAG] + 3, d);
    check(d == 16'h1A6A, "JTAG UART port reached");
    bus_read(MAP_BASE[SL_SDRAM] + 24'h1234, d);
    check(d == 16'h5D5D, "SDRAM port reached");
    bus_write(MAP_BASE[SL_ETH] + 1, 16'h0001);
    check(ext_writes == 1, "external write reached");
    bus_read_pair(MAP_BASE[SL_VIDEO] + VID_CONTROL, MAP_BASE[SL_ETH], d0, d1);
    check(d0 == 16'h0 && d1 == 16'hE7E7, $sformatf("back-to-back reads %h %h", d0, d1));
    // The display runs from reset with both halves not ready: black.
    // 1. Store the network frame while camera frame 0 goes by.
    for (int yy = 0; yy < H; yy++)
      for (int w = 0; w < WPL; w++)
        bus_write(addr_t'(REMOTE_BASE) + addr_t'(yy * WPL + w), remote_word(yy, w));
    check(mframe == 0, "network frame stored within one camera frame");
    check(sram_stalls > 0, $sformatf("display stalled the processor %0d times", sram_stalls));
    // 2. Frame buffer ready from frame 1 on.
    bus_write(MAP_BASE[SL_VIDEO] + VID_CONTROL, 16'h1);
    wait (mframe == 1);
    while (frame_of_line[2] < 2) begin
      bus_read(MAP_BASE[SL_VIDEO] + VID_STATUS, st);
      if (st[0]) begin
        realtime t0;
        t0 = $realtime;
        bus_read(MAP_BASE[SL_VIDEO] + VID_LINE, ln);
        if (frame_of_line[ln] == 1) begin
          for (int w = 0; w < WPL; w++) begin
            bus_read(MAP_BASE[SL_VIDEO] + addr_t'(w), d);
            bus_write(addr_t'(LOCAL_BASE) + addr_t'(int'(ln) * WPL + w), d);
          end
          copied_from[ln] = 1;
          copied++;
          if ($realtime - t0 > max_copy) max_copy = $realtime - t0;
        end
        if (copied == 100 && !held) begin
          held = 1;
          #(2 * 1716 * 37);  // hold the buffer for two line times
        end
        bus_write(MAP_BASE[SL_VIDEO] + VID_ACK, 16'h1);
        // The ready flag is sampled at frame start: clearing it once frame 1
        // is under way makes the next frame a dropped one.
        if (copied == 1) bus_write(MAP_BASE[SL_VIDEO] + VID_CONTROL, 16'h0);
      end
    end
    check(fcap == 1, $sformatf("frames captured %0d", fcap));
    check(fdrop == 2, $sformatf("frames dropped %0d", fdrop));
    check(ldrop >= 1, $sformatf("lines dropped on overflow %0d", ldrop));
    check(copied + int'(ldrop) == H, $sformatf("copied %0d + dropped %0d lines", copied, ldrop));
    // A line must move to SRAM well within one line period (63.6 us).
    check(max_copy < 63.5us, $sformatf("line copy took up to %0t", max_copy));
    $display("longest line copy %0.1f us (%0d bus cycles)", max_copy / 1000.0, int'(max_copy / 40.0));
    // 3. Show both halves and check one whole frame.
    bus_write(MAP_BASE[SL_VGA] + VGA_CONTROL, 16'h3);
    ready_now = 2'b11;
    wait (vs_n == 1'b0);
    wait (vs_n == 1'b1);
    arm = 1;
    wait (frame_checked);
    bus_read(MAP_BASE[SL_VGA] + VGA_FRAMES, d);
    check(d >= 3, $sformatf("VGA frames %0d", d));
    check(black_seen, "halves black while not ready");
    check(pix_local >= (H - 2) * W && pix_remote == H * W,
          $sformatf("pixels shown local %0d remote %0d black %0d", pix_local, pix_remote, pix_black_local));
    check(pix_black_local > 0, "dropped line shown black");
    check(held_reads > 0, "second read held behind the first");
    $display("mechanisms: frames dropped %0d, lines dropped %0d, display stalls %0d, held reads %0d",
             fdrop, ldrop, sram_stalls, held_reads);
    $display("pixels checked: local %0d remote %0d black-line %0d", pix_local, pix_remote, pix_black_local);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
