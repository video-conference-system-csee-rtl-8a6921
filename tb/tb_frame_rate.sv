// tb_frame_rate: runs the full-size board at the two frame rates chosen for
// the 4-bit, 320x480 format, 15 and 7.5 frames/s, from a camera that
// delivers 29.97 frames/s. The processor model admits every 2nd (then every
// 4th) camera frame by setting the video controller's "frame buffer ready"
// bit just before that frame starts, and copies each captured line into the
// local frame buffer. The testbench checks:
//  * exactly every N-th frame is captured and no line is lost;
//  * the captured data rate per direction, 320*480*4 bits per frame, is
//    9.216 Mbit/s at 15 frames/s and 4.608 Mbit/s at 7.5 frames/s
//    (half the two-way figures 18.432 and 9.216 Mbit/s), within 1%, over
//    the measured time of the camera frames (the decoder model runs at
//    27.03 MHz, 30.0 frames/s; a real NTSC camera's 29.97 would give 0.1%
//    less);
//  * the last captured frame sits in SRAM word for word.
module tb_frame_rate;
  import vcs_pkg::*;
  import tb_video_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 320, H = 480, WPL = 80;

  logic clk = 0, td_clk = 0, rst_n = 0;
  always #20   clk = ~clk;
  always #18.5 td_clk = ~td_clk;

  logic [7:0] y; logic vs, field;
  int unsigned mframe, mline; logic mact;
  av_req_t nreq; av_rsp_t nrsp;
  av_req_t ereq, jreq, sreq;
  logic [17:0] a; logic [15:0] dqo, mdq; logic dq_oe, ce_n, oe_n, we_n, ub_n, lb_n, mdrive;
  logic [9:0] r, g, b; logic hs_n, vs_n, blank_n;
  logic [15:0] fcap, fdrop, lcap, ldrop;

  adv7181_model u_adv (.clk(td_clk), .en(rst_n), .y_o(y), .vs_o(vs), .field_o(field),
                       .frame_o(mframe), .act_o(mact), .line_o(mline));

  vcs_top dut (
    .clk(clk), .rst_n(rst_n),
    .td_clk(td_clk), .td_y_i(y), .td_vs_i(vs), .td_field_i(field),
    .nios_req_i(nreq), .nios_rsp_o(nrsp),
    .eth_req_o(ereq), .eth_rsp_i('0), .jtag_req_o(jreq), .jtag_rsp_i('0),
    .sdram_req_o(sreq), .sdram_rsp_i('0),
    .sram_addr_o(a), .sram_dq_o(dqo), .sram_dq_oe_o(dq_oe), .sram_dq_i(mdq),
    .sram_ce_n_o(ce_n), .sram_oe_n_o(oe_n), .sram_we_n_o(we_n), .sram_ub_n_o(ub_n), .sram_lb_n_o(lb_n),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_n_o(hs_n), .vga_vs_n_o(vs_n), .vga_blank_n_o(blank_n),
    .frames_captured_o(fcap), .frames_dropped_o(fdrop), .lines_captured_o(lcap), .lines_dropped_o(ldrop));

  is61lv25616_model u_sram (.addr_i(a), .dq_i(dqo), .dq_o(mdq), .drive_o(mdrive),
    .ce_n_i(ce_n), .oe_n_i(oe_n), .we_n_i(we_n), .ub_n_i(ub_n), .lb_n_i(lb_n));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #700ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned frame_of_line [H];
  logic mact_q = 0; int unsigned mline_q = 0;
  always @(posedge td_clk) begin
    if (mact && (!mact_q || mline != mline_q)) frame_of_line[mline] = mframe;
    mact_q <= mact; mline_q <= mline;
  end

  task automatic bus_write(input addr_t ad, input logic [15:0] d);
    @(negedge clk);
    nreq = '0; nreq.address = ad; nreq.write = 1; nreq.writedata = d; nreq.byteenable = 2'b11;
    @(posedge clk);
    while (nrsp.waitrequest) @(posedge clk);
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

  int unsigned last_cap_frame = 0;

  // Admit every n-th camera frame for `span` frames starting at frame f0;
  // returns the number of lines copied and the time span.
  task automatic run_rate(input int n, input int unsigned f0, input int span,
                          output int lines, output realtime t_span);
    int unsigned seen;
    logic [15:0] st, ln, d;
    realtime t0, t_end;
    lines = 0;
    t_end = 0;
    wait (mframe == f0 - 1);
    seen = mframe;
    bus_write(MAP_BASE[SL_VIDEO] + VID_CONTROL, 16'(f0 % n == 0));
    wait (mframe == f0);
    t0 = $realtime;
    seen = mframe;
    bus_write(MAP_BASE[SL_VIDEO] + VID_CONTROL, 16'((f0 + 1) % n == 0));
    while (mframe < f0 + span || (mframe == f0 + span && frame_of_line[2] < f0 + span)) begin
      if (mframe == f0 + span && t_end == 0) t_end = $realtime;
      if (mframe != seen && mframe < f0 + span) begin
        seen = mframe;
        bus_write(MAP_BASE[SL_VIDEO] + VID_CONTROL, 16'((seen + 1) % n == 0 && seen + 1 < f0 + span));
      end
      bus_read(MAP_BASE[SL_VIDEO] + VID_STATUS, st);
      if (st[0]) begin
        bus_read(MAP_BASE[SL_VIDEO] + VID_LINE, ln);
        check(frame_of_line[ln] % n == 0, $sformatf("line %0d from frame %0d", ln, frame_of_line[ln]));
        last_cap_frame = frame_of_line[ln];
        for (int w = 0; w < WPL; w++) begin
          bus_read(MAP_BASE[SL_VIDEO] + addr_t'(w), d);
          bus_write(addr_t'(LOCAL_BASE) + addr_t'(int'(ln) * WPL + w), d);
        end
        lines++;
        bus_write(MAP_BASE[SL_VIDEO] + VID_ACK, 16'h1);
      end
    end
    t_span = t_end - t0;   // measured length of the span camera frames
  endtask

  initial begin
    int lines; realtime ts; real mbps; int f_before, d_before;
    nreq = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // 15 frames/s: every 2nd of 6 camera frames.
    f_before = fcap; d_before = fdrop;
    run_rate(2, 2, 6, lines, ts);
    mbps = real'(lines) * W * 4 / (ts * 1.0e-9) / 1.0e6;
    $display("15 fps: %0d lines in %0.2f ms -> %0.3f Mbit/s per direction", lines, ts / 1.0e6, mbps);
    check(lines == 3 * H, $sformatf("15 fps lines %0d", lines));
    check(fcap - f_before == 3, $sformatf("15 fps frames captured %0d", fcap - f_before));
    check(mbps > 9.216 * 0.99 && mbps < 9.216 * 1.01, $sformatf("15 fps rate %0.3f", mbps));
    // 7.5 frames/s: every 4th of 8 camera frames.
    f_before = fcap;
    run_rate(4, 9, 8, lines, ts);
    mbps = real'(lines) * W * 4 / (ts * 1.0e-9) / 1.0e6;
    $display("7.5 fps: %0d lines in %0.2f ms -> %0.3f Mbit/s per direction", lines, ts / 1.0e6, mbps);
    check(lines == 2 * H, $sformatf("7.5 fps lines %0d", lines));
    check(fcap - f_before == 2, $sformatf("7.5 fps frames captured %0d", fcap - f_before));
    check(mbps > 4.608 * 0.99 && mbps < 4.608 * 1.01, $sformatf("7.5 fps rate %0.3f", mbps));
    check(ldrop == 0, $sformatf("lines dropped %0d", ldrop));
    // The last captured frame in SRAM.
    for (int l = 0; l < H; l++)
      for (int w = 0; w < WPL; w++) begin
        checks++;
        if (u_sram.mem[LOCAL_BASE + 18'(l * WPL + w)] != word_of(last_cap_frame, l, w, 2)) begin
          failures++;
          if (failures < 20) $display("FAIL SRAM line %0d word %0d", l, w);
        end
      end
    $display("frames captured %0d dropped %0d, last captured frame %0d", fcap, fdrop, last_cap_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
