// tb_video_controller: runs the video controller on a short interlaced
// video stream from the decoder model (16 lines per frame, 640 samples per
// line) and acts as the processor: it polls STATUS, reads LINE and the 80
// words of the line buffer, compares every word with the expected decimated
// 4-bit picture, and writes ACK. It checks that
//  * a frame that starts while the frame buffer is not ready is dropped,
//  * every captured line holds the right frame's pixels, packed 4 per word,
//  * lines arrive in field order and each frame line appears once,
//  * a line that ends while the buffer is still full is dropped and counted,
//  * the counters agree with what the processor saw.
module tb_video_controller;
  timeunit 1ns; timeprecision 1ps;
  import vcs_pkg::*;
  import tb_video_pkg::*;

  localparam int LINES = 16;
  localparam int DEC   = 2;

  logic td_clk = 0, clk = 0, rst_n = 0;
  always #18.5 td_clk = ~td_clk;
  always #20   clk = ~clk;

  logic [7:0] y; logic vs, field;
  int unsigned mframe, mline; logic mact;
  av_req_t req; av_rsp_t rsp;
  logic [15:0] fcap, fdrop, lcap, ldrop;
  int checks = 0, failures = 0;
  int unsigned frame_of_line [LINES];

  adv7181_model #(.ACTIVE(640), .LINE_TOTAL(858), .BLANK_LINES(4), .ACTIVE_LINES(LINES/2)) u_adv (
    .clk(td_clk), .en(rst_n), .y_o(y), .vs_o(vs), .field_o(field),
    .frame_o(mframe), .act_o(mact), .line_o(mline));

  video_controller #(.DECIMATE(DEC), .LINE_PIX(320), .LINES(LINES)) dut (
    .td_clk(td_clk), .td_y_i(y), .td_vs_i(vs), .td_field_i(field),
    .clk(clk), .rst_n(rst_n), .av_req_i(req), .av_rsp_o(rsp),
    .frames_captured_o(fcap), .frames_dropped_o(fdrop),
    .lines_captured_o(lcap), .lines_dropped_o(ldrop));

  // Remember which frame each line came from, at the start of the line.
  logic mact_q = 0;
  int unsigned mline_q = 0;
  always @(posedge td_clk) begin
    if (mact && (!mact_q || mline != mline_q)) frame_of_line[mline] = mframe;
    mact_q <= mact;
    mline_q <= mline;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic av_write(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    req = '0; req.address = AV_AW'(a); req.write = 1; req.writedata = d; req.byteenable = 2'b11;
    do @(posedge clk); while (rsp.waitrequest);
    #1 req = '0;
  endtask

  task automatic av_read(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    req = '0; req.address = AV_AW'(a); req.read = 1; req.byteenable = 2'b11;
    do @(posedge clk); while (rsp.waitrequest);
    #1 req = '0;
    while (!rsp.readdatavalid) @(posedge clk) #1;
    d = rsp.readdata;
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int received = 0;
  int slow_done = 0;
  bit seen [LINES];
  int unsigned last_line;
  logic [15:0] st, ln, w;

  initial begin
    req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // Frame 0 passes with the frame buffer not ready.
    wait (mframe == 1);
    check(fdrop >= 1, "frame started while not ready was dropped");
    check(lcap == 0, "nothing captured while not ready");
    av_write(VID_CONTROL, 16'h1);
    av_read(VID_CONTROL, st);
    check(st == 16'h1, "CONTROL reads back");
    last_line = LINES;
    while (mframe < 6) begin
      if (mframe == 4) av_write(VID_CONTROL, 16'h0);
      av_read(VID_STATUS, st);
      if (st[0]) begin
        av_read(VID_LINE, ln);
        check(ln < LINES, $sformatf("line number %0d in range", ln));
        // Field order: even lines ascending, then odd lines ascending.
        if (last_line < LINES && ln[0] == last_line[0])
          check(ln > 16'(last_line), $sformatf("line %0d after %0d", ln, last_line));
        last_line = ln;
        for (int i = 0; i < 80; i++) begin
          av_read(8'(i), w);
          check(w == word_of(frame_of_line[ln], ln, i, DEC),
                $sformatf("frame %0d line %0d word %0d got %h exp %h",
                          frame_of_line[ln], ln, i, w, word_of(frame_of_line[ln], ln, i, DEC)));
        end
        received++;
        // Hold one line for longer than two line times to force an overflow.
        if (received == 5 && !slow_done) begin
          slow_done = 1;
          #(2 * 1716 * 37);
        end
        av_write(VID_ACK, 16'h1);
        av_read(VID_STATUS, st);
        check(st[0] == 1'b0, "ACK releases the buffer");
      end
    end
    check(fcap == 3, $sformatf("frames captured %0d", fcap));
    check(fdrop == 3, $sformatf("frames dropped %0d", fdrop));
    check(ldrop >= 1, $sformatf("lines dropped on overflow %0d", ldrop));
    check(int'(lcap) == received, $sformatf("lines captured %0d vs received %0d", lcap, received));
    check(int'(lcap) + int'(ldrop) == 3 * LINES, "every line of a captured frame is counted once");
    $display("received %0d lines, %0d dropped, frames %0d captured %0d dropped",
             received, ldrop, fcap, fdrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
