// video_controller: captures luminance from the ADV7181 video decoder into
// the on-chip line buffer and hands each completed line to the processor.
//
// How it works (decoder clock domain, td_clk):
//  * The decoder runs in 16-bit output mode; only its 8-bit luminance (Y)
//    port is used, chrominance is ignored. Each active line on that port is
//    framed by BT.656 timing reference codes FF 00 00 XY: XY bit 4 (H) = 0
//    marks start of active video (SAV), H = 1 end (EAV); XY bit 5 (V) = 1
//    marks a vertical-blanking line, which is skipped.
//  * A rising edge of the VS pin starts a field; the FIELD pin tells which
//    one. A VS edge with FIELD = 0 starts a new frame. At that point the
//    frame is captured only if the processor has marked the frame buffer
//    ready (CONTROL bit 0); otherwise the whole frame is dropped.
//  * Frames are two interleaved fields: active line n of field f is frame
//    line 2n + f. Up to FRAME_H/2 lines per field are captured.
//  * Within a line, every DECIMATE-th sample is kept (horizontal
//    down-sampling by 2 turns 640 samples into 320 pixels) and its upper
//    PIX_BITS bits become the pixel. Four pixels are packed into one 16-bit
//    word (leftmost pixel in the low nibble) and written to the line buffer.
//  * Semaphore: at EAV the line buffer is marked full and the line number is
//    latched. While it is full, the next line is not written (it is counted
//    as an overflow and lost), so a line being read is never overwritten.
//    The processor reads the words, copies them to SRAM, and writes ACK,
//    which releases the buffer.
// Processor side (system clock clk), Avalon-MM slave, read latency 1 cycle,
// never stalls. Word offsets: 0..79 line buffer, 0x80 STATUS (bit0 full),
// 0x81 LINE (frame line in the buffer, valid while full), 0x82 CONTROL
// (bit0 frame buffer ready), 0x83 ACK (write releases the buffer).
// The full flag crosses the clock domains as a pair of toggles (done/ack)
// through two-flop synchronisers; the latched line number and the buffer
// contents do not change while the buffer is full, so they are read
// directly.
// From the design: SAV/EAV framing, VS/FIELD frame detection, luminance
// only, decimation by 2, 4-bit pixels, 320-pixel single line buffer, the
// full flag polled by the processor. This design's choices: the register
// map, the toggle handshake, the ACK register, taking the top bits of Y as
// the 4-bit pixel, frame drop when the buffer is not ready, the counters.
module video_controller
  import vcs_pkg::*;
#(
  parameter int unsigned DECIMATE = 2,
  parameter int unsigned LINE_PIX = FRAME_W,   // pixels kept per line
  parameter int unsigned LINES    = FRAME_H,   // lines per frame (two fields)
  localparam int unsigned WORDS   = LINE_PIX / PIX_PER_WORD,
  localparam int unsigned WAW     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  // Decoder side
  input  logic        td_clk,
  input  logic [7:0]  td_y_i,       // luminance port of the decoder
  input  logic        td_vs_i,
  input  logic        td_field_i,
  // System side
  input  logic        clk,
  input  logic        rst_n,
  input  av_req_t     av_req_i,     // address is the offset inside this slave
  output av_rsp_t     av_rsp_o,
  // Activity counters (td_clk domain)
  output logic [15:0] frames_captured_o,
  output logic [15:0] frames_dropped_o,
  output logic [15:0] lines_captured_o,
  output logic [15:0] lines_dropped_o
);

  localparam int unsigned SCW = (DECIMATE > 1) ? $clog2(DECIMATE) : 1;
  localparam int unsigned PCW = $clog2(LINE_PIX + 1);
  localparam int unsigned LNW = $clog2(LINES + 1);

  // ---------------------------------------------------------------
  // Decoder clock domain
  // ---------------------------------------------------------------
  logic [7:0] b1, b2, b3;           // previous three bytes, b3 the oldest
  logic       vs_q;
  logic       trs;
  logic       is_sav, is_eav;
  logic       field_id;
  logic       capturing;            // current frame is being captured
  logic       reading;              // inside an active line being stored
  logic [LNW-1:0] field_line;
  logic [LNW-1:0] cur_line;
  logic [SCW-1:0] sample_cnt;
  logic [PCW-1:0] pixel_cnt;
  logic [15:0]    word_acc;
  logic           done_tgl, ack_td, full_td;
  logic           cap_en_td;

  logic           lb_we;
  logic [WAW-1:0] lb_waddr;
  logic [15:0]    lb_wdata;

  assign trs     = (b3 == TRS_PREAMBLE0) && (b2 == TRS_PREAMBLE1) && (b1 == TRS_PREAMBLE1) && td_y_i[7];
  assign is_sav  = trs && !td_y_i[4] && !td_y_i[5];
  assign is_eav  = trs && td_y_i[4];
  assign full_td = done_tgl ^ ack_td;

  // Pixel taken from the current sample.
  logic [PIX_BITS-1:0] pix;
  logic                take;
  logic [15:0]         word_next;
  assign pix  = td_y_i[7 -: PIX_BITS];
  assign take = reading && !trs && sample_cnt == '0 && pixel_cnt < PCW'(LINE_PIX);
  always_comb begin
    word_next = word_acc;
    word_next[PIX_BITS * (32'(pixel_cnt) % PIX_PER_WORD) +: PIX_BITS] = pix;
  end

  always_ff @(posedge td_clk or negedge rst_n) begin
    if (!rst_n) begin
      b1 <= '0; b2 <= '0; b3 <= '0;
      vs_q <= 1'b0;
      field_id <= 1'b0;
      capturing <= 1'b0;
      reading <= 1'b0;
      field_line <= '0;
      cur_line <= '0;
      sample_cnt <= '0;
      pixel_cnt <= '0;
      word_acc <= '0;
      done_tgl <= 1'b0;
      lb_we <= 1'b0;
      lb_waddr <= '0;
      lb_wdata <= '0;
      frames_captured_o <= '0;
      frames_dropped_o <= '0;
      lines_captured_o <= '0;
      lines_dropped_o <= '0;
    end else begin
      b1 <= td_y_i; b2 <= b1; b3 <= b2;
      vs_q <= td_vs_i;
      lb_we <= 1'b0;

      // Field and frame start.
      if (td_vs_i && !vs_q) begin
        field_line <= '0;
        field_id   <= td_field_i;
        reading    <= 1'b0;
        if (!td_field_i) begin
          capturing <= cap_en_td;
          if (cap_en_td) frames_captured_o <= frames_captured_o + 1'b1;
          else           frames_dropped_o  <= frames_dropped_o + 1'b1;
        end
      end else if (is_sav) begin
        field_line <= field_line + 1'b1;
        if (capturing && field_line < LNW'(LINES / 2)) begin
          if (full_td) begin
            lines_dropped_o <= lines_dropped_o + 1'b1;
          end else begin
            reading    <= 1'b1;
            cur_line   <= LNW'({field_line, field_id});
            sample_cnt <= '0;
            pixel_cnt  <= '0;
            word_acc   <= '0;
          end
        end
      end else if (is_eav) begin
        if (reading) begin
          reading <= 1'b0;
          // Flush a partly filled last word of a short line.
          if (32'(pixel_cnt) % PIX_PER_WORD != 0) begin
            lb_we    <= 1'b1;
            lb_waddr <= WAW'(pixel_cnt / PIX_PER_WORD);
            lb_wdata <= word_acc;
          end
          if (pixel_cnt != 0) begin
            done_tgl <= ~done_tgl;
            lines_captured_o <= lines_captured_o + 1'b1;
          end
        end
      end else if (reading) begin
        sample_cnt <= (sample_cnt == SCW'(DECIMATE - 1)) ? '0 : sample_cnt + 1'b1;
        if (take) begin
          pixel_cnt <= pixel_cnt + 1'b1;
          if (32'(pixel_cnt) % PIX_PER_WORD == PIX_PER_WORD - 1) begin
            lb_we    <= 1'b1;
            lb_waddr <= WAW'(pixel_cnt / PIX_PER_WORD);
            lb_wdata <= word_next;
            word_acc <= '0;
          end else begin
            word_acc <= word_next;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------
  // System clock domain
  // ---------------------------------------------------------------
  logic done_sys, ack_tgl, full_sys, cap_en;
  logic [15:0] lb_rdata;
  logic        rd_lb_q;
  logic [15:0] reg_rdata;
  logic        rvalid;
  logic [7:0]  off;

  assign off      = av_req_i.address[7:0];
  assign full_sys = done_sys ^ ack_tgl;

  sync_2ff u_sync_done (.clk(clk),    .rst_n(rst_n), .d_i(done_tgl), .q_o(done_sys));
  sync_2ff u_sync_ack  (.clk(td_clk), .rst_n(rst_n), .d_i(ack_tgl),  .q_o(ack_td));
  sync_2ff u_sync_en   (.clk(td_clk), .rst_n(rst_n), .d_i(cap_en),   .q_o(cap_en_td));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_tgl   <= 1'b0;
      cap_en    <= 1'b0;
      rvalid    <= 1'b0;
      rd_lb_q   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      rvalid  <= av_req_i.read;
      rd_lb_q <= av_req_i.read && off < 8'(WORDS);
      if (av_req_i.read) begin
        unique case (off)
          VID_STATUS:  reg_rdata <= 16'(full_sys);
          VID_LINE:    reg_rdata <= 16'(cur_line);
          VID_CONTROL: reg_rdata <= 16'(cap_en);
          default:     reg_rdata <= '0;
        endcase
      end
      if (av_req_i.write) begin
        if (off == VID_CONTROL) cap_en <= av_req_i.writedata[0];
        if (off == VID_ACK && full_sys) ack_tgl <= ~ack_tgl;
      end
    end
  end

  line_buffer #(.DEPTH(WORDS), .WIDTH(16)) u_line_buffer (
    .wclk(td_clk), .we_i(lb_we), .waddr_i(lb_waddr), .wdata_i(lb_wdata),
    .rclk(clk), .re_i(av_req_i.read && off < 8'(WORDS)),
    .raddr_i(WAW'(off)), .rdata_o(lb_rdata));

  assign av_rsp_o.readdata      = rd_lb_q ? lb_rdata : reg_rdata;
  assign av_rsp_o.readdatavalid = rvalid;
  assign av_rsp_o.waitrequest   = 1'b0;

  // The line buffer is never written while it is handed to the processor.
  logic is_eav_q;
  property p_no_write_when_full;
    @(posedge td_clk) disable iff (!rst_n) lb_we |-> !full_td || is_eav_q;
  endproperty
  always_ff @(posedge td_clk or negedge rst_n)
    if (!rst_n) is_eav_q <= 1'b0; else is_eav_q <= is_eav;
  a_no_write_when_full: assert property (p_no_write_when_full);

endmodule
