// vga_controller: 640x480 split-screen display of the two video buffers.
//
// The screen is divided into halves: the left 320 columns show the local
// camera's frame buffer, the right 320 columns the frame received over the
// network. Both buffers are in the SRAM, 80 words per line, 4 pixels per
// word (leftmost pixel in the low nibble).
// How it works: a horizontal and a vertical counter produce the standard
// 640x480 timing (25 MHz pixel clock, 800 x 525 clocks per frame, negative
// sync pulses). In the active area, on every fourth column the controller
// asks the SRAM controller's display port for the word that holds the next
// four pixels; the word arrives RD_LAT cycles later and is shifted out one
// nibble per clock. Each 4-bit pixel is widened to the 10-bit gray level of
// the DAC by pixel_scaler (bit staggering by default) and driven equally on
// red, green and blue. Sync and blanking are delayed through the same
// pipeline, so all outputs leave registers together, RD_LAT+1 clocks after
// the counters.
// A half is shown only while the processor has marked that frame buffer
// ready (CONTROL bit 0 local, bit 1 remote); otherwise it is black. FRAMES
// counts displayed frames so that software can tell when the remote frame
// has been shown. Avalon-MM register slave, read latency 1, never stalls:
// offset 0 CONTROL (read/write), offset 1 FRAMES (read).
// From the design: the split screen, the two buffers, the 4-bit to 8-bit bit
// staggering, the "frame buffer ready" condition, 640x480 output. This
// design's choices: the standard VGA timing numbers, the prefetch pipeline,
// the register map, the frame counter, 10-bit output as {8-bit value, 00}.
module vga_controller
  import vcs_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned AW       = SRAM_AW,
  parameter logic [AW-1:0] L_BASE = LOCAL_BASE,
  parameter logic [AW-1:0] R_BASE = REMOTE_BASE,
  parameter int unsigned RD_LAT   = 2,
  parameter bit          REPLICATE = 1'b0
) (
  input  logic          clk,          // pixel clock
  input  logic          rst_n,
  // SRAM display read port
  output logic          mem_req_o,
  output logic [AW-1:0] mem_addr_o,
  input  logic [15:0]   mem_rdata_i,
  input  logic          mem_rvalid_i,
  // Register slave
  input  av_req_t       av_req_i,
  output av_rsp_t       av_rsp_o,
  // VGA DAC and connector
  output logic [9:0]    vga_r_o,
  output logic [9:0]    vga_g_o,
  output logic [9:0]    vga_b_o,
  output logic          vga_hs_n_o,
  output logic          vga_vs_n_o,
  output logic          vga_blank_n_o
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HALF    = H_ACTIVE / 2;
  localparam int unsigned WPL     = HALF / PIX_PER_WORD;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic [AW-1:0] row_off;
  logic [1:0]    ready;
  logic [15:0]   frames;

  logic act, half, hs, vs;
  logic [HW-1:0] col;
  assign act  = hcnt < HW'(H_ACTIVE) && vcnt < VW'(V_ACTIVE);
  assign half = hcnt >= HW'(HALF);
  assign col  = half ? hcnt - HW'(HALF) : hcnt;
  assign hs   = hcnt >= HW'(H_ACTIVE + H_FP) && hcnt < HW'(H_ACTIVE + H_FP + H_SYNC);
  assign vs   = vcnt >= VW'(V_ACTIVE + V_FP) && vcnt < VW'(V_ACTIVE + V_FP + V_SYNC);

  // Timing counters and line offset into the buffers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
      row_off <= '0;
      frames <= '0;
    end else if (hcnt == HW'(H_TOTAL - 1)) begin
      hcnt <= '0;
      if (vcnt == VW'(V_TOTAL - 1)) begin
        vcnt <= '0;
        row_off <= '0;
        frames <= frames + 1'b1;
      end else begin
        vcnt <= vcnt + 1'b1;
        if (vcnt < VW'(V_ACTIVE)) row_off <= row_off + AW'(WPL);
      end
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  // Word fetch, one request per four pixels.
  assign mem_req_o  = act && hcnt[1:0] == 2'b00;
  assign mem_addr_o = (half ? R_BASE : L_BASE) + row_off + AW'(col >> 2);

  // Delay line for the control signals, RD_LAT stages.
  logic [RD_LAT-1:0] act_d, half_d, hs_d, vs_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_d <= '0; half_d <= '0; hs_d <= '0; vs_d <= '0;
    end else begin
      act_d  <= RD_LAT'({act_d,  act});
      half_d <= RD_LAT'({half_d, half});
      hs_d   <= RD_LAT'({hs_d,   hs});
      vs_d   <= RD_LAT'({vs_d,   vs});
    end
  end

  // Pixel shifter: the word arriving now gives this cycle's pixel.
  logic [15:0] sh, cw;
  logic [9:0]  gray;
  assign cw = mem_rvalid_i ? mem_rdata_i : sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= cw >> PIX_BITS;
  end

  pixel_scaler #(.N(PIX_BITS), .M(10), .REPLICATE(REPLICATE)) u_scaler (
    .pix_i(cw[PIX_BITS-1:0]), .pix_o(gray));

  logic show;
  assign show = act_d[RD_LAT-1] && ready[half_d[RD_LAT-1]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_r_o <= '0; vga_g_o <= '0; vga_b_o <= '0;
      vga_hs_n_o <= 1'b1; vga_vs_n_o <= 1'b1; vga_blank_n_o <= 1'b0;
    end else begin
      vga_r_o <= show ? gray : '0;
      vga_g_o <= show ? gray : '0;
      vga_b_o <= show ? gray : '0;
      vga_hs_n_o    <= !hs_d[RD_LAT-1];
      vga_vs_n_o    <= !vs_d[RD_LAT-1];
      vga_blank_n_o <= act_d[RD_LAT-1];
    end
  end

  // Register slave.
  logic [15:0] rdata_q;
  logic        rvalid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '0;
      rdata_q <= '0;
      rvalid_q <= 1'b0;
    end else begin
      rvalid_q <= av_req_i.read;
      if (av_req_i.read)
        rdata_q <= (av_req_i.address[3:0] == VGA_CONTROL) ? 16'(ready) :
                   (av_req_i.address[3:0] == VGA_FRAMES)  ? frames : '0;
      if (av_req_i.write && av_req_i.address[3:0] == VGA_CONTROL)
        ready <= av_req_i.writedata[1:0];
    end
  end
  assign av_rsp_o.readdata      = rdata_q;
  assign av_rsp_o.readdatavalid = rvalid_q;
  assign av_rsp_o.waitrequest   = 1'b0;

  // A word must arrive exactly where the pipeline expects it.
  a_fetch_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                    mem_req_o |-> ##RD_LAT mem_rvalid_i);

endmodule
