// vcs_top: the FPGA design of one board of the two-board video conference
// system. A camera's composite video, decoded by an ADV7181, is captured
// as 320x480 frames of 4-bit luminance, and a VGA monitor shows the local
// frame on its left half and the frame received from the other board over
// Ethernet on its right half.
//
// Data path: video_controller keeps every second luminance sample of each
// active line, packs 4-bit pixels four to a word into its line buffer and
// raises a "line full" flag. The processor (outside this module, on the
// nios_* bus port) polls the flag, copies the 80 words of the line into the
// local frame buffer in SRAM at LOCAL_BASE + 80*line, and releases the line
// buffer. Frames arriving from the network are written by the processor into
// the second buffer at REMOTE_BASE. vga_controller reads both buffers
// through the display port of sram_controller, which has priority over the
// processor, and draws them side by side.
// Clocks: clk is the 25 MHz system and pixel clock (bus, SRAM, VGA); td_clk
// is the decoder's pixel clock, used only in the capture half of
// video_controller. rst_n is an asynchronous, active-low reset for both.
// Bus map (16-bit word addresses): SRAM 000000h, video controller 040000h,
// VGA controller 040100h, Ethernet controller 040200h, JTAG UART 040210h,
// SDRAM 400000h. The processor, the Ethernet controller, the JTAG UART and
// the SDRAM controller are existing components and are not part of this
// RTL: their bus ports are brought out (eth_*, jtag_*, sdram_*), as is the
// processor's master port. The SRAM data bus is split into in/out/enable;
// the pad is made at the chip boundary.
// From the design: the split screen, the single line buffer polled by the
// processor, the two SRAM frame buffers, the component list. This design's
// choices: the bus map, the port list, the common 25 MHz system and pixel
// clock, and the counters brought out for observation.
module vcs_top
  import vcs_pkg::*;
#(
  parameter int unsigned DECIMATE  = 2,
  parameter bit          REPLICATE = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // ADV7181 video decoder (luminance port in 16-bit mode)
  input  logic        td_clk,
  input  logic [7:0]  td_y_i,
  input  logic        td_vs_i,
  input  logic        td_field_i,
  // Processor (Avalon-MM master)
  input  av_req_t     nios_req_i,
  output av_rsp_t     nios_rsp_o,
  // Other Avalon slaves of the system
  output av_req_t     eth_req_o,
  input  av_rsp_t     eth_rsp_i,
  output av_req_t     jtag_req_o,
  input  av_rsp_t     jtag_rsp_i,
  output av_req_t     sdram_req_o,
  input  av_rsp_t     sdram_rsp_i,
  // SRAM
  output logic [17:0] sram_addr_o,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe_o,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ce_n_o,
  output logic        sram_oe_n_o,
  output logic        sram_we_n_o,
  output logic        sram_ub_n_o,
  output logic        sram_lb_n_o,
  // VGA DAC (ADV7123) and connector
  output logic [9:0]  vga_r_o,
  output logic [9:0]  vga_g_o,
  output logic [9:0]  vga_b_o,
  output logic        vga_hs_n_o,
  output logic        vga_vs_n_o,
  output logic        vga_blank_n_o,
  // Capture statistics (td_clk domain)
  output logic [15:0] frames_captured_o,
  output logic [15:0] frames_dropped_o,
  output logic [15:0] lines_captured_o,
  output logic [15:0] lines_dropped_o
);

  av_req_t s_req [N_SLAVES];
  av_rsp_t s_rsp [N_SLAVES];

  avalon_fabric u_bus (
    .clk(clk), .rst_n(rst_n),
    .m_req_i(nios_req_i), .m_rsp_o(nios_rsp_o),
    .s_req_o(s_req), .s_rsp_i(s_rsp));

  video_controller #(.DECIMATE(DECIMATE)) u_video (
    .td_clk(td_clk), .td_y_i(td_y_i), .td_vs_i(td_vs_i), .td_field_i(td_field_i),
    .clk(clk), .rst_n(rst_n),
    .av_req_i(s_req[SL_VIDEO]), .av_rsp_o(s_rsp[SL_VIDEO]),
    .frames_captured_o(frames_captured_o), .frames_dropped_o(frames_dropped_o),
    .lines_captured_o(lines_captured_o), .lines_dropped_o(lines_dropped_o));

  logic              disp_req;
  logic [SRAM_AW-1:0] disp_addr;
  logic [15:0]       disp_rdata;
  logic              disp_rvalid;

  sram_controller u_sram (
    .clk(clk), .rst_n(rst_n),
    .vga_req_i(disp_req), .vga_addr_i(disp_addr),
    .vga_rdata_o(disp_rdata), .vga_rvalid_o(disp_rvalid),
    .av_req_i(s_req[SL_SRAM]), .av_rsp_o(s_rsp[SL_SRAM]),
    .sram_addr_o(sram_addr_o), .sram_dq_o(sram_dq_o), .sram_dq_oe_o(sram_dq_oe_o),
    .sram_dq_i(sram_dq_i), .sram_ce_n_o(sram_ce_n_o), .sram_oe_n_o(sram_oe_n_o),
    .sram_we_n_o(sram_we_n_o), .sram_ub_n_o(sram_ub_n_o), .sram_lb_n_o(sram_lb_n_o));

  vga_controller #(.REPLICATE(REPLICATE)) u_vga (
    .clk(clk), .rst_n(rst_n),
    .mem_req_o(disp_req), .mem_addr_o(disp_addr),
    .mem_rdata_i(disp_rdata), .mem_rvalid_i(disp_rvalid),
    .av_req_i(s_req[SL_VGA]), .av_rsp_o(s_rsp[SL_VGA]),
    .vga_r_o(vga_r_o), .vga_g_o(vga_g_o), .vga_b_o(vga_b_o),
    .vga_hs_n_o(vga_hs_n_o), .vga_vs_n_o(vga_vs_n_o), .vga_blank_n_o(vga_blank_n_o));

  // Slaves outside this module.
  assign eth_req_o         = s_req[SL_ETH];
  assign jtag_req_o        = s_req[SL_JTAG];
  assign sdram_req_o       = s_req[SL_SDRAM];
  assign s_rsp[SL_ETH]     = eth_rsp_i;
  assign s_rsp[SL_JTAG]    = jtag_rsp_i;
  assign s_rsp[SL_SDRAM]   = sdram_rsp_i;

endmodule
