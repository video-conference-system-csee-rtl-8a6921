// vcs_pkg: types and constants shared by the video conference system.
//
// The frame format follows the design: a frame is 320 x 480 pixels of 4-bit
// luminance, four pixels packed into each 16-bit SRAM word (pixel k of a
// word in bits [4k+3:4k], leftmost pixel in the low nibble), so one line is
// 80 words and one frame 38400 words. The SRAM holds two such frames: the
// local video buffer and the buffer for video received from the network.
//
// The Avalon-MM bus is modelled with one request struct (master to slave)
// and one response struct (slave to master). Addresses are 16-bit word
// addresses; reads are pipelined (the slave answers with readdatavalid some
// cycles after accepting the read, one read outstanding at a time), and a
// slave stalls a request by raising waitrequest in the same cycle. The
// packing order, the address map and the bus widths are this design's
// choices.
package vcs_pkg;

  // Frame and line format.
  localparam int unsigned PIX_BITS       = 4;
  localparam int unsigned PIX_PER_WORD   = 16 / PIX_BITS;
  localparam int unsigned FRAME_W        = 320;
  localparam int unsigned FRAME_H        = 480;
  localparam int unsigned WORDS_PER_LINE = FRAME_W / PIX_PER_WORD;

  // SRAM (256K x 16) layout, word addresses.
  localparam int unsigned SRAM_AW        = 18;
  localparam logic [SRAM_AW-1:0] LOCAL_BASE  = 18'h00000;
  localparam logic [SRAM_AW-1:0] REMOTE_BASE = 18'h10000;

  // Avalon-MM bus seen by the processor.
  localparam int unsigned AV_AW = 24;
  localparam int unsigned AV_DW = 16;

  typedef struct packed {
    logic [AV_AW-1:0]   address;
    logic               read;
    logic               write;
    logic [AV_DW-1:0]   writedata;
    logic [AV_DW/8-1:0] byteenable;
  } av_req_t;

  typedef struct packed {
    logic [AV_DW-1:0] readdata;
    logic             readdatavalid;
    logic             waitrequest;
  } av_rsp_t;

  // Slaves on the bus and the system address map (word addresses).
  typedef enum int unsigned {
    SL_SRAM   = 0,
    SL_VIDEO  = 1,
    SL_VGA    = 2,
    SL_ETH    = 3,
    SL_JTAG   = 4,
    SL_SDRAM  = 5
  } slave_e;
  localparam int unsigned N_SLAVES = 6;

  typedef logic [AV_AW-1:0] addr_t;
  typedef addr_t addr_arr_t [N_SLAVES];

  localparam addr_arr_t MAP_BASE = '{
    24'h000000,  // SRAM, 256K words
    24'h040000,  // video controller: line buffer and registers
    24'h040100,  // VGA controller registers
    24'h040200,  // Ethernet controller
    24'h040210,  // JTAG UART
    24'h400000   // SDRAM (program memory)
  };
  localparam addr_arr_t MAP_SPAN = '{
    24'h040000,
    24'h000100,
    24'h000010,
    24'h000010,
    24'h000008,
    24'h400000
  };

  // Video controller register offsets (word offsets inside its window).
  // Offsets 0 .. WORDS_PER_LINE-1 read the line buffer.
  localparam logic [7:0] VID_STATUS  = 8'h80;  // bit0: line buffer full
  localparam logic [7:0] VID_LINE    = 8'h81;  // frame line held in the buffer
  localparam logic [7:0] VID_CONTROL = 8'h82;  // bit0: frame buffer ready (capture enable)
  localparam logic [7:0] VID_ACK     = 8'h83;  // write: line moved, release the buffer

  // VGA controller register offsets.
  localparam logic [3:0] VGA_CONTROL = 4'h0;   // bit0: local half ready, bit1: remote half ready
  localparam logic [3:0] VGA_FRAMES  = 4'h1;   // frames displayed (read only)

  // BT.656 timing reference codes: FF 00 00 XY, XY = 1 F V H P3 P2 P1 P0.
  localparam logic [7:0] TRS_PREAMBLE0 = 8'hFF;
  localparam logic [7:0] TRS_PREAMBLE1 = 8'h00;

endpackage
