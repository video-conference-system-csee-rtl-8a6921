// line_buffer: the on-chip buffer that holds one decimated video line.
//
// One line is 320 pixels of 4 bits, i.e. 160 bytes, stored as 80 words of
// 16 bits (four pixels per word, as in the SRAM). The buffer is a simple
// dual-port memory with two clocks: the video controller writes it in the
// video decoder's clock domain, and the processor reads it over the bus in
// the system clock domain. The design keeps a single line buffer; whether it
// may be written or read is governed by the video controller's semaphore
// (full flag), not by this memory.
// Timing: a write takes effect at the wclk edge with we_i high; a read
// returns rdata_o one rclk cycle after raddr_i is presented with re_i high
// (the output holds its value otherwise). Dual clocks and the registered
// read are this design's choices.
module line_buffer #(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             wclk,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             rclk,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we_i && waddr_i < AW'(DEPTH)) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge rclk) begin
    if (re_i) rdata_o <= (raddr_i < AW'(DEPTH)) ? mem[raddr_i] : '0;
  end

endmodule
