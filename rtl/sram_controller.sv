// sram_controller: drives the 256K x 16 asynchronous SRAM (IS61LV25616
// type) that holds the local video buffer and the network data buffer.
//
// Two ports share the memory:
//  * a display read port for the VGA controller, which always wins, and
//  * an Avalon-MM slave for the processor (copying lines from the line
//    buffer, storing frames received from the network), which is stalled
//    with waitrequest in a cycle where the display port asks for a word.
// One access is started per clock, so the memory moves one word per clock
// in a burst. A request accepted in cycle t drives address, data and
// strobes from registers during cycle t+1 (the whole 40 ns cycle at 25 MHz
// covers the read access time tAA and the write cycle time tWC); read data
// is sampled at the end of t+1 and is presented in cycle t+2 with
// vga_rvalid_o or readdatavalid. Read latency is therefore exactly 2 cycles
// on both ports.
// Read cycles follow the address-controlled read of the data sheet
// (CE and OE low, the address alone selects the word). Writes are WE-
// controlled with CE low: WE is pulsed low only in the second half of the
// write cycle (WE = not(write and clock low), never in reset), so the address is set up half
// a cycle before WE falls (tSA) and WE rises at the clock edge where the
// address and data may change (tHA = tHD = 0), which allows back-to-back
// writes. OE is held high during writes so that the memory never drives the
// bus while the controller does (the SRAM would also accept OE low during
// a WE-controlled write). UB/LB come from the Avalon byte enables.
// The data bus is split into input, output and output-enable; the
// bidirectional pad is made at the chip boundary.
// From the design: the memory, its two buffers, 16-bit words with four
// pixels each, one word per clock. This design's choices: the two-port
// arbitration with display priority, the registered timing, the latency.
module sram_controller
  import vcs_pkg::*;
#(
  parameter int unsigned AW = SRAM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // Display read port (highest priority, never stalled)
  input  logic          vga_req_i,
  input  logic [AW-1:0] vga_addr_i,
  output logic [15:0]   vga_rdata_o,
  output logic          vga_rvalid_o,
  // Processor port
  input  av_req_t       av_req_i,
  output av_rsp_t       av_rsp_o,
  // SRAM pins
  output logic [AW-1:0] sram_addr_o,
  output logic [15:0]   sram_dq_o,
  output logic          sram_dq_oe_o,
  input  logic [15:0]   sram_dq_i,
  output logic          sram_ce_n_o,
  output logic          sram_oe_n_o,
  output logic          sram_we_n_o,   // gated by the clock, see above
  output logic          sram_ub_n_o,
  output logic          sram_lb_n_o
);

  typedef enum logic [1:0] {SRC_NONE, SRC_VGA, SRC_AV} src_e;

  logic av_go;
  logic wr_q;              // a write is on the pins this cycle
  src_e rd_src_q;          // whose read is on the pins this cycle
  logic [15:0] rdata_q;
  src_e rvalid_src_q;      // whose data is in rdata_q this cycle

  assign av_go = (av_req_i.read || av_req_i.write) && !vga_req_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr_o  <= '0;
      sram_dq_o    <= '0;
      sram_dq_oe_o <= 1'b0;
      sram_ce_n_o  <= 1'b1;
      sram_oe_n_o  <= 1'b1;
      wr_q         <= 1'b0;
      sram_ub_n_o  <= 1'b1;
      sram_lb_n_o  <= 1'b1;
      rd_src_q     <= SRC_NONE;
      rvalid_src_q <= SRC_NONE;
      rdata_q      <= '0;
    end else begin
      // Stage 2: sample the memory's output for the read on the pins.
      rvalid_src_q <= rd_src_q;
      if (rd_src_q != SRC_NONE) rdata_q <= sram_dq_i;
      // Stage 1: start the next access.
      sram_dq_oe_o <= 1'b0;
      wr_q         <= 1'b0;
      sram_oe_n_o  <= 1'b1;
      sram_ce_n_o  <= 1'b1;
      sram_ub_n_o  <= 1'b1;
      sram_lb_n_o  <= 1'b1;
      rd_src_q     <= SRC_NONE;
      if (vga_req_i) begin
        sram_addr_o <= vga_addr_i;
        sram_ce_n_o <= 1'b0;
        sram_oe_n_o <= 1'b0;
        sram_ub_n_o <= 1'b0;
        sram_lb_n_o <= 1'b0;
        rd_src_q    <= SRC_VGA;
      end else if (av_go && av_req_i.read) begin
        sram_addr_o <= AW'(av_req_i.address);
        sram_ce_n_o <= 1'b0;
        sram_oe_n_o <= 1'b0;
        sram_ub_n_o <= 1'b0;
        sram_lb_n_o <= 1'b0;
        rd_src_q    <= SRC_AV;
      end else if (av_go && av_req_i.write) begin
        sram_addr_o  <= AW'(av_req_i.address);
        sram_dq_o    <= av_req_i.writedata;
        sram_dq_oe_o <= 1'b1;
        sram_ce_n_o  <= 1'b0;
        wr_q         <= 1'b1;
        sram_ub_n_o  <= !av_req_i.byteenable[1];
        sram_lb_n_o  <= !av_req_i.byteenable[0];
      end
    end
  end

  assign sram_we_n_o  = !(wr_q && !clk && rst_n);

  assign vga_rdata_o  = rdata_q;
  assign vga_rvalid_o = rvalid_src_q == SRC_VGA;

  assign av_rsp_o.readdata      = rdata_q;
  assign av_rsp_o.readdatavalid = rvalid_src_q == SRC_AV;
  assign av_rsp_o.waitrequest   = (av_req_i.read || av_req_i.write) && vga_req_i;

  // A bus read and write never come together.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(av_req_i.read && av_req_i.write));
  // The controller never drives the data bus while the memory may drive it.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(sram_dq_oe_o && !sram_oe_n_o));

endmodule
