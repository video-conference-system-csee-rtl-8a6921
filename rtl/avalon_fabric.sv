// avalon_fabric: the Avalon-MM bus between the processor and the
// peripherals of one board (SRAM controller, video controller, VGA
// controller, and the Ethernet controller, JTAG UART and SDRAM controller
// that are brought out of the top level).
//
// One master, N slaves. Each slave owns the address window
// [BASE[i], BASE[i] + SPAN[i]); a request is passed only to the slave whose
// window holds the address, with the address made relative to the window
// base, and that slave's waitrequest stalls the master. Reads are pipelined
// in the slaves, but the fabric lets only one read be outstanding: a new read
// waits until the previous read's data has come back, so responses never
// overlap and need no tagging. Writes are not held back. An access outside
// every window completes at once; a read there returns 0 one cycle later.
// The bus is purely combinational in the request path; the only state is the
// outstanding-read flag and the error response.
// The design names the bus only; its structure (single outstanding read,
// 16-bit word addressing, address map) is this design's own and stands in
// for the interconnect a system builder would generate.
module avalon_fabric
  import vcs_pkg::*;
#(
  parameter int unsigned N = N_SLAVES,
  parameter addr_t BASE [N] = MAP_BASE,
  parameter addr_t SPAN [N] = MAP_SPAN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t m_req_i,
  output av_rsp_t m_rsp_o,
  output av_req_t s_req_o [N],
  input  av_rsp_t s_rsp_i [N]
);

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] sel;
  logic          hit;
  logic          pending;
  logic          blocked;
  logic          err_rvalid;
  logic          any_rvalid;
  logic [AV_DW-1:0] rdata;

  always_comb begin
    sel = '0;
    hit = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (m_req_i.address >= BASE[i] && m_req_i.address - BASE[i] < SPAN[i]) begin
        sel = SW'(i);
        hit = 1'b1;
      end
    end
  end

  assign blocked = m_req_i.read && pending;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_req_o[i] = '0;
      if (hit && sel == SW'(i) && !blocked) begin
        s_req_o[i]         = m_req_i;
        s_req_o[i].address = m_req_i.address - BASE[i];
      end
    end
  end

  always_comb begin
    any_rvalid = err_rvalid;
    rdata      = '0;
    for (int i = 0; i < N; i++) begin
      if (s_rsp_i[i].readdatavalid) begin
        any_rvalid = 1'b1;
        rdata      = rdata | s_rsp_i[i].readdata;
      end
    end
  end

  assign m_rsp_o.readdata      = rdata;
  assign m_rsp_o.readdatavalid = any_rvalid;
  assign m_rsp_o.waitrequest   = blocked || (hit && s_rsp_i[sel].waitrequest &&
                                             (m_req_i.read || m_req_i.write));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending    <= 1'b0;
      err_rvalid <= 1'b0;
    end else begin
      err_rvalid <= m_req_i.read && !hit && !blocked;
      if (m_req_i.read && !m_rsp_o.waitrequest) pending <= 1'b1;
      else if (any_rvalid)                       pending <= 1'b0;
    end
  end

  // Only one slave answers in a cycle.
  logic [N:0] rv_vec;
  always_comb begin
    rv_vec = '0;
    for (int i = 0; i < N; i++) rv_vec[i] = s_rsp_i[i].readdatavalid;
    rv_vec[N] = err_rvalid;
  end
  a_one_response: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rv_vec));

endmodule
