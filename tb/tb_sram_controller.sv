// tb_sram_controller: connects the SRAM controller to a behavioural
// 256K x 16 SRAM and checks, against a shadow copy of the memory kept in the
// testbench:
//  * back-to-back processor writes (one per clock, some with one byte
//    enable off) and back-to-back reads, at one word per clock;
//  * read latency of exactly 2 cycles on both ports;
//  * display reads that arrive every 4th cycle while the processor streams
//    reads and writes: the display is never delayed, the processor is
//    stalled exactly in those cycles, and all data are right.
module tb_sram_controller;
  import vcs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;

  logic vga_req = 0; logic [17:0] vga_addr = '0; logic [15:0] vga_rdata; logic vga_rvalid;
  av_req_t req; av_rsp_t rsp;
  logic [17:0] a; logic [15:0] dqo, dqi, mdq; logic oe, ce_n, oe_n, we_n, ub_n, lb_n, mdrive;

  sram_controller dut (
    .clk(clk), .rst_n(rst_n),
    .vga_req_i(vga_req), .vga_addr_i(vga_addr), .vga_rdata_o(vga_rdata), .vga_rvalid_o(vga_rvalid),
    .av_req_i(req), .av_rsp_o(rsp),
    .sram_addr_o(a), .sram_dq_o(dqo), .sram_dq_oe_o(oe), .sram_dq_i(dqi),
    .sram_ce_n_o(ce_n), .sram_oe_n_o(oe_n), .sram_we_n_o(we_n), .sram_ub_n_o(ub_n), .sram_lb_n_o(lb_n));

  is61lv25616_model u_sram (
    .addr_i(a), .dq_i(dqo), .dq_o(mdq), .drive_o(mdrive),
    .ce_n_i(ce_n), .oe_n_i(oe_n), .we_n_i(we_n), .ub_n_i(ub_n), .lb_n_i(lb_n));
  assign dqi = mdq;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operation list for the processor port.
  typedef struct { bit wr; logic [17:0] addr; logic [15:0] data; logic [1:0] be; } op_t;
  op_t ops [$];
  logic [15:0] shadow [logic [17:0]];
  typedef struct { logic [15:0] exp; longint t; } rd_t;
  rd_t av_q [$], vga_q [$];
  longint cyc = 0;
  int stalls = 0, vga_reads = 0, av_accepted = 0;
  bit vga_mode = 0;

  function automatic logic [15:0] sh(logic [17:0] ad);
    return shadow.exists(ad) ? shadow[ad] : 16'h0;
  endfunction

  // Cycle-based driver and monitor: requests change after the falling edge,
  // everything is sampled at the rising edge.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    // Responses of this cycle.
    if (rsp.readdatavalid) begin
      check(av_q.size() > 0, "unexpected processor read data");
      if (av_q.size() > 0) begin
        rd_t r;
        r = av_q.pop_front();
        check(rsp.readdata == r.exp, $sformatf("processor read got %h exp %h", rsp.readdata, r.exp));
        check(cyc - r.t == 2, $sformatf("processor read latency %0d", cyc - r.t));
      end
    end
    if (vga_rvalid) begin
      check(vga_q.size() > 0, "unexpected display read data");
      if (vga_q.size() > 0) begin
        rd_t r;
        r = vga_q.pop_front();
        check(vga_rdata == r.exp, $sformatf("display read got %h exp %h", vga_rdata, r.exp));
        check(cyc - r.t == 2, $sformatf("display read latency %0d", cyc - r.t));
      end
    end
    // Requests accepted in this cycle.
    if (vga_req) begin
      vga_q.push_back('{exp: sh(vga_addr), t: cyc});
      vga_reads++;
    end
    if (req.read || req.write) begin
      if (rsp.waitrequest) begin
        stalls++;
        check(vga_req, "processor stalled without a display request");
      end else begin
        check(!vga_req, "processor accepted in a display cycle");
        if (req.write) begin
          logic [15:0] o;
          o = sh(req.address[17:0]);
          if (req.byteenable[0]) o[7:0]  = req.writedata[7:0];
          if (req.byteenable[1]) o[15:8] = req.writedata[15:8];
          shadow[req.address[17:0]] = o;
        end else begin
          av_q.push_back('{exp: sh(req.address[17:0]), t: cyc});
        end
        av_accepted++;
        void'(ops.pop_front());
      end
    end
  end

  always @(negedge clk) begin
    req = '0;
    if (rst_n && ops.size() > 0) begin
      req.address = AV_AW'(ops[0].addr);
      req.write = ops[0].wr;
      req.read = !ops[0].wr;
      req.writedata = ops[0].data;
      req.byteenable = ops[0].be;
    end
    vga_req = vga_mode && (cyc % 4 == 0);
    vga_addr = 18'($urandom_range(0, 63));
  end

  initial begin
    longint t0;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. Burst of 64 writes, a few with one byte lane off, then 64 reads.
    for (int i = 0; i < 64; i++)
      ops.push_back('{wr: 1, addr: 18'(i), data: 16'($urandom),
                      be: (i % 7 == 3) ? 2'b01 : (i % 7 == 5) ? 2'b10 : 2'b11});
    for (int i = 0; i < 64; i++)
      ops.push_back('{wr: 0, addr: 18'(i), data: '0, be: 2'b11});
    @(posedge clk); t0 = cyc;
    wait (ops.size() == 0);
    @(posedge clk);
    check(cyc - t0 == 128, $sformatf("128 accesses took %0d cycles, expected one per clock", cyc - t0));
    check(stalls == 0, "no stall without display traffic");
    // 2. High addresses and random mix.
    for (int i = 0; i < 200; i++) begin
      logic [17:0] ad;
      ad = ($urandom % 2) ? 18'($urandom_range(0, 63)) : 18'h3FFC0 + 18'($urandom_range(0, 63));
      ops.push_back('{wr: bit'($urandom % 2), addr: ad, data: 16'($urandom), be: 2'($urandom_range(1, 3))});
    end
    wait (ops.size() == 0);
    // 3. Same mix with display reads every 4th cycle.
    vga_mode = 1;
    for (int i = 0; i < 300; i++) begin
      logic [17:0] ad;
      ad = 18'($urandom_range(0, 63));
      ops.push_back('{wr: bit'($urandom % 2), addr: ad, data: 16'($urandom), be: 2'($urandom_range(1, 3))});
    end
    wait (ops.size() == 0);
    vga_mode = 0;
    repeat (6) @(posedge clk);
    check(av_q.size() == 0 && vga_q.size() == 0, "all reads answered");
    check(stalls > 50, $sformatf("processor stalled %0d times by the display", stalls));
    check(vga_reads > 50, $sformatf("display reads %0d", vga_reads));
    $display("accepted %0d processor accesses, %0d stalls, %0d display reads", av_accepted, stalls, vga_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
