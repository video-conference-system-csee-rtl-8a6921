// tb_avalon_fabric: the bus with the system address map and six memory-like
// slave models of different read latencies (1 to 3 cycles) and random
// waitrequest. A random stream of reads and writes, to every window, to the
// first and last word of each window and to unmapped addresses, is checked
// against a shadow memory kept by global address:
//  * read data come back in order and match;
//  * each write lands in the right slave at the address relative to its base;
//  * a slave's waitrequest stalls the master; a second read waits for the
//    first one's data; unmapped reads return 0.
module tb_avalon_fabric;
  import vcs_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  av_req_t mreq; av_rsp_t mrsp;
  av_req_t sreq [N_SLAVES]; av_rsp_t srsp [N_SLAVES];

  avalon_fabric dut (.clk(clk), .rst_n(rst_n), .m_req_i(mreq), .m_rsp_o(mrsp),
                     .s_req_o(sreq), .s_rsp_i(srsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slave models.
  logic [15:0] smem [N_SLAVES][int unsigned];
  typedef struct { logic [15:0] d; longint due; } sr_t;
  sr_t sq [N_SLAVES][$];
  longint cyc = 0;
  int s_acc [N_SLAVES];
  int stalls = 0, blocked_reads = 0, err_reads = 0, reads_done = 0;

  // Master model.
  typedef struct { bit wr; addr_t a; logic [15:0] d; } op_t;
  op_t ops [$];
  logic [15:0] shadow [addr_t];
  typedef struct { logic [15:0] exp; addr_t a; } mr_t;
  mr_t mq [$];

  function automatic bit mapped(addr_t a);
    for (int i = 0; i < N_SLAVES; i++)
      if (a >= MAP_BASE[i] && a - MAP_BASE[i] < MAP_SPAN[i]) return 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // Slaves accept.
    for (int i = 0; i < N_SLAVES; i++) begin
      if ((sreq[i].read || sreq[i].write) && !srsp[i].waitrequest) begin
        s_acc[i]++;
        check(sreq[i].address < MAP_SPAN[i], $sformatf("slave %0d local address %h", i, sreq[i].address));
        if (sreq[i].write) smem[i][int'(sreq[i].address)] = sreq[i].writedata;
        else sq[i].push_back('{d: smem[i].exists(int'(sreq[i].address)) ? smem[i][int'(sreq[i].address)] : 16'h0,
                               due: cyc + 1 + (i % 3)});
      end
    end
    // Master sees its response.
    if (mrsp.readdatavalid) begin
      check(mq.size() > 0, "unexpected read data");
      if (mq.size() > 0) begin
        mr_t m;
        m = mq.pop_front();
        check(mrsp.readdata == m.exp, $sformatf("read %h got %h exp %h", m.a, mrsp.readdata, m.exp));
        reads_done++;
      end
    end
    // Master request outcome.
    if (mreq.read || mreq.write) begin
      if (mrsp.waitrequest) begin
        stalls++;
        if (mreq.read && mq.size() > 0) blocked_reads++;
      end else begin
        if (mreq.write) begin
          if (mapped(mreq.address)) shadow[mreq.address] = mreq.writedata;
        end else begin
          check(mq.size() == 0, "second read accepted while one is outstanding");
          mq.push_back('{exp: shadow.exists(mreq.address) ? shadow[mreq.address] : 16'h0, a: mreq.address});
          if (!mapped(mreq.address)) err_reads++;
        end
        void'(ops.pop_front());
      end
    end
    cyc <= cyc + 1;
  end

  always @(negedge clk) begin
    for (int i = 0; i < N_SLAVES; i++) begin
      srsp[i] = '0;
      srsp[i].waitrequest = ($urandom % 4 == 0);
      if (sq[i].size() > 0 && sq[i][0].due <= cyc) begin
        sr_t r;
        r = sq[i].pop_front();
        srsp[i].readdatavalid = 1;
        srsp[i].readdata = r.d;
      end
    end
    mreq = '0;
    if (rst_n && ops.size() > 0) begin
      mreq.address = ops[0].a;
      mreq.write = ops[0].wr;
      mreq.read = !ops[0].wr;
      mreq.writedata = ops[0].d;
      mreq.byteenable = 2'b11;
    end
  end

  function automatic addr_t pick();
    int i, k;
    k = $urandom % 10;
    i = $urandom % N_SLAVES;
    if (k == 0) return 24'h050000 + addr_t'($urandom % 16);           // unmapped
    if (k == 1) return MAP_BASE[i] + MAP_SPAN[i] - 1;                   // last word
    if (k == 2) return MAP_BASE[i];                                     // first word
    return MAP_BASE[i] + addr_t'($urandom % 8);
  endfunction

  initial begin
    mreq = '0;
    for (int i = 0; i < N_SLAVES; i++) begin srsp[i] = '0; s_acc[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++)
      ops.push_back('{wr: bit'($urandom % 2), a: pick(), d: 16'($urandom)});
    wait (ops.size() == 0);
    repeat (6) @(posedge clk);
    check(mq.size() == 0, "all reads answered");
    // Every write must sit in the right slave at the relative address.
    foreach (shadow[g]) begin
      int i;
      for (i = 0; i < N_SLAVES; i++)
        if (g >= MAP_BASE[i] && g - MAP_BASE[i] < MAP_SPAN[i]) break;
      check(smem[i].exists(int'(g - MAP_BASE[i])) && smem[i][int'(g - MAP_BASE[i])] == shadow[g],
            $sformatf("write to %h not in slave %0d", g, i));
    end
    for (int i = 0; i < N_SLAVES; i++) check(s_acc[i] > 100, $sformatf("slave %0d accesses %0d", i, s_acc[i]));
    check(stalls > 100, $sformatf("stalls %0d", stalls));
    check(blocked_reads > 50, $sformatf("reads held behind an outstanding read %0d", blocked_reads));
    check(err_reads > 20, $sformatf("unmapped reads %0d", err_reads));
    $display("reads %0d stalls %0d blocked %0d unmapped %0d", reads_done, stalls, blocked_reads, err_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
