// tb_line_buffer: fills the 80-word line buffer from one clock domain with
// random words, reads every word back from a second, unrelated clock and
// compares with a copy kept in the testbench; checks the one-cycle read
// latency, that a read with re_i low holds the output, and that an
// out-of-range write leaves the memory untouched.
module tb_line_buffer;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 80;
  logic wclk = 0, rclk = 0;
  logic we = 0, re = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(16)) dut (
    .wclk(wclk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .rclk(rclk), .re_i(re), .raddr_i(raddr), .rdata_o(rdata));

  always #18.5 wclk = ~wclk;  // 27 MHz
  always #20   rclk = ~rclk;  // 25 MHz

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      we = 1; waddr = 7'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    @(negedge wclk);
    // Out-of-range write must not alias onto a real word.
    waddr = 7'(DEPTH); wdata = 16'hDEAD;
    @(negedge wclk);
    we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      @(negedge rclk);
      re = 1; raddr = 7'(i);
      @(posedge rclk); #1;
      check(rdata, shadow[i], $sformatf("word %0d", i));
    end
    // Hold: re low keeps the last value.
    @(negedge rclk);
    re = 0; raddr = 7'd5;
    @(posedge rclk); #1;
    check(rdata, shadow[0], "hold with re low");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk);
      re = 1; raddr = 7'(i);
      @(posedge rclk); #1;
      check(rdata, shadow[i], $sformatf("second pass word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
