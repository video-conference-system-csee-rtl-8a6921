// is61lv25616_model: behavioural model of a 256K x 16 asynchronous SRAM,
// for simulation only. Reads are combinational (the word at addr_i appears
// on dq_o while CE and OE are low and WE is high, otherwise dq_o is 0 and
// drive_o is low); a write stores the bytes enabled by UB/LB at the rising
// edge of WE or CE, as in a WE-controlled write cycle. The optional
// strobe-overlap check reports reads and writes that overlap.
module is61lv25616_model #(
  parameter int unsigned AW = 18
) (
  input  logic [AW-1:0] addr_i,
  input  logic [15:0]   dq_i,
  output logic [15:0]   dq_o,
  output logic          drive_o,
  input  logic          ce_n_i,
  input  logic          oe_n_i,
  input  logic          we_n_i,
  input  logic          ub_n_i,
  input  logic          lb_n_i
);
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] mem [2**AW];
  logic        wr_active = 1'b0;
  logic [AW-1:0] wr_addr;
  logic [15:0] wr_data;
  logic        wr_ub, wr_lb;
  int unsigned writes = 0, reads = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  assign drive_o = !ce_n_i && !oe_n_i && we_n_i;
  assign dq_o    = drive_o ? mem[addr_i] : '0;

  // Capture the write while WE and CE are low; commit when either rises.
  always @* begin
    if (!ce_n_i && !we_n_i && $time > 0) begin
      wr_active = 1'b1;
      wr_addr   = addr_i;
      wr_data   = dq_i;
      wr_ub     = !ub_n_i;
      wr_lb     = !lb_n_i;
    end
  end
  always @(posedge we_n_i or posedge ce_n_i) begin
    if (wr_active) begin
      if (wr_ub) mem[wr_addr][15:8] = wr_data[15:8];
      if (wr_lb) mem[wr_addr][7:0]  = wr_data[7:0];
      writes++;
      wr_active = 1'b0;
    end
  end
endmodule
