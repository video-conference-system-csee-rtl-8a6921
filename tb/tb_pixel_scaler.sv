// tb_pixel_scaler: exhaustive check of the 4-to-8-bit pixel widening, in
// both the staggering mode (reference: interleave each input bit with a 0,
// most significant first, e.g. 1101 -> 10100010) and the replication mode
// (reference: the nibble written twice), plus the 4-to-10-bit staggering
// used on the 10-bit DAC path, where the two spare bits must be zero.
module tb_pixel_scaler;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] pix;
  logic [7:0] stag, rep;
  logic [9:0] stag10;
  int checks = 0, failures = 0;

  pixel_scaler #(.N(4), .M(8), .REPLICATE(1'b0)) u_stag (.pix_i(pix), .pix_o(stag));
  pixel_scaler #(.N(4), .M(8), .REPLICATE(1'b1)) u_rep  (.pix_i(pix), .pix_o(rep));
  pixel_scaler #(.N(4), .M(10), .REPLICATE(1'b0)) u_s10 (.pix_i(pix), .pix_o(stag10));

  function automatic logic [7:0] ref_stagger(logic [3:0] p);
    return {p[3], 1'b0, p[2], 1'b0, p[1], 1'b0, p[0], 1'b0};
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s pix=%b got=%h exp=%h", what, pix, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The worked example of the method.
    pix = 4'b1101;
    #1;
    check(32'(stag), 32'b1010_0010, "example 1101");
    for (int v = 0; v < 16; v++) begin
      pix = 4'(v);
      #1;
      check(32'(stag), 32'(ref_stagger(pix)), "stagger");
      check(32'(rep), 32'({pix, pix}), "replicate");
      check(32'(stag10), 32'({ref_stagger(pix), 2'b00}), "stagger10");
    end
    check(32'(rep), 32'hFF, "replicate full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
