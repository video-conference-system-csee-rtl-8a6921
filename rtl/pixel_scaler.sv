// pixel_scaler: widens an N-bit luminance pixel to the M-bit pixel the
// display path uses.
//
// Two methods are built in, selected by the REPLICATE parameter:
//  * REPLICATE = 0 (default), "bit staggering": the output is built by
//    taking, from the most significant end, one bit of the input followed by
//    a '0', again and again, so 4'b1101 becomes 8'b1010_0010. With M = 2N
//    this is exactly the method the design specifies; for other M the
//    staggered pattern is cut off or zero-padded at the low end.
//  * REPLICATE = 1: the input bits are repeated from the top down
//    (4'b1101 -> 8'b1101_1101), which maps the largest N-bit value onto the
//    largest M-bit value and zero onto zero, the full-scale mapping the design
//    asks for in general terms. This alternative is this design's own
//    addition for users who want full brightness.
// Interface: pix_i (N bits) in, pix_o (M bits) out.
// Timing: purely combinational, the output follows pix_i in the same cycle.
// Both methods are fixed wiring: every output bit is either an input bit or
// a constant 0, so the block synthesises to no cells.
module pixel_scaler #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 8,
  parameter bit          REPLICATE = 1'b0   // 0: staggering, 1: replication
) (
  input  logic [N-1:0] pix_i,
  output logic [M-1:0] pix_o
);

  always_comb begin
    pix_o = '0;
    for (int unsigned k = 0; k < M; k++) begin
      // k counts output bits from the most significant one down.
      if (REPLICATE) begin
        pix_o[M-1-k] = pix_i[N-1-(k % N)];
      end else if (k % 2 == 0 && k / 2 < N) begin
        pix_o[M-1-k] = pix_i[N-1-k/2];
      end
    end
  end

endmodule
