// sync_2ff: two-flip-flop synchroniser that brings a single-bit level into
// the clock domain of clk. The output follows the input two to three clk
// edges later; the reset value is 0. Used for the handshake flags that pass
// between the video decoder clock and the system clock.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d_i,
  output logic q_o
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q_o  <= 1'b0;
    end else begin
      meta <= d_i;
      q_o  <= meta;
    end
  end
endmodule
