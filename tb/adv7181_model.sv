// adv7181_model: behavioural model of the luminance port of the ADV7181
// video decoder in 16-bit output mode, for simulation only.
//
// It produces interlaced video: each frame is field 0 then field 1, each
// field made of vertical-blanking lines (BLANK_LINES in field 0, one more in
// field 1, so the defaults give 525 lines per frame) followed by
// ACTIVE_LINES active lines. A line of LINE_TOTAL samples is horizontal
// blanking (value 10h), an SAV code, ACTIVE samples and an EAV code; the
// codes are FF 00 00 XY with XY = {1, F, V, H, P3..P0} as in BT.656. VS is
// high during the first VS_LINES lines of each field and FIELD gives the
// field number. Active line n of field f is frame line 2n+f and carries the
// test picture of tb_video_pkg. One sample per rising edge of clk while en
// is high; with the default 1716 clocks per line at 27 MHz a line lasts
// 63.6 us, as in NTSC. frame_o counts frames; act_o and line_o tell which frame line is
// being sent.
module adv7181_model
  import tb_video_pkg::*;
#(
  parameter int unsigned ACTIVE       = 640,
  parameter int unsigned LINE_TOTAL   = 1716,
  parameter int unsigned BLANK_LINES  = 22,
  parameter int unsigned ACTIVE_LINES = 240,
  parameter int unsigned VS_LINES     = 3
) (
  input  logic        clk,
  input  logic        en,
  output logic [7:0]  y_o,
  output logic        vs_o,
  output logic        field_o,
  output int unsigned frame_o,
  output logic        act_o,
  output int unsigned line_o
);
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned SAV_AT = LINE_TOTAL - ACTIVE - 8;
  localparam int unsigned ACT_AT = LINE_TOTAL - ACTIVE - 4;
  localparam int unsigned EAV_AT = LINE_TOTAL - 4;
  int unsigned s = 0, ln = 0, fld = 0;
  int unsigned bl;
  logic v;

  function automatic logic [7:0] xy(logic f, logic vb, logic h);
    logic [3:0] p;
    p = {vb ^ h, f ^ h, f ^ vb, f ^ vb ^ h};
    return {1'b1, f, vb, h, p};
  endfunction

  initial begin
    frame_o = 0; y_o = 8'h10; vs_o = 0; field_o = 0; act_o = 0; line_o = 0;
  end

  always @(posedge clk) if (en) begin
    bl = BLANK_LINES + fld;   // field 1 has one more blanking line
    v = ln < bl;
    vs_o    <= ln < VS_LINES;
    field_o <= fld[0];
    act_o   <= !v;
    line_o  <= v ? 0 : 2 * (ln - bl) + fld;
    if (s < SAV_AT)               y_o <= 8'h10;
    else if (s < SAV_AT + 3)      y_o <= (s == SAV_AT) ? 8'hFF : 8'h00;
    else if (s == SAV_AT + 3)     y_o <= xy(fld[0], v, 1'b0);
    else if (s < EAV_AT)          y_o <= v ? 8'h10 : y_of(frame_o, 2 * (ln - bl) + fld, s - ACT_AT);
    else if (s < EAV_AT + 3)      y_o <= (s == EAV_AT) ? 8'hFF : 8'h00;
    else                          y_o <= xy(fld[0], v, 1'b1);
    if (s == LINE_TOTAL - 1) begin
      s <= 0;
      if (ln == bl + ACTIVE_LINES - 1) begin
        ln <= 0;
        if (fld == 1) begin fld <= 0; frame_o <= frame_o + 1; end
        else fld <= 1;
      end else ln <= ln + 1;
    end else s <= s + 1;
  end
endmodule
