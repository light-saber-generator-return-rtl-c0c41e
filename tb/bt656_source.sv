// bt656_source: behavioural model of the video decoder chip's digital output.
//
// Produces a 525-line NTSC frame sequence as an 8-bit BT.656 stream, one byte
// per clock: EAV, 268 blanking bytes, SAV, 1440 active bytes (1716 per line),
// with fields and vertical blanking as in BT.656 (field 1: lines 4..265,
// active 21..263; field 2: lines 266..3, active 283..525). The image comes
// from tb_video_pkg. It also drives the chip's separate sync outputs: td_hs
// high for HS_W bytes from the start of every line, td_vs high for VS_LINES
// lines from the first line of each field. `line` and `byte_no` report the
// position of the byte now on `data`.
module bt656_source #(
  parameter int START_LINE = 1,
  parameter int HS_W       = 128,
  parameter int VS_LINES   = 6
) (
  input  logic       clk,
  input  logic       en,
  output logic [7:0] data,
  output logic       td_hs,
  output logic       td_vs,
  output int         line,
  output int         byte_no
);
  import tb_video_pkg::*;

  int ln = START_LINE, bn = 0;
  assign line    = ln;
  assign byte_no = bn;

  always @(posedge clk) begin
    if (en) begin
      if (bn == 1715) begin
        bn <= 0;
        ln <= (ln == 525) ? 1 : ln + 1;
      end else begin
        bn <= bn + 1;
      end
    end
  end

  function automatic int lines_since(int from, int l);
    return (l >= from) ? l - from : l + 525 - from;
  endfunction

  always_comb begin
    int a;
    bit f, v;
    f = line_f(line);
    v = line_v(line);
    a = active_index(line);
    if (byte_no < 4)
      data = (byte_no == 0) ? 8'hFF : (byte_no == 3) ? xy(f, v, 1'b1) : 8'h00;
    else if (byte_no < 272)
      data = (byte_no % 2 == 0) ? 8'h80 : 8'h10;
    else if (byte_no < 276)
      data = (byte_no == 272) ? 8'hFF : (byte_no == 275) ? xy(f, v, 1'b0) : 8'h00;
    else if (a < 0)
      data = (byte_no % 2 == 0) ? 8'h80 : 8'h10;
    else
      data = active_byte(byte_no - 276, a);
    td_hs = en && (byte_no < HS_W);
    td_vs = en && ((lines_since(4, line) < VS_LINES) || (lines_since(266, line) < VS_LINES));
  end
endmodule
