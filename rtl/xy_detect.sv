// xy_detect: per-line detector of the green and blue sword markers.
//
// A pixel is a marker pixel when its YCbCr values fall inside fixed ranges:
//   blue : Y > 85  and Cb > 140 and Cr < 120
//   green: Y > 100 and Cb < 120 and Cr < 110
// (the ranges are from the design description; the two Cb ranges do not
// overlap, so a pixel is never both). Over one line the block counts the
// blue and the green pixels and remembers the column of the last one of each.
// At the end of the line (i_line_end; in the full design the start of the next
// line's active video, by which time the last pixel of the line has left the
// colour pipeline) these four numbers and the line number are published in o_stats and
// o_stats_valid pulses for one clock; the running values are then cleared.
// Software turns them into the marker's extent on the line:
// x2 = last column, x1 = x2 - count.
//
// Column numbers count kept pixels from 0 after each line end. The line number
// counts lines that carried pixels since the last field start (i_field_start);
// the first such line is 0. Counter widths (10 bits) and the line numbering are
// this design's choices.
//
// Timing: o_stats changes only in the clock after i_line_end and stays
// constant for a whole line, which lets another clock domain sample it.
module xy_detect #(
  parameter int unsigned BLUE_Y_MIN   = 85,   // Y  >  this
  parameter int unsigned BLUE_CB_MIN  = 140,  // Cb >  this
  parameter int unsigned BLUE_CR_MAX  = 120,  // Cr <  this
  parameter int unsigned GREEN_Y_MIN  = 100,  // Y  >  this
  parameter int unsigned GREEN_CB_MAX = 120,  // Cb <  this
  parameter int unsigned GREEN_CR_MAX = 110   // Cr <  this
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                i_valid,
  input  lsg_pkg::ycbcr_t     i_pix,
  input  logic                i_line_end,
  input  logic                i_field_start,
  output logic                o_stats_valid,
  output lsg_pkg::line_stats_t o_stats,
  output logic                o_is_blue,    // classification of i_pix (combinational)
  output logic                o_is_green
);
  logic [9:0] x, blue_cnt, blue_x, green_cnt, green_x, line_ctr;
  logic       had_pixels;

  assign o_is_blue  = (i_pix.y > 8'(BLUE_Y_MIN))  && (i_pix.cb > 8'(BLUE_CB_MIN))
                   && (i_pix.cr < 8'(BLUE_CR_MAX));
  assign o_is_green = (i_pix.y > 8'(GREEN_Y_MIN)) && (i_pix.cb < 8'(GREEN_CB_MAX))
                   && (i_pix.cr < 8'(GREEN_CR_MAX));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0; blue_cnt <= '0; blue_x <= '0; green_cnt <= '0; green_x <= '0;
      line_ctr <= '0; had_pixels <= 1'b0;
      o_stats_valid <= 1'b0;
      o_stats <= '0;
    end else begin
      o_stats_valid <= 1'b0;
      if (i_line_end) begin
        if (had_pixels) begin
          o_stats <= '{blue_count: blue_cnt, blue_x: blue_x,
                       green_count: green_cnt, green_x: green_x, line: line_ctr};
          o_stats_valid <= 1'b1;
          line_ctr <= line_ctr + 1'b1;
        end
        x <= '0; blue_cnt <= '0; blue_x <= '0; green_cnt <= '0; green_x <= '0;
        had_pixels <= 1'b0;
      end else if (i_valid) begin
        had_pixels <= 1'b1;
        x <= x + 1'b1;
        if (o_is_blue) begin
          blue_cnt <= blue_cnt + 1'b1;
          blue_x   <= x;
        end
        if (o_is_green) begin
          green_cnt <= green_cnt + 1'b1;
          green_x   <= x;
        end
      end
      if (i_field_start) line_ctr <= '0;
    end
  end
endmodule
