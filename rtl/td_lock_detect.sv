// td_lock_detect: decides when the video decoder's syncs are stable.
//
// After power-up the video decoder needs time before its horizontal and
// vertical syncs describe a steady NTSC signal. This block counts horizontal
// sync pulses between two vertical sync pulses. A field whose line count lies
// within [MIN_LINES, MAX_LINES] is good (an NTSC field has 262 or 263 lines);
// after LOCK_FIELDS good fields in a row o_locked rises, and any bad field
// drops it again. The block exists in the design description only by its name
// and purpose ("locked detector" feeding the start-up delay timer); the
// line-count test is this design's choice.
//
// Interface: i_hs_edge and i_vs_edge are one-clock pulses at the start of each
// sync. Timing: o_locked changes in the clock after a vertical sync pulse.
module td_lock_detect #(
  parameter int unsigned MIN_LINES   = 262,
  parameter int unsigned MAX_LINES   = 263,
  parameter int unsigned LOCK_FIELDS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_hs_edge,
  input  logic i_vs_edge,
  output logic o_locked
);
  logic [9:0] lines;
  logic [3:0] good;
  logic       seen_vs;
  logic       field_ok;

  assign field_ok = (lines >= 10'(MIN_LINES)) && (lines <= 10'(MAX_LINES));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lines <= '0; good <= '0; seen_vs <= 1'b0; o_locked <= 1'b0;
    end else begin
      if (i_vs_edge) begin
        // a line start on the same clock is the first line of the new field
        lines   <= i_hs_edge ? 10'd1 : 10'd0;
        seen_vs <= 1'b1;
        if (seen_vs && field_ok) begin
          if (good != 4'(LOCK_FIELDS)) good <= good + 1'b1;
          if (good + 1'b1 >= 4'(LOCK_FIELDS)) o_locked <= 1'b1;
        end else if (seen_vs) begin
          good     <= '0;
          o_locked <= 1'b0;
        end
      end else if (i_hs_edge && lines != 10'h3FF) begin
        lines <= lines + 1'b1;
      end
    end
  end
endmodule
