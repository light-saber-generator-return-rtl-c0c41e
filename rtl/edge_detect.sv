// edge_detect: one-clock pulse on an edge of a synchronous input.
//
// The decoder's sync outputs (TD_HS, TD_VS) are level signals whose widths do
// not match what the VGA timing needs (the vertical sync is tens of lines wide).
// This block registers the input once and compares: o_pulse is high for the
// one clock in which the input differs from its registered copy in the chosen
// direction. The VGA timing then builds syncs of the right width from counters.
// Using edges of the incoming syncs is from the design description; which edge
// (RISING = 1: the start of the pulse) is this design's choice.
//
// Timing: combinational from i_sig, so o_pulse is high in the first clock in
// which the new level is sampled.
module edge_detect #(
  parameter bit RISING = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_sig,
  output logic o_pulse
);
  logic q;
  always_ff @(posedge clk) begin
    if (!rst_n) q <= RISING ? 1'b1 : 1'b0;
    else        q <= i_sig;
  end
  assign o_pulse = RISING ? (i_sig && !q) : (!i_sig && q);
endmodule
