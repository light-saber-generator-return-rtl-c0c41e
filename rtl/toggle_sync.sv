// toggle_sync: carries events from one clock domain into another.
//
// The source side flips i_toggle once per event. Here the level passes
// through two flip-flops (the first may go metastable, the second resolves
// it) and a third copy detects each change, giving o_pulse for one
// destination clock per event. Data that the source holds steady around the
// toggle can be captured on o_pulse. Events must be further apart than about
// three destination clocks. This synchronizer is this design's choice; the
// design description only says that the two clock domains must be kept apart.
module toggle_sync (
  input  logic clk,      // destination clock
  input  logic rst_n,
  input  logic i_toggle, // from the source domain
  output logic o_pulse,
  output logic o_level   // synchronized copy of i_toggle
);
  logic s1, s2, s3;
  always_ff @(posedge clk) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {i_toggle, s1, s2};
  end
  assign o_pulse = s2 ^ s3;
  assign o_level = s2;
endmodule
