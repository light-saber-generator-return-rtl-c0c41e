// pixel_skip: horizontal down-sampler from 720 to 640 luma samples per line.
//
// Every ninth luma sample of a line is dropped (samples 8, 17, ..., 719), which
// removes exactly 80 of the 720 active samples and leaves 640. Only the luma
// sample is dropped: its chroma byte still reaches the 4:2:2 to 4:4:4 stage,
// so no colour information is lost. The drop-one-in-nine rule is from the
// design description; which sample of each group of nine is dropped (the last)
// is this design's choice.
//
// Interface: i_line_start restarts the count (one clock, at SAV); i_sample
// marks one luma sample. o_keep is combinational and valid in the same clock
// as i_sample: 1 when that sample is kept.
module pixel_skip #(
  parameter int unsigned PERIOD = 9   // one sample in PERIOD is dropped
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_line_start,
  input  logic i_sample,
  output logic o_keep
);
  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] phase;

  assign o_keep = (phase != CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || i_line_start)
      phase <= '0;
    else if (i_sample)
      phase <= (phase == CW'(PERIOD - 1)) ? '0 : phase + 1'b1;
  end
endmodule
