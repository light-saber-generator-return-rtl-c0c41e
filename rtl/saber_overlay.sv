// saber_overlay: paints the light saber over one video pixel.
//
// For the current output column x and the row's span from the lookup table:
//   inner_x1 < x < inner_x2            -> white core, R = G = B = 1023
//   outer_x1 < x < outer_x2 (else)     -> halo: the camera pixel with a large
//                                         amount of green added (clipped at
//                                         1023), which looks like translucent
//                                         green light
//   otherwise                          -> the camera pixel unchanged
// Outside the active picture the output is black. The white core, the green
// halo added to the existing colour and drawing between the table's two
// columns follow the design description; strict bounds and the amount of
// green (HALO_GREEN) are this design's choice. A table entry of all zeros
// paints nothing.
//
// Timing: one clock of latency, all outputs registered.
module saber_overlay #(
  parameter int unsigned HALO_GREEN = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 i_active,
  input  logic [9:0]           i_x,
  input  lsg_pkg::rgb10_t      i_pix,
  input  lsg_pkg::saber_span_t i_span,
  output lsg_pkg::rgb10_t      o_pix,
  output logic                 o_in_core,   // for observation: pixel was core
  output logic                 o_in_halo    // for observation: pixel was halo
);
  logic in_outer, in_inner;
  logic [10:0] g_sum;

  assign in_outer = (16'(i_x) > i_span.outer_x1) && (16'(i_x) < i_span.outer_x2);
  assign in_inner = (16'(i_x) > i_span.inner_x1) && (16'(i_x) < i_span.inner_x2);
  assign g_sum    = 11'(i_pix.g) + 11'(HALO_GREEN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_pix <= '0; o_in_core <= 1'b0; o_in_halo <= 1'b0;
    end else begin
      o_in_core <= 1'b0;
      o_in_halo <= 1'b0;
      if (!i_active) begin
        o_pix <= '0;
      end else if (in_outer && in_inner) begin
        o_pix     <= '{r: 10'h3FF, g: 10'h3FF, b: 10'h3FF};
        o_in_core <= 1'b1;
      end else if (in_outer) begin
        o_pix.r   <= i_pix.r;
        o_pix.g   <= g_sum[10] ? 10'h3FF : g_sum[9:0];
        o_pix.b   <= i_pix.b;
        o_in_halo <= 1'b1;
      end else begin
        o_pix <= i_pix;
      end
    end
  end
endmodule
