// ycbcr2rgb: colour-space converter from 8-bit YCbCr (BT.601) to 10-bit RGB.
//
// The BT.601 equations are evaluated in integer arithmetic, scaled by 512:
//   R = (596*Y + 817*Cr            - 114131) / 512
//   G = (596*Y - 416*Cr - 200*Cb   +  69370) / 512
//   B = (596*Y + 1033*Cb           - 141787) / 512
// which gives 8-bit RGB. Multiplying by 4 for the 10-bit DAC is folded into
// the shift, so each sum is shifted right by 7. Sums wider than 10 bits are
// clipped: negative results become 0, results above 1023 become 1023.
// Coefficients, constants, the shift and the clipping are from the design
// description; the two-stage pipeline is this design's choice.
//
// Timing: two clocks of latency. o_valid follows i_valid with the same delay.
module ycbcr2rgb (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            i_valid,
  input  lsg_pkg::ycbcr_t i_pix,
  output logic            o_valid,
  output lsg_pkg::rgb10_t o_rgb
);
  localparam int signed KY   = 596;
  localparam int signed KR_CR = 817;
  localparam int signed KG_CR = -416;
  localparam int signed KG_CB = -200;
  localparam int signed KB_CB = 1033;
  localparam int signed OFF_R = -114131;
  localparam int signed OFF_G = 69370;
  localparam int signed OFF_B = -141787;

  logic signed [21:0] sum_r, sum_g, sum_b;
  logic               v1;

  function automatic logic [9:0] clip10(input logic signed [21:0] s);
    logic signed [21:0] q;
    q = s >>> 7;
    if (q < 0)          return 10'd0;
    else if (q > 1023)  return 10'd1023;
    else                return q[9:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_r <= '0; sum_g <= '0; sum_b <= '0;
      v1 <= 1'b0; o_valid <= 1'b0; o_rgb <= '0;
    end else begin
      // Stage 1: multiply-accumulate.
      sum_r <= 22'(KY * $signed({1'b0, i_pix.y}) + KR_CR * $signed({1'b0, i_pix.cr}) + OFF_R);
      sum_g <= 22'(KY * $signed({1'b0, i_pix.y}) + KG_CR * $signed({1'b0, i_pix.cr})
                   + KG_CB * $signed({1'b0, i_pix.cb}) + OFF_G);
      sum_b <= 22'(KY * $signed({1'b0, i_pix.y}) + KB_CB * $signed({1'b0, i_pix.cb}) + OFF_B);
      v1    <= i_valid;
      // Stage 2: scale to 10 bits and clip.
      o_rgb.r <= clip10(sum_r);
      o_rgb.g <= clip10(sum_g);
      o_rgb.b <= clip10(sum_b);
      o_valid <= v1;
    end
  end
endmodule
