// yuv422_to_444: chroma up-sampler from 4:2:2 to 4:4:4.
//
// In 4:2:2 each pair of luma samples shares one Cb and one Cr. This block
// gives every luma sample a full (Y, Cb, Cr) triple by holding the most recent
// Cb and Cr: an even sample arrives with its Cb and takes the Cr held from the
// previous pair, an odd sample arrives with its Cr and takes the Cb of its own
// pair. Chroma is captured from every sample (i_sample), also from samples the
// down-sampler drops; a pixel is emitted only for kept samples (i_dval).
// The conversion step itself is from the design description; sample-and-hold
// up-sampling is this design's choice (the simplest method that does it).
//
// Timing: one clock of latency; o_valid is a one-clock strobe per pixel.
module yuv422_to_444 (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           i_sample,
  input  logic           i_dval,
  input  logic [7:0]     i_y,
  input  logic [7:0]     i_c,
  input  logic           i_c_is_cb,
  output logic           o_valid,
  output lsg_pkg::ycbcr_t o_pix
);
  logic [7:0] cb_hold, cr_hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cb_hold <= 8'd128;
      cr_hold <= 8'd128;
      o_valid <= 1'b0;
      o_pix   <= '{y: 8'd0, cb: 8'd128, cr: 8'd128};
    end else begin
      o_valid <= i_sample && i_dval;
      if (i_sample) begin
        if (i_c_is_cb) cb_hold <= i_c;
        else           cr_hold <= i_c;
        o_pix.y  <= i_y;
        o_pix.cb <= i_c_is_cb ? i_c : cb_hold;
        o_pix.cr <= i_c_is_cb ? cr_hold : i_c;
      end
    end
  end
endmodule
