// lsg_top: light saber generator, the video hardware of the system.
//
// Data flow (27 MHz): the video decoder chip's BT.656 byte stream enters
// itu656_decoder, which finds the timing codes, keeps 640 of the 720 luma
// samples per line and pairs each with its chroma; yuv422_to_444 gives each
// pixel a full Y/Cb/Cr triple. Each pixel then goes two ways: ycbcr2rgb makes
// 10-bit RGB for the line buffers of vga_controller, and xy_detect counts the
// blue and green marker pixels of every line. The processor (not part of this
// RTL) reads the marker statistics over the Avalon-MM slave, computes where the
// saber lies, and writes one span per output row into the lookup RAM; the VGA
// side draws the saber from that table while showing every input line twice.
//
// Start-up: i2c_av_config programs the decoder chip from reset. The input
// syncs are watched by td_lock_detect; once they are steady, reset_delay
// releases the video pipeline in stages, so it never starts on an unsteady
// input. Both the staged start-up and the I2C set-up follow the design
// description's block diagram.
//
// Line boundaries: the VGA timing restarts at every rising edge of the input
// horizontal sync, as does the choice of the line buffer on display. The last
// pixels of a line are still in the colour pipeline at that moment, so the
// pixel side (the buffer being filled and the marker statistics) closes a
// line at the next start of active video decoded from the stream instead.
//
// Clocks: clk27 (video, the decoder chip's clock) and clk50 (processor bus).
// rst_n is asynchronous, active low, and synchronized into each domain here.
// The I2C data line is open drain: o_i2c_sda_oe = 1 pulls it low.
// Some block outputs are left unconnected here on purpose: the decoder's field,
// blanking and sample-column outputs and xy_detect's per-pixel blue/green
// flags exist for observation and for the block tests.
module lsg_top (
  input  logic        clk27,
  input  logic        clk50,
  input  logic        rst_n,
  // video decoder chip
  input  logic [7:0]  i_td_data,
  input  logic        i_td_hs,
  input  logic        i_td_vs,
  output logic        o_td_reset_n,
  output logic        o_i2c_sclk,
  output logic        o_i2c_sda_oe,
  input  logic        i_i2c_sda,
  // VGA DAC
  output logic        o_vga_clk,
  output logic        o_vga_hs_n,
  output logic        o_vga_vs_n,
  output logic        o_vga_blank_n,
  output logic        o_vga_sync_n,
  output logic [9:0]  o_vga_r,
  output logic [9:0]  o_vga_g,
  output logic [9:0]  o_vga_b,
  // Avalon-MM slave towards the processor (clk50)
  input  logic [4:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [15:0] avs_writedata,
  output logic [15:0] avs_readdata,
  // status
  output logic        o_config_done,
  output logic [7:0]  o_i2c_retries,   // set-up writes the chip did not acknowledge
  output logic        o_locked,
  output logic        o_video_ready,
  output logic        o_in_core,
  output logic        o_in_halo
);
  import lsg_pkg::*;

  // ---------------- resets ----------------
  logic [1:0] rs27, rs50;
  logic       rst27_n, rst50_n;
  always_ff @(posedge clk27 or negedge rst_n)
    if (!rst_n) rs27 <= '0; else rs27 <= {rs27[0], 1'b1};
  always_ff @(posedge clk50 or negedge rst_n)
    if (!rst_n) rs50 <= '0; else rs50 <= {rs50[0], 1'b1};
  assign rst27_n = rs27[1];
  assign rst50_n = rs50[1];
  assign o_td_reset_n = rst_n;

  // ---------------- decoder chip set-up ----------------
  i2c_av_config u_i2c (
    .clk(clk27), .rst_n(rst27_n), .i_sda(i_i2c_sda),
    .o_scl(o_i2c_sclk), .o_sda_oe(o_i2c_sda_oe), .o_done(o_config_done),
    .o_retries(o_i2c_retries)
  );

  // ---------------- input syncs, lock, start-up delay ----------------
  logic hs_edge, vs_edge;
  edge_detect #(.RISING(1'b1)) u_hs_edge (.clk(clk27), .rst_n(rst27_n), .i_sig(i_td_hs), .o_pulse(hs_edge));
  edge_detect #(.RISING(1'b1)) u_vs_edge (.clk(clk27), .rst_n(rst27_n), .i_sig(i_td_vs), .o_pulse(vs_edge));

  td_lock_detect u_lock (
    .clk(clk27), .rst_n(rst27_n), .i_hs_edge(hs_edge), .i_vs_edge(vs_edge), .o_locked(o_locked)
  );

  logic [2:0] dly_rst_n;
  reset_delay u_dly (.clk(clk27), .rst_n(rst27_n), .i_start(o_locked), .o_rst_n(dly_rst_n));

  logic vga_rst_n, pipe_rst_n;
  assign vga_rst_n     = dly_rst_n[0];
  assign pipe_rst_n    = dly_rst_n[1];
  assign o_video_ready = dly_rst_n[2];

  // ---------------- input pipeline ----------------
  logic       smp, dval, c_is_cb, sav, field, vblank;
  logic [7:0] y, c;
  logic [9:0] sx;
  itu656_decoder u_itu (
    .clk(clk27), .rst_n(pipe_rst_n), .i_data(i_td_data),
    .o_sample(smp), .o_dval(dval), .o_y(y), .o_c(c), .o_c_is_cb(c_is_cb),
    .o_x(sx), .o_sav(sav), .o_field(field), .o_vblank(vblank)
  );

  logic   p444_valid;
  ycbcr_t p444;
  yuv422_to_444 u_444 (
    .clk(clk27), .rst_n(pipe_rst_n), .i_sample(smp), .i_dval(dval),
    .i_y(y), .i_c(c), .i_c_is_cb(c_is_cb), .o_valid(p444_valid), .o_pix(p444)
  );

  logic   rgb_valid;
  rgb10_t rgb;
  ycbcr2rgb u_rgb (
    .clk(clk27), .rst_n(pipe_rst_n), .i_valid(p444_valid), .i_pix(p444),
    .o_valid(rgb_valid), .o_rgb(rgb)
  );

  logic        stats_valid, is_blue, is_green;
  line_stats_t stats;
  xy_detect u_xy (
    .clk(clk27), .rst_n(pipe_rst_n), .i_valid(p444_valid), .i_pix(p444),
    .i_line_end(sav), .i_field_start(vs_edge),
    .o_stats_valid(stats_valid), .o_stats(stats), .o_is_blue(is_blue), .o_is_green(is_green)
  );

  // ---------------- output side ----------------
  rgb10_t vga_rgb;
  vga_controller u_vga (
    .clk27(clk27), .rst27_n(vga_rst_n), .clk50(clk50), .rst50_n(rst50_n),
    .i_hs_edge(hs_edge), .i_vs_edge(vs_edge), .i_pix_line_start(sav),
    .i_pix_valid(rgb_valid), .i_pix(rgb),
    .i_stats(stats), .i_stats_valid(stats_valid),
    .o_vga_clk, .o_vga_hs_n, .o_vga_vs_n, .o_vga_blank_n, .o_vga_sync_n,
    .o_vga_rgb(vga_rgb),
    .address(avs_address), .chipselect(avs_chipselect), .read(avs_read), .write(avs_write),
    .writedata(avs_writedata), .readdata(avs_readdata),
    .o_in_core, .o_in_halo
  );
  assign o_vga_r = vga_rgb.r;
  assign o_vga_g = vga_rgb.g;
  assign o_vga_b = vga_rgb.b;
endmodule
