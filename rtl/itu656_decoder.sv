// itu656_decoder: ITU-R BT.656 stream decoder.
//
// The 8-bit stream carries Cb Y Cr Y ... for the 720 active samples of a line
// and marks line boundaries with 4-byte timing codes FF 00 00 XY, where the XY
// status byte holds F (field, bit 6), V (vertical blanking, bit 5) and H (0 at
// SAV, 1 at EAV, bit 4). The decoder keeps a 3-byte sliding window of the
// stream; when the window reads FF 00 00 the current byte is a status word.
// After an SAV, 1440 bytes of active video follow.
//
// A luma sample is reported (o_sample) when all of these hold: a field start
// has been seen since reset (F went from 1 to 0), the last status word said
// V = 0, the byte is inside the 1440 active bytes, and it is a Y byte. o_dval
// additionally requires that pixel_skip keeps the sample, so o_dval fires 640
// times per active line. Each sample comes with the chroma byte of its pair:
// Cb for the even sample (o_c_is_cb = 1), Cr for the odd one.
//
// Timing: outputs are registered; a sample appears one clock after its Y byte
// is on i_data. o_sav is a one-clock pulse one clock after the SAV status byte.
// Window, SAV/EAV and F/V/H decoding, the frame-start and field-valid tests and
// the skip rule follow the design description; the output format (luma plus
// its chroma byte, with a separate sample strobe) is this design's choice.
module itu656_decoder (
  input  logic       clk,        // 27 MHz stream clock
  input  logic       rst_n,
  input  logic [7:0] i_data,     // BT.656 byte stream
  output logic       o_sample,   // a luma sample of active video (all 720)
  output logic       o_dval,     // a kept luma sample (640 per line)
  output logic [7:0] o_y,
  output logic [7:0] o_c,        // chroma byte paired with this sample
  output logic       o_c_is_cb,  // o_c is Cb (even sample) or Cr (odd)
  output logic [9:0] o_x,        // luma sample index 0..719
  output logic       o_sav,      // start of active video of any line
  output logic       o_field,    // F of the last status word
  output logic       o_vblank    // V of the last status word
);
  import lsg_pkg::*;

  logic [23:0] window;
  logic        is_code, sav, eav;
  logic [10:0] cnt;              // byte index inside the active line
  logic        active;
  logic        field, field_d, started, fval;
  logic [7:0]  cb_byte, cr_byte;
  logic        keep;
  logic        y_byte;

  assign is_code = (window == 24'hFF_0000);
  assign sav     = is_code && !i_data[4];
  assign eav     = is_code &&  i_data[4];
  assign y_byte  = active && cnt[0];

  pixel_skip #(.PERIOD(SKIP_PERIOD)) u_skip (
    .clk, .rst_n,
    .i_line_start(sav),
    .i_sample    (y_byte && started && fval),
    .o_keep      (keep)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window   <= '0;
      cnt      <= '0;
      active   <= 1'b0;
      field    <= 1'b0;
      field_d  <= 1'b0;
      started  <= 1'b0;
      fval     <= 1'b0;
      cb_byte  <= '0;
      cr_byte  <= '0;
      o_sample <= 1'b0;
      o_dval   <= 1'b0;
      o_y      <= '0;
      o_c      <= '0;
      o_c_is_cb<= 1'b0;
      o_x      <= '0;
      o_sav    <= 1'b0;
    end else begin
      window <= {window[15:0], i_data};

      // Active-video byte counter, restarted by SAV, stopped after 1440 bytes.
      if (sav) begin
        cnt    <= '0;
        active <= 1'b1;
      end else if (active) begin
        if (cnt == 11'(BT656_ACTIVE_BYTES - 1) || eav) active <= 1'b0;
        cnt <= cnt + 1'b1;
      end

      // Field and field-valid flags from every status word.
      if (is_code) begin
        field <= i_data[6];
        fval  <= !i_data[5];
      end
      field_d <= field;
      if (field_d && !field) started <= 1'b1;

      // Remember the chroma bytes of the current pair.
      if (active && cnt[1:0] == 2'd0) cb_byte <= i_data;
      if (active && cnt[1:0] == 2'd2) cr_byte <= i_data;

      o_sav    <= sav;
      o_sample <= y_byte && started && fval;
      o_dval   <= y_byte && started && fval && keep;
      if (y_byte) begin
        o_y       <= i_data;
        o_c       <= cnt[1] ? cr_byte : cb_byte;
        o_c_is_cb <= !cnt[1];
        o_x       <= cnt[10:1];
      end
    end
  end

  assign o_field  = field;
  assign o_vblank = !fval;
endmodule
