// tb_lsg_top: end-to-end test of the light saber generator at its default
// sizes.
//
// Around the top sit models of what the board provides: a camera behind a
// video decoder chip (bt656_source: NTSC BT.656 stream, 525 lines, with a
// blue and a green marker box in every field and the chip's separate sync
// outputs), the chip's I2C set-up port (i2c_slave_model, which refuses the
// first transfer so that the retry happens) and the processor, played by a
// bus-master thread on the 50 MHz Avalon-MM slave. The processor model
// follows the intended software: it reads the marker statistics of every
// line, and at every new-field flag it clears the flag, takes the two marker
// positions of the field just seen and writes a saber span for all 480
// output rows into the table: a line from the blue to the green marker,
// 10 pixels of halo on each side of a 3-pixel core, empty rows elsewhere.
//
// Checks, all against values worked out here from the test image:
//  - all 40 set-up writes reach the chip, and the refused one is retried;
//  - lock, then the staged start-up delay (video ready DELAY_2 + 1 clocks
//    after lock);
//  - every line's statistics (blue and green count and last column, with the
//    9th-sample drop and the chroma hold applied to the source image);
//  - VGA timing: 858-clock lines, 103-clock sync, one vertical sync per field
//    of 262 or 263 input lines, 640-pixel active runs, 480 rows;
//  - every active pixel: row r shows active line r/2 of the field; colour
//    from a real-valued BT.601 conversion of the source pixel (within one
//    step of the 5-bit line buffer colour), white core and green-boosted halo
//    exactly where the table written by the processor model says.
// Column 0 is left out of the colour check: its red-difference sample is
// held over from the previous line.
//
// Mechanisms counted (each must happen at least once): I2C retry, lock,
// staged release, line doubling (both copies of a line checked), 9th-sample
// drop, blue and green detection, clipping in the colour conversion, table
// writes, new-field flag set and cleared, core pixels, halo pixels.
module tb_lsg_top;
  import lsg_pkg::*;
  import tb_video_pkg::*;

  logic clk27 = 0, clk50 = 0, rst_n = 0;
  always #18.5 clk27 = ~clk27;
  always #10   clk50 = ~clk50;

  // ---------------- board models ----------------
  logic [7:0] td_data;
  logic td_hs, td_vs;
  int   src_line, src_byte;
  bt656_source u_src (.clk(clk27), .en(1'b1), .data(td_data), .td_hs, .td_vs,
                      .line(src_line), .byte_no(src_byte));

  logic scl, sda_oe, sda_pull, sda, got;
  logic [23:0] got_data;
  int n_start, n_stop;
  assign sda = !(sda_oe || sda_pull);
  i2c_slave_model #(.ADDR(8'h40), .NACK_FIRST(1)) u_i2c (
    .scl, .sda, .sda_pull, .got, .got_data, .n_start, .n_stop);

  // ---------------- design ----------------
  logic td_reset_n, vga_clk, hs_n, vs_n, blank_n, sync_n;
  logic [9:0] vr, vg, vb;
  logic [4:0] address = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = 0, readdata;
  logic config_done, locked, video_ready, in_core, in_halo;
  logic [7:0] retries;

  lsg_top dut (
    .clk27, .clk50, .rst_n,
    .i_td_data(td_data), .i_td_hs(td_hs), .i_td_vs(td_vs), .o_td_reset_n(td_reset_n),
    .o_i2c_sclk(scl), .o_i2c_sda_oe(sda_oe), .i_i2c_sda(sda),
    .o_vga_clk(vga_clk), .o_vga_hs_n(hs_n), .o_vga_vs_n(vs_n), .o_vga_blank_n(blank_n),
    .o_vga_sync_n(sync_n), .o_vga_r(vr), .o_vga_g(vg), .o_vga_b(vb),
    .avs_address(address), .avs_chipselect(chipselect), .avs_read(read), .avs_write(write),
    .avs_writedata(writedata), .avs_readdata(readdata),
    .o_config_done(config_done), .o_i2c_retries(retries), .o_locked(locked),
    .o_video_ready(video_ready), .o_in_core(in_core), .o_in_halo(in_halo));

  int checks = 0, failures = 0;
  // mechanism counters
  int m_retry = 0, m_lock = 0, m_release = 0, m_double = 0, m_skip = 0, m_blue = 0,
      m_green = 0, m_clip = 0, m_table = 0, m_flag_set = 0, m_flag_clr = 0,
      m_core = 0, m_halo = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("%t FAIL %s", $time, msg);
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk27);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference image after the input pipeline ----------------
  // Source sample shown at kept column c: every 9th sample is dropped.
  function automatic int src_x(int c);
    return 9 * (c / 8) + c % 8;
  endfunction
  // Y, Cb, Cr seen by the colour stages for sample x of active line l
  // (chroma sample-and-hold: an even sample takes the Cr of the pair before).
  function automatic yuv_t ref_pix(int x, int l);
    yuv_t p;
    p.y  = active_byte(2 * x + 1, l);
    p.cb = active_byte(4 * (x / 2), l);
    p.cr = (x % 2 == 1) ? active_byte(4 * (x / 2) + 2, l)
         : (x == 0) ? 8'd128 : active_byte(4 * (x / 2 - 1) + 2, l);
    return p;
  endfunction
  function automatic bit ref_blue(yuv_t p);
    return p.y > 85 && p.cb > 140 && p.cr < 120;
  endfunction
  function automatic bit ref_green(yuv_t p);
    return p.y > 100 && p.cb < 120 && p.cr < 110;
  endfunction
  // Real-valued BT.601 conversion to 10 bits, before clipping.
  function automatic real ref_chan(yuv_t p, int ch);
    real y, cb, cr;
    y = 1.164 * (real'(p.y) - 16.0); cb = real'(p.cb) - 128.0; cr = real'(p.cr) - 128.0;
    case (ch)
      0: return 4.0 * (y + 1.596 * cr);
      1: return 4.0 * (y - 0.813 * cr - 0.391 * cb);
      default: return 4.0 * (y + 2.018 * cb);
    endcase
  endfunction
  function automatic int clip10(real v);
    if (v < 0.0) return 0;
    if (v > 1023.0) return 1023;
    return int'($floor(v));
  endfunction
  // Is a 5-bit-accurate channel value acceptable for reference value v?
  function automatic bit chan_ok(int got10, real v, int add);
    int lo, hi;
    lo = clip10(v - 8.0) / 32 * 32 + add;
    hi = clip10(v + 8.0) / 32 * 32 + add;
    if (lo > 1023) lo = 1023;
    if (hi > 1023) hi = 1023;
    return got10 >= lo && got10 <= hi && (add != 0 || got10 % 32 == 0);
  endfunction

  // Expected statistics of active line l.
  typedef struct { int bc, bx, gc, gx; } lstat_t;
  function automatic lstat_t ref_stats(int l);
    lstat_t s = '{0, 0, 0, 0};
    for (int c = 0; c < 640; c++) begin
      yuv_t p = ref_pix(src_x(c), l);
      if (ref_blue(p))  begin s.bc++; s.bx = c; end
      if (ref_green(p)) begin s.gc++; s.gx = c; end
    end
    return s;
  endfunction

  // ---------------- start-up checks ----------------
  int t27 = 0, t_lock = -1, t_ready = -1, n_got = 0;
  always @(posedge clk27) t27++;
  always @(got) if (rst_n) n_got++;
  always @(posedge locked) begin t_lock = t27; m_lock++; $display("%t locked", $time); end
  always @(posedge config_done) $display("%t decoder chip set up", $time);
  always @(posedge video_ready) begin
    t_ready = t27;
    $display("%t video ready", $time);
    m_release++;
    checks++;
    if (t_ready - t_lock != 32'h0022_8F5B + 1)
      fail($sformatf("video ready %0d clocks after lock", t_ready - t_lock));
  end

  // ---------------- bus master (the processor) ----------------
  task automatic bus_write(logic [4:0] a, logic [15:0] d);
    @(negedge clk50);
    address = a; writedata = d; chipselect = 1; write = 1;
    @(negedge clk50);
    chipselect = 0; write = 0;
  endtask
  task automatic bus_read(logic [4:0] a, output logic [15:0] d);
    @(negedge clk50);
    address = a; chipselect = 1; read = 1;
    @(negedge clk50);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  saber_span_t table_ref [480];
  bit table_ok = 0;
  bit done = 0;
  lstat_t exp_stats [243];

  initial begin
    logic [15:0] lc, lc2, last_lc, f, bc, bx, gc, gx;
    int b_line, g_line, b_x, g_x, fields, l, x;
    saber_span_t s;
    lstat_t e;
    for (int l = 0; l < 243; l++) exp_stats[l] = ref_stats(l);
    repeat (5) @(posedge clk27);
    rst_n = 1;
    wait (video_ready);
    bus_write(REG_VS_CLEAR, 0);
    last_lc = 16'hFFFF;
    b_line = -1; g_line = -1; fields = 0;
    while (!done) begin
      bus_read(REG_VS_FLAG, f);
      if (f[0]) begin
        m_flag_set++;
        bus_write(REG_VS_CLEAR, 0);
        bus_read(REG_VS_FLAG, f);
        checks++;
        if (f[0]) fail("new-field flag did not clear"); else m_flag_clr++;
        fields++;
        // fields > 1: statistics of a whole field have been seen
        if (fields > 1 && b_line >= 0 && g_line > b_line) begin
          for (int r = 0; r < 480; r++) begin
            s = '0;
            l = r / 2;
            if (l >= b_line && l <= g_line) begin
              x = b_x + (g_x - b_x) * (l - b_line) / (g_line - b_line);
              s.outer_x1 = 16'(x - 10);
              s.outer_x2 = 16'(x + 10);
              s.inner_x1 = 16'(x - 3);
              s.inner_x2 = 16'(x + 3);
            end
            bus_write(REG_OUTER_X1, s.outer_x1);
            bus_write(REG_OUTER_X2, s.outer_x2);
            bus_write(REG_INNER_X1, s.inner_x1);
            bus_write(REG_INNER_X2, s.inner_x2);
            bus_write(REG_ROW_WR, 16'(r));
            table_ref[r] = s;
            m_table++;
          end
          table_ok = 1;
        end
        b_line = -1; g_line = -1;
      end
      bus_read(REG_LINECNT, lc);
      if (lc != last_lc) begin
        bus_read(REG_BLUE_CNT, bc);
        bus_read(REG_BLUE_X, bx);
        bus_read(REG_GREEN_CNT, gc);
        bus_read(REG_GREEN_X, gx);
        bus_read(REG_LINECNT, lc2);
        last_lc = lc;
        if (lc2 == lc && lc < 243) begin
          e = exp_stats[lc];
          checks++;
          if (bc != 16'(e.bc) || bx != 16'(e.bx) || gc != 16'(e.gc) || gx != 16'(e.gx))
            fail($sformatf("line %0d stats blue %0d@%0d green %0d@%0d exp %0d@%0d %0d@%0d",
                           lc, bc, bx, gc, gx, e.bc, e.bx, e.gc, e.gx));
          if (bc != 0) begin
            m_blue++;
            if (b_line < 0) begin b_line = lc; b_x = int'(bx) - int'(bc) / 2; end
          end
          if (gc != 0) begin
            m_green++;
            g_line = lc; g_x = int'(gx) - int'(gc) / 2;
          end
        end
      end
    end
  end

  // ---------------- VGA output checker ----------------
  int hs_t = -1, vs_t = -1, row = 0, col = 0, fields_checked = 0, rows_checked = 0;
  bit hs_prev = 1, vs_prev = 1, act_prev = 0, armed = 0;
  always @(negedge clk27) if (video_ready) begin
    if (!hs_n && hs_prev) begin
      if (hs_t >= 0) begin
        checks++;
        if (t27 - hs_t != 858) fail($sformatf("VGA line of %0d clocks", t27 - hs_t));
      end
      hs_t = t27;
    end
    if (hs_n && !hs_prev) begin
      checks++;
      if (t27 - hs_t != 103) fail($sformatf("VGA hsync of %0d clocks", t27 - hs_t));
    end
    if (!vs_n && vs_prev) begin
      if (vs_t >= 0) begin
        checks++;
        if (t27 - vs_t != 262 * 1716 && t27 - vs_t != 263 * 1716)
          fail($sformatf("VGA field of %0d clocks", t27 - vs_t));
      end
      if (armed) begin
        checks++;
        if (row != 480) fail($sformatf("%0d active rows", row));
        fields_checked++;
        $display("%t field checked", $time);
      end
      vs_t = t27;
      row = 0;
      armed = table_ok;
    end
    if (blank_n) begin
      if (armed && col > 0) check_pixel(row, col);
      col++;
    end
    if (!blank_n && act_prev) begin
      checks++;
      if (col != 640) fail($sformatf("active run of %0d pixels", col));
      if (armed) begin
        rows_checked++;
        if (row % 2 == 1) m_double++;
      end
      col = 0;
      row++;
    end
    hs_prev = hs_n; vs_prev = vs_n; act_prev = blank_n;
    if (fields_checked == 2) done = 1;
  end

  task automatic check_pixel(int r, int c);
    saber_span_t s;
    yuv_t p;
    real rr, rg, rb;
    bit core, halo;
    int x;
    s = table_ref[r];
    x = src_x(c);
    p = ref_pix(x, r / 2);
    rr = ref_chan(p, 0); rg = ref_chan(p, 1); rb = ref_chan(p, 2);
    halo = c > s.outer_x1 && c < s.outer_x2;
    core = halo && c > s.inner_x1 && c < s.inner_x2;
    checks++;
    if (core) begin
      if (vr != 10'h3FF || vg != 10'h3FF || vb != 10'h3FF || !in_core)
        fail($sformatf("row %0d col %0d core got %h %h %h", r, c, vr, vg, vb));
      else m_core++;
    end else if (halo) begin
      if (!chan_ok(vr, rr, 0) || !chan_ok(vg, rg, 512) || !chan_ok(vb, rb, 0) || !in_halo)
        fail($sformatf("row %0d col %0d halo got %0d %0d %0d ref %f %f %f", r, c, vr, vg, vb, rr, rg, rb));
      else m_halo++;
    end else begin
      if (!chan_ok(vr, rr, 0) || !chan_ok(vg, rg, 0) || !chan_ok(vb, rb, 0) || in_core || in_halo)
        fail($sformatf("row %0d col %0d got %0d %0d %0d ref %f %f %f", r, c, vr, vg, vb, rr, rg, rb));
      else if (rr > 1023.0 || rg > 1023.0 || rb > 1023.0 || rr < 0.0 || rg < 0.0 || rb < 0.0)
        m_clip++;
    end
    if (c % 8 == 0) m_skip++;   // the column right after a dropped sample
  endtask

  // ---------------- end ----------------
  initial begin
    wait (done);
    repeat (10) @(posedge clk27);
    checks++;
    if (!config_done || n_got != 40) fail($sformatf("set-up: done %b, %0d writes acknowledged", config_done, n_got));
    m_retry = retries;
    checks++;
    if (n_start != 41 || retries != 1) fail($sformatf("set-up: %0d starts, %0d retries", n_start, retries));
    checks++;
    if (td_reset_n !== 1'b1 || sync_n !== 1'b1 || vga_clk !== clk27) fail("static outputs");
    $display("mechanisms: retry %0d lock %0d release %0d doubled-rows %0d skip %0d blue-lines %0d green-lines %0d",
             m_retry, m_lock, m_release, m_double, m_skip, m_blue, m_green);
    $display("            clip %0d table-writes %0d flag-set %0d flag-clear %0d core %0d halo %0d rows %0d",
             m_clip, m_table, m_flag_set, m_flag_clr, m_core, m_halo, rows_checked);
    begin
      int m[13];
      m = '{m_retry, m_lock, m_release, m_double, m_skip, m_blue, m_green,
                    m_clip, m_table, m_flag_set, m_flag_clr, m_core, m_halo};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
