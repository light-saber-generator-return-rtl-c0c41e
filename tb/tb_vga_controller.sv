// tb_vga_controller: feeds the VGA side with input line and field starts
// (1716 clocks per line, fields of 262 and 263 lines), 640 random pixels per
// input line (the last two arriving after the next horizontal sync, as they
// do behind the colour pipeline), and a saber table written over the
// Avalon-MM slave. An independent timing model predicts every output clock
// two clocks ahead (the block's pipeline depth) and checks: horizontal sync
// 103 clocks wide twice per input line, vertical sync exactly two output lines per field,
// 640 x 480 active area, line doubling from the previous input line with
// 5-bit colour, white core and green-boosted halo where the table says so.
// It also reads the new-field flag and the current-row register over the bus.
module tb_vga_controller;
  import lsg_pkg::*;
  logic clk27 = 0, clk50 = 0, rst_n = 0;
  logic hs_edge = 0, vs_edge = 0, pls = 0, pix_valid = 0, stats_valid = 0;
  rgb10_t pix = '0;
  line_stats_t stats = '0;
  logic vga_clk, hs_n, vs_n, blank_n, sync_n, in_core, in_halo;
  rgb10_t rgb;
  logic [4:0] address = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = 0, readdata;
  int checks = 0, failures = 0;
  always #18.5 clk27 = ~clk27;
  always #10   clk50 = ~clk50;

  vga_controller dut (
    .clk27, .rst27_n(rst_n), .clk50, .rst50_n(rst_n),
    .i_hs_edge(hs_edge), .i_vs_edge(vs_edge), .i_pix_line_start(pls), .i_pix_valid(pix_valid), .i_pix(pix),
    .i_stats(stats), .i_stats_valid(stats_valid),
    .o_vga_clk(vga_clk), .o_vga_hs_n(hs_n), .o_vga_vs_n(vs_n), .o_vga_blank_n(blank_n),
    .o_vga_sync_n(sync_n), .o_vga_rgb(rgb),
    .address, .chipselect, .read, .write, .writedata, .readdata,
    .o_in_core(in_core), .o_in_halo(in_halo));

  initial begin
    repeat (3_000_000) @(posedge clk27);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference data ----------------
  logic [14:0] lines [2][640];       // pixels of the last two input lines, 5:5:5
  saber_span_t table_ref [480];
  logic wbank = 0;                   // bank the source is writing
  logic rbank = 1;                   // bank on display
  bit   table_ready = 0;

  // ---------------- stimulus on the 27 MHz side ----------------
  int src_h = 0, src_line = 0, field_len = 262, nfields = 0;
  always @(negedge clk27) if (rst_n) begin
    hs_edge <= (src_h == 0);
    vs_edge <= (src_h == 0) && (src_line == 0);
    stats_valid <= 1'b0;
    pix_valid <= 1'b0;
    pls <= (src_h == 280);
    // 640 pixels, one every other clock; the last two arrive after the next
    // line start, as they do behind the colour pipeline
    if ((src_h + 1716 - 440) % 1716 < 2 * 640 && src_h[0] == 0) begin
      rgb10_t p;
      p = rgb10_t'({$urandom, $urandom});
      pix <= p;
      pix_valid <= 1'b1;
      lines[wbank][((src_h + 1716 - 440) % 1716) / 2] = {p.r[9:5], p.g[9:5], p.b[9:5]};
    end
    if (src_h == 1700) begin
      stats <= line_stats_t'({$urandom, $urandom});
      stats_valid <= 1'b1;
    end
    src_h++;
    if (src_h == 1716) begin
      src_h = 0;
      src_line++;
      if (src_line == field_len) begin
        src_line = 0;
        field_len = (field_len == 262) ? 263 : 262;
        nfields++;
      end
    end
  end
  // The write bank swaps when the line start reaches the block.
  always @(posedge clk27) begin
    if (pls) wbank <= !wbank;
    if (hs_edge) rbank <= wbank;
  end

  // ---------------- timing model and checks ----------------
  typedef struct {
    bit hs, vs, act;
    int col, row;
    logic [14:0] lb;
  } exp_t;
  exp_t e1, e2;
  int hc = 0, vl = 0, lines_seen = 0;
  int hs_low = 0, vs_low = 0, act_run = 0, act_rows = 0, ncore = 0, nhalo = 0, nplain = 0;
  int hs_pulses_line = 0;
  bit vs_prev = 1, hs_prev = 1, act_prev = 0;

  always @(posedge clk27) if (rst_n) begin
    if (hs_edge || hc == 1715) begin
      hc <= 0;
      lines_seen <= lines_seen + 1;
      if (vs_edge) vl <= 0; else vl <= vl + 1;
    end else begin
      hc <= hc + 1;
      if (vs_edge) vl <= 0;
    end
  end

  function automatic rgb10_t expect_pix(exp_t e);
    rgb10_t p;
    saber_span_t s;
    p = '{r: {e.lb[14:10], 5'd0}, g: {e.lb[9:5], 5'd0}, b: {e.lb[4:0], 5'd0}};
    s = table_ref[e.row];
    if (!e.act) return '0;
    if (e.col > s.outer_x1 && e.col < s.outer_x2) begin
      if (e.col > s.inner_x1 && e.col < s.inner_x2) return '{r: 10'h3FF, g: 10'h3FF, b: 10'h3FF};
      p.g = (p.g + 512 > 1023) ? 10'h3FF : 10'(p.g + 512);
    end
    return p;
  endfunction

  always @(negedge clk27) if (rst_n) begin
    exp_t e0;
    int h, ol;
    h  = (hc >= 858) ? hc - 858 : hc;
    ol = 2 * vl + (hc >= 858 ? 1 : 0);
    e0.hs  = h < 103;
    e0.vs  = ol < 2;
    e0.act = h >= 179 && h < 819 && ol >= 36 && ol < 516;
    e0.col = h - 179;
    e0.row = e0.act ? ol - 36 : 0;
    e0.lb  = e0.act ? lines[rbank][e0.col] : '0;
    if (lines_seen > 3) begin
      rgb10_t ep;
      checks++;
      if (hs_n !== !e2.hs || vs_n !== !e2.vs || blank_n !== e2.act || sync_n !== 1'b1) begin
        failures++;
        if (failures < 10) $display("%t sync mismatch hs_n %b vs_n %b blank_n %b exp %b %b %b",
                                    $time, hs_n, vs_n, blank_n, !e2.hs, !e2.vs, e2.act);
      end
      if (table_ready && nfields >= 1) begin
        ep = expect_pix(e2);
        checks++;
        if (rgb !== ep) begin
          failures++;
          if (failures < 10) $display("%t pixel row %0d col %0d got %h exp %h",
                                      $time, e2.row, e2.col, rgb, ep);
        end
        if (in_core) ncore++; else if (in_halo) nhalo++; else if (e2.act) nplain++;
      end
      // pulse widths
      if (!hs_n) hs_low++;
      if (hs_n && !hs_prev) begin
        checks++;
        if (hs_low != 103) begin failures++; $display("hsync width %0d", hs_low); end
        hs_low = 0;
      end
      if (!vs_n) vs_low++;
      if (vs_n && !vs_prev) begin
        checks++;
        if (vs_low != 2 * 858) begin failures++; $display("vsync width %0d", vs_low); end
        vs_low = 0;
      end
      if (blank_n) act_run++;
      if (!blank_n && act_prev) begin
        checks++;
        if (act_run != 640) begin failures++; $display("active run %0d", act_run); end
        act_run = 0;
        act_rows++;
      end
      if (!hs_n && hs_prev) hs_pulses_line++;
      if (hs_edge) begin
        if (lines_seen > 5) begin
          checks++;
          if (hs_pulses_line != 2) begin failures++; $display("%0d hsync pulses in an input line", hs_pulses_line); end
        end
        hs_pulses_line = 0;
      end
    end
    hs_prev = hs_n; vs_prev = vs_n; act_prev = blank_n;
    e2 = e1; e1 = e0;
  end

  // ---------------- bus master ----------------
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

  initial begin
    logic [15:0] d;
    int rows_at_field;
    repeat (5) @(posedge clk27);
    rst_n = 1;
    for (int r = 0; r < 480; r++) begin
      saber_span_t s;
      int o;
      o = 100 + (r % 64) * 3;
      s.outer_x1 = 16'(o);
      s.outer_x2 = 16'(o + 120);
      s.inner_x1 = 16'(o + 30);
      s.inner_x2 = 16'(o + 90);
      if (r % 5 == 0) s = '0;
      table_ref[r] = s;
      bus_write(REG_OUTER_X1, s.outer_x1);
      bus_write(REG_OUTER_X2, s.outer_x2);
      bus_write(REG_INNER_X1, s.inner_x1);
      bus_write(REG_INNER_X2, s.inner_x2);
      bus_write(REG_ROW_WR, 16'(r));
    end
    table_ready = 1;
    bus_write(REG_VS_CLEAR, 0);
    bus_read(REG_VS_FLAG, d);
    checks++;
    if (d != 0) begin failures++; $display("new-field flag not cleared"); end
    // wait for the next field and check the flag
    rows_at_field = nfields;
    wait (nfields != rows_at_field);
    repeat (20) @(posedge clk27);
    bus_read(REG_VS_FLAG, d);
    checks++;
    if (d != 1) begin failures++; $display("new-field flag not set"); end
    bus_write(REG_VS_CLEAR, 0);
    // current row register during the active area
    wait (vl == 100 && hc == 400);
    repeat (40) @(posedge clk50);
    bus_read(REG_ROW, d);
    checks++;
    if (d != 200 - 36) begin failures++; $display("row register %0d", d); end
    wait (nfields == 3);
    repeat (3000) @(posedge clk27);
    checks++;
    if (act_rows < 2 * 480 || ncore == 0 || nhalo == 0 || nplain == 0) begin
      failures++;
      $display("coverage: rows %0d core %0d halo %0d plain %0d", act_rows, ncore, nhalo, nplain);
    end
    $display("active rows %0d core %0d halo %0d plain %0d pixels", act_rows, ncore, nhalo, nplain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
