// tb_avalon_communicator: drives the 50 MHz Avalon-MM slave from a small bus
// master and the 27 MHz side from per-line statistics, row numbers and field
// events. Checks every readable register against the values driven, the
// set-by-hardware/clear-by-software new-field flag, the one-clock read
// latency, and that a row write commits exactly the staged span to the
// table RAM port.
module tb_avalon_communicator;
  import lsg_pkg::*;
  logic clk50 = 0, clk27 = 0, rst_n = 0;
  logic [4:0] address = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = 0, readdata;
  line_stats_t stats = '0;
  logic stats_t = 0, row_t = 0, vs_t = 0, hs = 0, vs = 0;
  logic [9:0] row = 0;
  logic we;
  logic [9:0] waddr;
  saber_span_t wdata;
  int checks = 0, failures = 0, nwe = 0;
  always #10 clk50 = ~clk50;
  always #18.5 clk27 = ~clk27;

  avalon_communicator dut (
    .clk(clk50), .rst_n, .address, .chipselect, .read, .write, .writedata, .readdata,
    .i_stats(stats), .i_stats_toggle(stats_t), .i_row(row), .i_row_toggle(row_t),
    .i_vs_toggle(vs_t), .i_vga_hs(hs), .i_vga_vs(vs),
    .o_ram_we(we), .o_ram_addr(waddr), .o_ram_data(wdata));

  always @(posedge clk50) if (we) nwe++;

  initial begin
    repeat (250_000) @(posedge clk50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic expect_reg(logic [4:0] a, logic [15:0] e, string what);
    logic [15:0] d;
    bus_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("%s (index %0d): got %h exp %h", what, a, d, e); end
  endtask

  initial begin
    saber_span_t s;
    repeat (3) @(posedge clk50);
    rst_n = 1;
    repeat (3) @(posedge clk50);
    for (int i = 0; i < 20; i++) begin
      // 27 MHz side publishes a new line
      @(negedge clk27);
      stats = line_stats_t'({$urandom, $urandom});
      stats_t = !stats_t;
      row = 10'($urandom); row_t = !row_t;
      hs = 1'($urandom); vs = 1'($urandom);
      repeat (4) @(negedge clk27);
      expect_reg(REG_BLUE_CNT,  {6'd0, stats.blue_count},  "blue count");
      expect_reg(REG_BLUE_X,    {6'd0, stats.blue_x},      "blue x");
      expect_reg(REG_GREEN_CNT, {6'd0, stats.green_count}, "green count");
      expect_reg(REG_GREEN_X,   {6'd0, stats.green_x},     "green x");
      expect_reg(REG_LINECNT,   {6'd0, stats.line},        "line count");
      expect_reg(REG_ROW,       {6'd0, row},               "row");
      expect_reg(REG_VGA_HS,    {15'd0, hs},               "vga hs");
      expect_reg(REG_VGA_VS,    {15'd0, vs},               "vga vs");
      expect_reg(5'd22,         16'd0,                     "unused index");
      // new-field flag
      expect_reg(REG_VS_FLAG, 16'd0, "flag before field");
      @(negedge clk27) vs_t = !vs_t;
      repeat (3) @(negedge clk27);
      expect_reg(REG_VS_FLAG, 16'd1, "flag after field start");
      expect_reg(REG_VS_FLAG, 16'd1, "flag stays set");
      bus_write(REG_VS_CLEAR, 16'd0);
      expect_reg(REG_VS_FLAG, 16'd0, "flag after clear");
      // table write
      s = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      bus_write(REG_OUTER_X1, s.outer_x1);
      bus_write(REG_OUTER_X2, s.outer_x2);
      bus_write(REG_INNER_X1, s.inner_x1);
      bus_write(REG_INNER_X2, s.inner_x2);
      checks++;
      if (nwe != i) begin failures++; $display("RAM written before the row write"); end
      bus_write(REG_ROW_WR, 16'(i * 7));
      @(posedge clk50); #1;
      checks++;
      if (nwe != i + 1 || waddr != 10'(i * 7) || wdata !== s) begin
        failures++;
        $display("table write %0d: we count %0d addr %0d data %h exp %h", i, nwe, waddr, wdata, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
