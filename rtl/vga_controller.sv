// vga_controller: VGA timing, line doubling, saber drawing and the bus slave.
//
// The camera delivers interlaced fields: about 263 lines per 1/60 s, each line
// 1716 clocks of 27 MHz. Instead of weaving two fields through a frame buffer,
// each field is shown on its own and every input line is shown twice
// ("field extension"), so the output vertical sync has the input field rate
// and the output horizontal sync twice the input line rate. One output line is
// therefore 858 clocks: 103 sync, 76 back porch, 640 active, 39 front porch.
//
// The horizontal counter restarts at the start of every input horizontal sync
// (i_hs_edge) and the input line counter at the start of every input vertical
// sync (i_vs_edge); the output line is 2 * input line + (second half of the
// input line). From these counts the block makes its own sync pulses of the
// right widths: horizontal sync in both halves of every input line, vertical
// sync for the first two output lines of a field, then 34 lines of back porch
// and 480 active rows. Pixels come from the line_buffer pair; the saber span of
// the current row comes from saber_ram, filled by software through the
// avalon_communicator; saber_overlay paints it. The buffer on display
// switches at every input horizontal sync, the buffer being filled at every
// start of active video of the pixel stream (i_pix_line_start), so pixels
// still in the colour pipeline when the sync rises stay with their line.
//
// What follows the design description: the 27 MHz output clock, field
// extension with two 640-pixel line buffers swapped on the input horizontal
// sync, syncs built from counters restarted by edges of the input syncs, the
// lookup-RAM-based saber, the Avalon slave inside this block. The horizontal
// numbers follow the original design. This design's choices: the vertical
// back porch of 34 output lines, the row numbering of the table (output row
// 0..479), the pipeline and the free-running line counter when no input sync
// arrives.
//
// Timing: the pixel path is 2 clocks from counters to outputs (RAM/buffer read,
// overlay register); the syncs and blanking are delayed to match. o_vga_hs_n,
// o_vga_vs_n and o_vga_blank_n are active low; o_vga_sync_n is tied high
// (no sync on green) and o_vga_clk is the 27 MHz clock. The line buffer's
// fill-bank output is not needed here and stays unconnected.
module vga_controller #(
  parameter int unsigned TABLE_ADDR_W = 10,
  parameter int unsigned HALO_GREEN   = 512
) (
  input  logic                 clk27,
  input  logic                 rst27_n,
  input  logic                 clk50,
  input  logic                 rst50_n,
  // from the input side (27 MHz)
  input  logic                 i_hs_edge,      // start of input horizontal sync
  input  logic                 i_vs_edge,      // start of input vertical sync
  input  logic                 i_pix_line_start, // start of active video in the pixel stream
  input  logic                 i_pix_valid,
  input  lsg_pkg::rgb10_t      i_pix,
  input  lsg_pkg::line_stats_t i_stats,
  input  logic                 i_stats_valid,
  // VGA DAC side
  output logic                 o_vga_clk,
  output logic                 o_vga_hs_n,
  output logic                 o_vga_vs_n,
  output logic                 o_vga_blank_n,
  output logic                 o_vga_sync_n,
  output lsg_pkg::rgb10_t      o_vga_rgb,
  // Avalon-MM slave (50 MHz)
  input  logic [4:0]           address,
  input  logic                 chipselect,
  input  logic                 read,
  input  logic                 write,
  input  logic [15:0]          writedata,
  output logic [15:0]          readdata,
  // observation
  output logic                 o_in_core,
  output logic                 o_in_halo
);
  import lsg_pkg::*;

  localparam int unsigned HLINE   = 2 * VGA_HTOTAL;          // clocks per input line
  localparam int unsigned HA0     = VGA_HSYNC + VGA_HBACK;   // first active clock
  localparam int unsigned VA0     = VGA_VSYNC + VGA_VBACK;   // first active output line

  // ---------------- counters ----------------
  logic [10:0] hcount;
  logic [9:0]  vline;           // input line within the field
  logic        half;
  logic [9:0]  h;
  logic [10:0] oline;           // output line within the field
  logic        hs_act, vs_act, h_act, v_act;
  logic [9:0]  col, row;

  always_ff @(posedge clk27) begin
    if (!rst27_n) begin
      hcount <= '0;
      vline  <= '0;
    end else begin
      if (i_hs_edge || hcount == 11'(HLINE - 1)) hcount <= '0;
      else                                      hcount <= hcount + 1'b1;
      if (i_vs_edge)
        vline <= '0;
      else if ((i_hs_edge || hcount == 11'(HLINE - 1)) && vline != 10'h3FF)
        vline <= vline + 1'b1;
    end
  end

  assign half   = (hcount >= 11'(VGA_HTOTAL));
  assign h      = half ? 10'(hcount - 11'(VGA_HTOTAL)) : hcount[9:0];
  assign oline  = {vline, half};
  assign hs_act = (h < 10'(VGA_HSYNC));
  assign vs_act = (oline < 11'(VGA_VSYNC));
  assign h_act  = (h >= 10'(HA0)) && (h < 10'(HA0 + VGA_HACT));
  assign v_act  = (oline >= 11'(VA0)) && (oline < 11'(VA0 + VGA_VACT));
  assign col    = h - 10'(HA0);
  assign row    = v_act ? 10'(oline - 11'(VA0)) : 10'd0;

  // ---------------- line buffers ----------------
  logic [14:0] lb_q;
  logic        lb_bank;
  line_buffer #(.DEPTH(VGA_HACT), .PIX_W(15)) u_lb (
    .clk(clk27), .rst_n(rst27_n),
    .i_wr_start(i_pix_line_start),
    .i_swap   (i_hs_edge),
    .i_wr_en  (i_pix_valid),
    .i_wr_data({i_pix.r[9:5], i_pix.g[9:5], i_pix.b[9:5]}),
    .i_rd_addr(h_act ? col : 10'd0),
    .o_rd_data(lb_q),
    .o_bank   (lb_bank)
  );

  // ---------------- saber table ----------------
  logic                    ram_we;
  logic [9:0]              ram_waddr;
  saber_span_t             ram_wdata, span;
  saber_ram #(.ADDR_W(TABLE_ADDR_W)) u_ram (
    .wclk(clk50), .i_we(ram_we), .i_wr_addr(TABLE_ADDR_W'(ram_waddr)), .i_wr_data(ram_wdata),
    .rclk(clk27), .i_rd_addr(TABLE_ADDR_W'(row)), .o_rd_data(span)
  );

  // ---------------- pipeline stage 1 (memory read) ----------------
  logic       act1, hs1, vs1;
  logic [9:0] col1;
  always_ff @(posedge clk27) begin
    if (!rst27_n) begin
      act1 <= 1'b0; hs1 <= 1'b0; vs1 <= 1'b0; col1 <= '0;
    end else begin
      act1 <= h_act && v_act;
      hs1  <= hs_act;
      vs1  <= vs_act;
      col1 <= col;
    end
  end

  rgb10_t lb_pix;
  assign lb_pix = '{r: {lb_q[14:10], 5'd0}, g: {lb_q[9:5], 5'd0}, b: {lb_q[4:0], 5'd0}};

  // ---------------- stage 2 (overlay, registered outputs) ----------------
  saber_overlay #(.HALO_GREEN(HALO_GREEN)) u_ovl (
    .clk(clk27), .rst_n(rst27_n),
    .i_active(act1), .i_x(col1), .i_pix(lb_pix), .i_span(span),
    .o_pix(o_vga_rgb), .o_in_core, .o_in_halo
  );

  logic hs2, vs2, act2;
  always_ff @(posedge clk27) begin
    if (!rst27_n) begin
      hs2 <= 1'b0; vs2 <= 1'b0; act2 <= 1'b0;
    end else begin
      hs2 <= hs1; vs2 <= vs1; act2 <= act1;
    end
  end

  assign o_vga_clk     = clk27;
  assign o_vga_hs_n    = !hs2;
  assign o_vga_vs_n    = !vs2;
  assign o_vga_blank_n = act2;
  assign o_vga_sync_n  = 1'b1;

  // ---------------- events towards the 50 MHz slave ----------------
  logic       stats_tgl, row_tgl, vs_tgl;
  logic [9:0] row_held;
  line_stats_t stats_held;
  always_ff @(posedge clk27) begin
    if (!rst27_n) begin
      stats_tgl <= 1'b0; row_tgl <= 1'b0; vs_tgl <= 1'b0;
      row_held <= '0; stats_held <= '0;
    end else begin
      if (i_stats_valid) begin
        stats_held <= i_stats;
        stats_tgl  <= !stats_tgl;
      end
      if (h == 10'd0 && row_held != row) begin
        row_held <= row;
        row_tgl  <= !row_tgl;
      end
      if (i_vs_edge) vs_tgl <= !vs_tgl;
    end
  end

  avalon_communicator u_avl (
    .clk(clk50), .rst_n(rst50_n),
    .address, .chipselect, .read, .write, .writedata, .readdata,
    .i_stats(stats_held), .i_stats_toggle(stats_tgl),
    .i_row(row_held), .i_row_toggle(row_tgl),
    .i_vs_toggle(vs_tgl),
    .i_vga_hs(hs2), .i_vga_vs(vs2),
    .o_ram_we(ram_we), .o_ram_addr(ram_waddr), .o_ram_data(ram_wdata)
  );
endmodule
