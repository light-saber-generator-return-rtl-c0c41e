// avalon_communicator: Avalon-MM slave linking the video hardware to software.
//
// The processor runs at 50 MHz, the video hardware at 27 MHz. This slave runs
// on the 50 MHz clock and offers sixteen-bit registers at word indices (the
// index is the `address` input; software uses byte address 2*index):
//   read  4  VGA_HS   output horizontal sync level (1 in sync)
//   read  6  ROW      current output row
//   read  8  BLUE_CNT  blue pixels on the last finished input line
//   read 10  BLUE_X    column of its last blue pixel
//   read 12  GREEN_CNT green pixels on that line
//   read 14  GREEN_X   column of its last green pixel
//   read 16  VGA_VS   output vertical sync level
//   read 26  LINECNT  number of that line in the field
//   read 28  VS_FLAG  1 once a new field has started; stays set until cleared
//   write 20 VS_CLEAR clears VS_FLAG (set by hardware, cleared by software)
//   write 0/2  outer (halo) start/end column, staged
//   write 30/18 inner (core) start/end column, staged
//   write 24 ROW_WR   writes the four staged columns to table row `writedata`
// The register indices, the flag handshake and the contents follow the design
// description. Committing a whole table entry on the ROW_WR write, the 50 MHz
// capture of 27 MHz values through toggle synchronizers and reads returning 0
// from unused indices are this design's choices.
//
// Timing: readdata is registered: valid one clock after read (read latency 1,
// no wait states). Writes take effect at the clock edge where write is high.
// The per-line values are captured whole when their update event arrives, so
// software never sees a mix of two lines. The same synchronizer serves for
// events (its pulse output) and for levels (its level output); the output a
// use does not need is left unconnected.
module avalon_communicator (
  input  logic                 clk,            // 50 MHz
  input  logic                 rst_n,
  // Avalon-MM slave
  input  logic [4:0]           address,
  input  logic                 chipselect,
  input  logic                 read,
  input  logic                 write,
  input  logic [15:0]          writedata,
  output logic [15:0]          readdata,
  // From the 27 MHz domain
  input  lsg_pkg::line_stats_t i_stats,        // held steady between updates
  input  logic                 i_stats_toggle, // flips on each update
  input  logic [9:0]           i_row,          // held steady between updates
  input  logic                 i_row_toggle,   // flips when i_row changes
  input  logic                 i_vs_toggle,    // flips at each field start
  input  logic                 i_vga_hs,       // output sync levels
  input  logic                 i_vga_vs,
  // To the saber table RAM (50 MHz write port)
  output logic                 o_ram_we,
  output logic [9:0]           o_ram_addr,
  output lsg_pkg::saber_span_t o_ram_data
);
  import lsg_pkg::*;

  line_stats_t stats;
  logic [9:0]  row;
  logic        stats_ev, row_ev, vs_ev;
  logic        hs_s, vs_s;
  logic        vs_flag;
  saber_span_t staged;

  toggle_sync u_ts_stats (.clk, .rst_n, .i_toggle(i_stats_toggle), .o_pulse(stats_ev), .o_level());
  toggle_sync u_ts_row   (.clk, .rst_n, .i_toggle(i_row_toggle),   .o_pulse(row_ev),   .o_level());
  toggle_sync u_ts_vs    (.clk, .rst_n, .i_toggle(i_vs_toggle),    .o_pulse(vs_ev),    .o_level());
  toggle_sync u_ts_hs    (.clk, .rst_n, .i_toggle(i_vga_hs),       .o_pulse(), .o_level(hs_s));
  toggle_sync u_ts_vsl   (.clk, .rst_n, .i_toggle(i_vga_vs),       .o_pulse(),          .o_level(vs_s));

  logic wr, rd;
  assign wr = chipselect && write;
  assign rd = chipselect && read;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stats <= '0; row <= '0; vs_flag <= 1'b0; staged <= '0;
      readdata <= '0; o_ram_we <= 1'b0; o_ram_addr <= '0; o_ram_data <= '0;
    end else begin
      if (stats_ev) stats <= i_stats;
      if (row_ev)   row   <= i_row;

      // Flag set by hardware at each field start, cleared by software.
      if (vs_ev)
        vs_flag <= 1'b1;
      else if (wr && address == REG_VS_CLEAR)
        vs_flag <= 1'b0;

      // Table writes.
      o_ram_we <= 1'b0;
      if (wr) begin
        unique case (address)
          REG_OUTER_X1: staged.outer_x1 <= writedata;
          REG_OUTER_X2: staged.outer_x2 <= writedata;
          REG_INNER_X1: staged.inner_x1 <= writedata;
          REG_INNER_X2: staged.inner_x2 <= writedata;
          REG_ROW_WR: begin
            o_ram_we   <= 1'b1;
            o_ram_addr <= writedata[9:0];
            o_ram_data <= staged;
          end
          default: ;
        endcase
      end

      // Register reads.
      if (rd) begin
        case (address)
          REG_VGA_HS:    readdata <= {15'd0, hs_s};
          REG_ROW:       readdata <= {6'd0, row};
          REG_BLUE_CNT:  readdata <= {6'd0, stats.blue_count};
          REG_BLUE_X:    readdata <= {6'd0, stats.blue_x};
          REG_GREEN_CNT: readdata <= {6'd0, stats.green_count};
          REG_GREEN_X:   readdata <= {6'd0, stats.green_x};
          REG_VGA_VS:    readdata <= {15'd0, vs_s};
          REG_LINECNT:   readdata <= {6'd0, stats.line};
          REG_VS_FLAG:   readdata <= {15'd0, vs_flag};
          default:       readdata <= '0;
        endcase
      end
    end
  end

  // Avalon rule: a slave is never asked to read and write in the same cycle.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(rd && wr));
endmodule
