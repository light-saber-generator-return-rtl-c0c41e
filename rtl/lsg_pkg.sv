// lsg_pkg: types and constants shared by the light saber generator.
//
// The generator takes an NTSC camera stream in ITU-R BT.656 form (8-bit
// multiplexed Cb Y Cr Y at 27 MHz), finds the green and blue markers at the two
// ends of a sword, and redraws every field on a VGA monitor with a light saber
// painted over it. The saber spans for every output row are computed by a
// processor and written over an Avalon-MM slave into a lookup RAM.
//
// Numbers from the design description: 720 active samples per line (1440 bytes
// between SAV and EAV), 1716 bytes per line, 640 output pixels, 480 output
// rows, the marker colour ranges, the YCbCr->RGB coefficients, the
// Avalon register indices. Everything else here is this design's own choice
// and is marked as such where it is declared.
package lsg_pkg;

  // ---- BT.656 line structure ---------------------------------------------
  localparam int unsigned BT656_ACTIVE_BYTES = 1440;  // Cb Y Cr Y ... between SAV and EAV
  localparam int unsigned BT656_LINE_BYTES   = 1716;  // 858 samples x 2 bytes
  localparam int unsigned SRC_PIXELS         = 720;   // active luma samples per line
  localparam int unsigned DST_PIXELS         = 640;   // pixels kept per line
  localparam int unsigned SKIP_PERIOD        = 9;     // every 9th luma sample is dropped

  // ---- VGA output timing (27 MHz pixel clock, two output lines per input line)
  // One output line is half an input line: 858 clocks.
  localparam int unsigned VGA_HTOTAL = 858;
  localparam int unsigned VGA_HSYNC  = 103;
  localparam int unsigned VGA_HBACK  = 76;
  localparam int unsigned VGA_HACT   = 640;
  localparam int unsigned VGA_HFRONT = 39;
  // Vertical timing in output lines (two per input line). Own choice apart
  // from the 2-line sync and the 480 active rows.
  localparam int unsigned VGA_VSYNC  = 2;
  localparam int unsigned VGA_VBACK  = 34;
  localparam int unsigned VGA_VACT   = 480;

  // ---- Pixel formats -------------------------------------------------------
  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb10_t;

  // One entry of the saber lookup table: outer (halo) and inner (white core)
  // column limits for one output row. A pixel is painted when it lies strictly
  // between the two limits of a pair.
  typedef struct packed {
    logic [15:0] inner_x2;
    logic [15:0] inner_x1;
    logic [15:0] outer_x2;
    logic [15:0] outer_x1;
  } saber_span_t;

  // Per-line marker statistics reported to software.
  typedef struct packed {
    logic [9:0] blue_count;
    logic [9:0] blue_x;      // column of the last blue pixel of the line
    logic [9:0] green_count;
    logic [9:0] green_x;     // column of the last green pixel of the line
    logic [9:0] line;        // input line number inside the field
  } line_stats_t;

  // ---- Avalon-MM register indices (16-bit registers, word index on `address`)
  typedef enum logic [4:0] {
    REG_OUTER_X1 = 5'd0,   // W: halo start column (staged)
    REG_OUTER_X2 = 5'd2,   // W: halo end column (staged)
    REG_VGA_HS   = 5'd4,   // R: output horizontal sync, 1 = in sync
    REG_ROW      = 5'd6,   // R: current output row
    REG_BLUE_CNT = 5'd8,   // R: blue pixels on the last finished line
    REG_BLUE_X   = 5'd10,  // R: column of the last blue pixel
    REG_GREEN_CNT= 5'd12,  // R: green pixels on the last finished line
    REG_GREEN_X  = 5'd14,  // R: column of the last green pixel
    REG_VGA_VS   = 5'd16,  // R: output vertical sync, 1 = in sync
    REG_INNER_X2 = 5'd18,  // W: core end column (staged)
    REG_VS_CLEAR = 5'd20,  // W: clear the new-field flag
    REG_ROW_WR   = 5'd24,  // W: commit staged span to this row of the table
    REG_LINECNT  = 5'd26,  // R: number of the last finished input line
    REG_VS_FLAG  = 5'd28,  // R: new-field flag, set by hardware
    REG_INNER_X1 = 5'd30   // W: core start column (staged)
  } lsg_reg_e;

endpackage
