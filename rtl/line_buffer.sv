// line_buffer: ping-pong pair of line buffers for line doubling.
//
// The input delivers one field at a time (about 263 lines per 1/60 s), while
// the VGA output must show 525 lines in the same time. Each input line is
// therefore shown twice. Two buffers of DEPTH pixels alternate: while one is
// filled with the incoming line, the other, filled during the previous line,
// is read out twice by the VGA timing.
//
// Two events steer the swap. i_wr_start (start of active video in the pixel
// stream) sends the following pixels to the other buffer, from column 0.
// i_swap (rising edge of the decoder's horizontal sync) makes the buffer that
// was last being filled the display buffer. Splitting the two lets the last
// pixels of a line, still in the colour pipeline when the sync rises, land in
// the buffer of their own line: until the next i_wr_start they go on filling
// the buffer now on display, ahead of the read position.
//
// Two buffers of 640 pixels, with the display side switched at every rising
// edge of the input horizontal sync, follow the design description; the
// pixel width (5 bits per colour, 15 in all) is taken from the original
// design. The separate write-side restart and the single-array layout are
// this design's choices.
//
// Interface: i_wr_en writes i_wr_data at the next column of the fill buffer
// (writes past DEPTH are ignored). i_rd_addr selects a column of the display
// buffer; o_rd_data follows one clock later. o_bank is the buffer being filled.
module line_buffer #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned PIX_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_wr_start,
  input  logic             i_swap,
  input  logic             i_wr_en,
  input  logic [PIX_W-1:0] i_wr_data,
  input  logic [9:0]       i_rd_addr,
  output logic [PIX_W-1:0] o_rd_data,
  output logic             o_bank
);
  localparam int unsigned AW = $clog2(2 * DEPTH);

  logic [PIX_W-1:0] mem [2 * DEPTH];
  logic [9:0]       wr_x;
  logic             rd_bank;
  logic [AW-1:0]    wr_addr, rd_addr;

  assign wr_addr = o_bank  ? AW'(DEPTH) + AW'(wr_x) : AW'(wr_x);
  assign rd_addr = rd_bank ? AW'(DEPTH) + AW'(i_rd_addr) : AW'(i_rd_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_x    <= '0;
      o_bank  <= 1'b0;
      rd_bank <= 1'b1;
    end else begin
      if (i_wr_start) begin
        wr_x   <= '0;
        o_bank <= !o_bank;
      end else if (i_wr_en && wr_x < 10'(DEPTH)) begin
        wr_x <= wr_x + 1'b1;
      end
      if (i_swap) rd_bank <= o_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (!i_wr_start && i_wr_en && wr_x < 10'(DEPTH))
      mem[wr_addr] <= i_wr_data;
  end

  always_ff @(posedge clk) begin
    o_rd_data <= (i_rd_addr < 10'(DEPTH)) ? mem[rd_addr] : '0;
  end
endmodule
