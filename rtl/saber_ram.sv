// saber_ram: dual-clock lookup RAM holding the saber span of every output row.
//
// Software computes, once per field, where the saber crosses each output row
// and writes it here through the Avalon bus at 50 MHz; the VGA side reads it
// at 27 MHz while drawing. A true dual-port RAM with one write port per clock
// domain is what isolates the two clocks: each entry is written whole, in one
// clock, and read whole. Each entry holds four 16-bit columns (outer and inner
// start and end, see lsg_pkg::saber_span_t). The dual-ported RAM, its 64-bit
// entries and the 10-bit address follow the design description and the
// original design; the reset-free storage is this design's choice (the table
// is rewritten every field).
//
// Timing: write on wclk when i_we; o_rd_data is registered on rclk, one clock
// after i_rd_addr.
module saber_ram #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic                 wclk,
  input  logic                 i_we,
  input  logic [ADDR_W-1:0]    i_wr_addr,
  input  lsg_pkg::saber_span_t i_wr_data,
  input  logic                 rclk,
  input  logic [ADDR_W-1:0]    i_rd_addr,
  output lsg_pkg::saber_span_t o_rd_data
);
  lsg_pkg::saber_span_t mem [2**ADDR_W];

  always_ff @(posedge wclk) begin
    if (i_we) mem[i_wr_addr] <= i_wr_data;
  end

  always_ff @(posedge rclk) begin
    o_rd_data <= mem[i_rd_addr];
  end
endmodule
