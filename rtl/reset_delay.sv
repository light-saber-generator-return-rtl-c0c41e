// reset_delay: start-up delay timer with three staged reset releases.
//
// Once the video input is locked (i_start high) a counter runs; o_rst_n[k]
// rises when the counter reaches DELAY_k, and the counter stops at the last
// delay. Dropping i_start restarts everything with all outputs low. The video
// pipeline is held in reset on these outputs so it only ever sees a steady
// input. The block appears in the design description by name ("initiation
// delay timer"); the three stages and their default delays (about 42, 63 and
// 84 ms at 27 MHz) follow the original board design.
//
// Timing: o_rst_n[k] is registered and rises DELAY_k + 1 clocks after i_start.
module reset_delay #(
  parameter int unsigned DELAY_0 = 32'h0011_47AD,
  parameter int unsigned DELAY_1 = 32'h0019_EB84,
  parameter int unsigned DELAY_2 = 32'h0022_8F5B
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       i_start,
  output logic [2:0] o_rst_n
);
  localparam int unsigned CW = $clog2(DELAY_2 + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || !i_start) begin
      cnt     <= '0;
      o_rst_n <= '0;
    end else begin
      if (cnt != CW'(DELAY_2)) cnt <= cnt + 1'b1;
      if (cnt >= CW'(DELAY_0)) o_rst_n[0] <= 1'b1;
      if (cnt >= CW'(DELAY_1)) o_rst_n[1] <= 1'b1;
      if (cnt >= CW'(DELAY_2)) o_rst_n[2] <= 1'b1;
    end
  end
endmodule
