// tb_line_buffer: checks the ping-pong line buffers. Each input line writes
// 640 random pixels (with gaps). The last pixel of every line arrives only
// after the display swap (as the last pixels of a real line do, still in the
// colour pipeline when the horizontal sync rises); then the write side is
// restarted for the next line. The previous line, straggler included, must
// read back twice from the display side while the next line is written into
// the other buffer, and a line must never leak into the buffer on display.
module tb_line_buffer;
  localparam int W = 640;
  logic clk = 0, rst_n = 0, ws = 0, sw = 0, we = 0;
  logic [14:0] wd, rd;
  logic [9:0]  ra = 0;
  logic        bank;
  logic [14:0] prev_line [W], cur_line [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  line_buffer #(.DEPTH(W), .PIX_W(15)) dut (
    .clk, .rst_n, .i_wr_start(ws), .i_swap(sw), .i_wr_en(we), .i_wr_data(wd),
    .i_rd_addr(ra), .o_rd_data(rd), .o_bank(bank));

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wx;
    logic b0;
    logic [14:0] straggler;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 6; line++) begin
      // display swap: the line written so far goes on display
      @(negedge clk) sw = 1;
      @(negedge clk) sw = 0;
      prev_line = cur_line;
      // the last pixel of that line arrives late
      @(negedge clk);
      if (line > 0) begin
        we = 1; wd = straggler;
      end
      @(negedge clk) we = 0;
      repeat (5) @(negedge clk);
      // start of the next line's active video
      ws = 1;
      @(negedge clk) ws = 0;
      b0 = bank;
      wx = 0;
      for (int t = 0; t < 2 * W + 2; t++) begin
        @(negedge clk);
        if (line > 0 && t >= 1) begin   // data for the address set one clock ago
          checks++;
          if (rd !== prev_line[(t - 1) % W]) begin
            failures++;
            if (failures < 10) $display("line %0d col %0d got %h exp %h", line, (t - 1) % W, rd, prev_line[(t - 1) % W]);
          end
        end
        ra = 10'(t % W);
        if (wx < W - 1 && (t % 2 == 0)) begin
          we = 1; wd = 15'($urandom); cur_line[wx] = wd; wx++;
        end else begin
          we = 0;
        end
      end
      we = 0;
      straggler = 15'($urandom);
      cur_line[W - 1] = straggler;
      checks++;
      if (bank !== b0) begin failures++; $display("bank changed inside a line"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
