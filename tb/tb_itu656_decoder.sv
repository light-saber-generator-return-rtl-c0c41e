// tb_itu656_decoder: runs the decoder on a BT.656 stream that starts in the
// middle of field 2, so nothing may come out until field 1 starts. Then, for
// every active line, checks that 720 samples and 640 kept samples come out,
// that each sample's luma and paired chroma byte match the image, that the
// dropped samples are every ninth, and that vertical-blanking lines give
// nothing.
module tb_itu656_decoder;
  import tb_video_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] data;
  logic hs, vs;
  int line, byte_no;
  logic smp, dv, iscb, sav, fld, vbl;
  logic [7:0] y, c;
  logic [9:0] x;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt656_source #(.START_LINE(283)) src (.clk, .en(rst_n), .data, .td_hs(hs), .td_vs(vs), .line, .byte_no);

  itu656_decoder dut (.clk, .rst_n, .i_data(data), .o_sample(smp), .o_dval(dv), .o_y(y), .o_c(c),
                      .o_c_is_cb(iscb), .o_x(x), .o_sav(sav), .o_field(fld), .o_vblank(vbl));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-line counters, evaluated at the start of each line
  int nsmp = 0, ndv = 0, prev_line = 283, lines_checked = 0, frames_seen = 0;
  bit started = 0;
  int out_line;   // source line whose samples are now on the outputs

  always @(negedge clk) if (rst_n) begin
    // outputs are one clock behind the byte; line changes are far from active video
    out_line = prev_line;   // the sample on the outputs is from the previous byte
    if (smp) begin
      int a;
      a = active_index(out_line);
      nsmp++;
      if (dv) ndv++;
      checks++;
      // sample x: luma is byte 2x+1 of the active line, its chroma byte 2x
      if (a < 0 || y !== active_byte(2 * x + 1, a) || c !== active_byte(2 * x, a)
          || iscb !== (x % 2 == 0) || dv !== ((x % 9) != 8)) begin
        failures++;
        if (failures < 10) $display("line %0d x=%0d y=%h c=%h cb=%0b dv=%0b", out_line, x, y, c, iscb, dv);
      end
    end
    if (line != prev_line) begin
      // finished prev_line
      if (prev_line == 4) started = 1;
      if (started && active_index(prev_line) >= 0) begin
        checks++;
        lines_checked++;
        if (nsmp != 720 || ndv != 640) begin
          failures++;
          $display("line %0d: %0d samples %0d kept", prev_line, nsmp, ndv);
        end
      end else begin
        checks++;
        if (nsmp != 0) begin failures++; $display("line %0d (blank or before start): %0d samples", prev_line, nsmp); end
      end
      nsmp = 0; ndv = 0;
      prev_line = line;
      if (line == 300 && started) begin
        checks++;
        if (lines_checked != 243 + 17) begin failures++; $display("lines checked %0d", lines_checked); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end
endmodule
