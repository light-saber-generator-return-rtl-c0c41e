// tb_ycbcr2rgb: compares the converter against the BT.601 equations
// evaluated here in real arithmetic, (Y-16)*1.164 etc., scaled to 10 bits and
// clipped. The integer hardware must match within 3 LSB (the coefficient and
// truncation error of the /512 form); a few fixed points (black, white,
// saturated colours that must clip) are checked exactly. Also checks the
// two-clock latency of o_valid.
module tb_ycbcr2rgb;
  import lsg_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  ycbcr_t ip = '0;
  rgb10_t o;
  int checks = 0, failures = 0, nclip_hi = 0, nclip_lo = 0;
  always #5 clk = ~clk;

  ycbcr2rgb dut (.clk, .rst_n, .i_valid(iv), .i_pix(ip), .o_valid(ov), .o_rgb(o));

  function automatic int clipr(real v);
    int i;
    i = $rtoi(v * 4.0);
    if (v < 0) i = 0;
    return (i > 1023) ? 1023 : i;
  endfunction

  ycbcr_t hist [$];
  bit     vhist [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ycbcr_t p;
    int er, eg, eb;
    real y, cb, cr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // output now belongs to the input given two clocks ago
      if (hist.size() == 2) begin
        p = hist.pop_front();
        checks++;
        if (ov !== vhist.pop_front()) begin failures++; $display("valid latency wrong at %0d", i); end
        y = p.y; cb = p.cb; cr = p.cr;
        er = clipr(1.164 * (y - 16) + 1.596 * (cr - 128));
        eg = clipr(1.164 * (y - 16) - 0.813 * (cr - 128) - 0.391 * (cb - 128));
        eb = clipr(1.164 * (y - 16) + 2.018 * (cb - 128));
        checks++;
        if ((int'(o.r) - er) > 3 || (er - int'(o.r)) > 3 ||
            (int'(o.g) - eg) > 3 || (eg - int'(o.g)) > 3 ||
            (int'(o.b) - eb) > 3 || (eb - int'(o.b)) > 3) begin
          failures++;
          if (failures < 10) $display("Y=%0d Cb=%0d Cr=%0d got %0d %0d %0d exp %0d %0d %0d",
                                      p.y, p.cb, p.cr, o.r, o.g, o.b, er, eg, eb);
        end
        if (o.r == 1023 || o.b == 1023) nclip_hi++;
        if (o.r == 0 || o.g == 0 || o.b == 0) nclip_lo++;
      end
      case (i)
        0: ip = '{8'd16, 8'd128, 8'd128};    // black
        1: ip = '{8'd235, 8'd128, 8'd128};   // white
        2: ip = '{8'd255, 8'd255, 8'd255};   // saturates R and B
        3: ip = '{8'd0, 8'd0, 8'd0};         // saturates low
        default: ip = ycbcr_t'($urandom);
      endcase
      iv = (i % 5 != 4);
      hist.push_back(ip);
      vhist.push_back(iv);
    end
    checks++;
    if (nclip_hi < 5 || nclip_lo < 5) begin failures++; $display("clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
