// tb_yuv422_to_444: feeds a stream of luma samples with alternating Cb/Cr and
// some samples marked as dropped; checks that every kept pixel carries the
// latest Cb and Cr seen (including chroma of dropped samples) and that no
// pixel is emitted for dropped samples.
module tb_yuv422_to_444;
  import lsg_pkg::*;
  logic clk = 0, rst_n = 0, smp = 0, dv = 0, iscb = 0, ov;
  logic [7:0] y = 0, c = 0;
  ycbcr_t op;
  int checks = 0, failures = 0, nout = 0, nexp = 0;
  always #5 clk = ~clk;

  yuv422_to_444 dut (.clk, .rst_n, .i_sample(smp), .i_dval(dv), .i_y(y), .i_c(c), .i_c_is_cb(iscb),
                     .o_valid(ov), .o_pix(op));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cb_m, cr_m;
    ycbcr_t e;
    bit ev;
    cb_m = 128; cr_m = 128; ev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (ov !== ev || (ev && op !== e)) begin
        failures++;
        if (failures < 10) $display("i=%0d valid %0b/%0b pix %h exp %h", i, ov, ev, op, e);
      end
      if (ov) nout++;
      smp = (i % 2 == 0);
      if (smp) begin
        iscb = ((i / 2) % 2 == 0);
        y = 8'($urandom); c = 8'($urandom);
        dv = ((i / 2) % 9 != 8);
        if (iscb) cb_m = c; else cr_m = c;
        e = '{y, cb_m, cr_m};
        ev = dv;
        if (dv) nexp++;
      end else begin
        dv = $urandom_range(0, 1);   // ignored without a sample
        ev = 0;
      end
    end
    checks++;
    if (nout != nexp || nout < 100) begin failures++; $display("pixels %0d exp %0d", nout, nexp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
