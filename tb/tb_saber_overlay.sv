// tb_saber_overlay: random pixels, columns and spans; the expected output
// (black outside the picture, white core, green-boosted halo, unchanged
// pixel elsewhere) is computed here and compared one clock later.
module tb_saber_overlay;
  import lsg_pkg::*;
  logic clk = 0, rst_n = 0, act = 0, core, halo;
  logic [9:0] x = 0;
  rgb10_t pix = '0, o, exp_q;
  saber_span_t span = '0;
  int checks = 0, failures = 0, ncore = 0, nhalo = 0, nplain = 0;
  always #5 clk = ~clk;

  saber_overlay #(.HALO_GREEN(512)) dut (.clk, .rst_n, .i_active(act), .i_x(x), .i_pix(pix),
                                         .i_span(span), .o_pix(o), .o_in_core(core), .o_in_halo(halo));

  function automatic rgb10_t expected(bit a, int xx, rgb10_t p, saber_span_t s);
    rgb10_t e;
    int g;
    if (!a) return '0;
    if (xx > s.outer_x1 && xx < s.outer_x2 && xx > s.inner_x1 && xx < s.inner_x2)
      return '{10'd1023, 10'd1023, 10'd1023};
    if (xx > s.outer_x1 && xx < s.outer_x2) begin
      g = p.g + 512;
      e = p;
      e.g = (g > 1023) ? 10'd1023 : 10'(g);
      return e;
    end
    return p;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (o !== exp_q) begin
          failures++;
          if (failures < 10) $display("i=%0d got %h exp %h", i, o, exp_q);
        end
      end
      if (i % 64 == 0) begin
        c = $urandom_range(60, 580);
        span.outer_x1 = 16'(c - 40); span.outer_x2 = 16'(c + 40);
        span.inner_x1 = 16'(c - 10); span.inner_x2 = 16'(c + 10);
        if (i % 256 == 0) span = '0;
      end
      act = ($urandom_range(0, 9) != 0);
      x   = 10'($urandom_range(0, 639));
      if (i % 3 == 0 && span.outer_x2 != 0) x = 10'($urandom_range(span.outer_x1, span.outer_x2));
      pix = {30'($urandom)};
      exp_q = expected(act, x, pix, span);
      if (act && exp_q == '{10'd1023, 10'd1023, 10'd1023}) ncore++;
      else if (act && exp_q != pix) nhalo++;
      else if (act) nplain++;
    end
    checks++;
    if (ncore < 20 || nhalo < 20 || nplain < 20) begin failures++; $display("coverage %0d %0d %0d", ncore, nhalo, nplain); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
