// tb_xy_detect: random lines of pixels, some deliberately inside the blue or
// green ranges; the per-line counts, last columns and line numbers are
// computed here and compared with what the block publishes at each line end.
// Also checks that a field start restarts the line numbering.
module tb_xy_detect;
  import lsg_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, le = 0, fs = 0, sv, isb, isg;
  ycbcr_t ip = '0;
  line_stats_t st;
  int checks = 0, failures = 0, nblue = 0, ngreen = 0;
  always #5 clk = ~clk;

  xy_detect dut (.clk, .rst_n, .i_valid(iv), .i_pix(ip), .i_line_end(le), .i_field_start(fs),
                 .o_stats_valid(sv), .o_stats(st), .o_is_blue(isb), .o_is_green(isg));

  function automatic bit blue(ycbcr_t p);  return p.y > 85  && p.cb > 140 && p.cr < 120; endfunction
  function automatic bit green(ycbcr_t p); return p.y > 100 && p.cb < 120 && p.cr < 110; endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bc, bx, gc, gx, lineno, npix;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    lineno = 0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) fs = 1;
      @(negedge clk) fs = 0;
      lineno = 0;
      for (int l = 0; l < 12; l++) begin
        bc = 0; bx = 0; gc = 0; gx = 0;
        npix = (l == 5) ? 0 : 640;
        for (int x = 0; x < npix; x++) begin
          @(negedge clk);
          iv = 1;
          case ($urandom_range(0, 5))
            0: ip = '{8'($urandom_range(86, 255)), 8'($urandom_range(141, 255)), 8'($urandom_range(0, 119))};
            1: ip = '{8'($urandom_range(101, 255)), 8'($urandom_range(0, 119)), 8'($urandom_range(0, 109))};
            default: ip = ycbcr_t'($urandom);
          endcase
          if (l == 7) ip = '{8'd200, 8'd128, 8'd128};   // a line with no marker
          if (blue(ip))  begin bc++; bx = x; end
          if (green(ip)) begin gc++; gx = x; end
          #1;
          checks++;
          if (isb !== blue(ip) || isg !== green(ip)) failures++;
          if (x % 7 == 0) begin @(negedge clk) iv = 0; end
        end
        @(negedge clk) iv = 0;
        repeat (5) @(negedge clk);
        le = 1;
        @(negedge clk) le = 0;
        #1;
        checks++;
        if (npix == 0) begin
          if (sv) begin failures++; $display("stats for an empty line"); end
        end else begin
          if (!sv || st.blue_count != bc || st.blue_x != bx || st.green_count != gc ||
              st.green_x != gx || st.line != lineno) begin
            failures++;
            $display("f%0d l%0d got v=%0b %0d/%0d %0d/%0d line %0d exp %0d/%0d %0d/%0d line %0d", f, l,
                     sv, st.blue_count, st.blue_x, st.green_count, st.green_x, st.line, bc, bx, gc, gx, lineno);
          end
          lineno++;
          nblue += bc; ngreen += gc;
        end
      end
    end
    checks++;
    if (nblue < 100 || ngreen < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
