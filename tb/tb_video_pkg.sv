// tb_video_pkg: test image and BT.656 constants shared by the testbenches.
//
// The image is a smooth pattern with two optional marker boxes: a blue one and
// a green one, given in source coordinates (sample 0..719, active line
// 0..242 of a field). Values stay inside 1..254 so they never look like the
// FF/00 bytes of a timing code.
package tb_video_pkg;
  typedef struct packed {
    logic [7:0] y, cb, cr;
  } yuv_t;

  // marker boxes: [x0, x1) samples, [l0, l1) active lines of a field
  int unsigned BLUE_X0  = 200, BLUE_X1  = 236, BLUE_L0  = 40,  BLUE_L1  = 60;
  int unsigned GREEN_X0 = 400, GREEN_X1 = 436, GREEN_L0 = 150, GREEN_L1 = 170;
  bit          MARKERS  = 1'b1;

  function automatic logic [7:0] pat_y(int x, int l);
    return 8'(16 + ((x + 3 * l) % 200));
  endfunction
  function automatic logic [7:0] pat_cb(int pair, int l);
    return 8'(40 + ((pair * 3 + l) % 80));    // 40..119: never "blue"
  endfunction
  function automatic logic [7:0] pat_cr(int pair, int l);
    return 8'(130 + ((pair * 5 + 2 * l) % 100)); // 130..229: never "green"/"blue"
  endfunction

  function automatic bit in_blue(int x, int l);
    return MARKERS && x >= BLUE_X0 && x < BLUE_X1 && l >= BLUE_L0 && l < BLUE_L1;
  endfunction
  function automatic bit in_green(int x, int l);
    return MARKERS && x >= GREEN_X0 && x < GREEN_X1 && l >= GREEN_L0 && l < GREEN_L1;
  endfunction

  // Byte values of one sample pair: Cb Y0 Cr Y1 for samples 2*pair, 2*pair+1.
  function automatic logic [7:0] active_byte(int k, int l);
    int pair, x;
    pair = k / 4;
    x = 2 * pair;
    case (k % 4)
      0: return in_blue(x, l) ? 8'd200 : in_green(x, l) ? 8'd60 : pat_cb(pair, l);
      1: return (in_blue(x, l) || in_green(x, l)) ? 8'd170 : pat_y(x, l);
      2: return in_blue(x, l) ? 8'd100 : in_green(x, l) ? 8'd60 : pat_cr(pair, l);
      default: return (in_blue(x + 1, l) || in_green(x + 1, l)) ? 8'd170 : pat_y(x + 1, l);
    endcase
  endfunction

  // Status word {1, F, V, H, P3..P0}.
  function automatic logic [7:0] xy(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  // NTSC 525-line frame (lines 1..525): field and vertical blanking.
  function automatic bit line_f(int line);
    return !(line >= 4 && line <= 265);
  endfunction
  function automatic bit line_v(int line);
    return (line <= 20) || (line >= 264 && line <= 282);
  endfunction
  // active line index inside its field, -1 in blanking
  function automatic int active_index(int line);
    if (line >= 21 && line <= 263) return line - 21;
    if (line >= 283 && line <= 525) return line - 283;
    return -1;
  endfunction
endpackage
