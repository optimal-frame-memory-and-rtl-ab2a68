// shape_tb_pkg: reference models shared by the testbenches.
//
// A synthetic binary alpha plane (an ellipse, optionally with a rectangular
// hole and a notch so that every kind of BAB appears), BAB extraction from it
// in the packing of the design (row r of a BAB in word r, leftmost pixel in
// bit 15, opaque = 1), the class of a BAB and the number of run-length
// tuples it needs. All of it is computed from first principles, without
// using any design module.
package shape_tb_pkg;
  import shape_pkg::*;

  // Pixel (x, y) of a W x H pixel plane: an ellipse centred in the plane with
  // semi-axes a = 3W/8 and b = 3H/8, minus a rectangular hole in its middle.
  function automatic bit alpha_px(input int x, input int y, input int w, input int h);
    longint dx, dy, a, b, lx, ly, lw, lh;
    lx = x; ly = y; lw = w; lh = h;
    a  = (3 * lw) / 8;
    b  = (3 * lh) / 8;
    dx = lx - lw / 2;
    dy = ly - lh / 2;
    if (x < 0 || y < 0 || x >= w || y >= h) return 1'b0;
    if (dx * dx * b * b + dy * dy * a * a > a * a * b * b) return 1'b0;
    // hole: a w/8 x h/8 rectangle at the centre, offset by 5 pixels
    if (x >= w / 2 + 5 && x < w / 2 + 5 + w / 8 && y >= h / 2 + 5 && y < h / 2 + 5 + h / 8)
      return 1'b0;
    return 1'b1;
  endfunction

  function automatic bab_t make_bab(input int bx, input int by, input int w, input int h);
    bab_t r;
    for (int row = 0; row < 16; row++)
      for (int c = 0; c < 16; c++)
        r[row][15-c] = alpha_px(bx * 16 + c, by * 16 + row, w, h);
    return r;
  endfunction

  function automatic bab_class_e class_of(input bab_t b);
    bit all0, all1;
    all0 = 1; all1 = 1;
    for (int r = 0; r < 16; r++) begin
      if (b[r] != 16'h0000) all0 = 0;
      if (b[r] != 16'hFFFF) all1 = 0;
    end
    if (all0) return BAB_TRANSPARENT;
    if (all1) return BAB_OPAQUE;
    return BAB_BOUNDARY;
  endfunction

  // number of maximal runs of identical consecutive rows
  function automatic int tuples_of(input bab_t b);
    int n;
    n = 1;
    for (int r = 1; r < 16; r++) if (b[r] != b[r-1]) n++;
    return n;
  endfunction

  // A random BAB made of a few runs of random rows.
  function automatic bab_t random_bab();
    bab_t r;
    logic [15:0] v;
    int kind;
    kind = $urandom_range(0, 5);
    if (kind == 0) return '0;
    if (kind == 1) return '1;
    v = 16'($urandom);
    for (int i = 0; i < 16; i++) begin
      if ($urandom_range(0, 3) == 0) v = 16'($urandom);
      r[i] = v;
    end
    return r;
  endfunction
endpackage
