// dfbc_ref_pkg: reference models used by the testbenches.
//
// gen_wedge draws a random straight line between two points on different
// edges of an N x N block and marks the pixels on one side with 1; both
// regions are non-empty, so every row and column changes at most once.
// encode produces the D-FB&C+ code of a pattern independently of the RTL:
// top-left bit, first-column change position, one change position per row,
// and the rows that follow the first row of a trailing run of identical
// all-equal rows dropped.  A change position c means the value flips after
// index c; N-1 means no flip.  Patterns are arrays of 16-bit rows, bit c being
// column c.
//
// wedge_list generates the DMM-1 wedgelet list of one block size the way the
// 3D-HEVC test model does.  For each of six edge pairs (top-left corner
// sweep, right, bottom, left, top-to-bottom, left-to-right) every start and
// end position on a grid of B x B positions is tried: B = N/2, N or 2N for
// double-, full- and half-pel resolution.  A Bresenham line is drawn on an
// R x R canvas (R = 2N at half pel, N otherwise), the region on one side is
// flood-filled along rows or columns, the canvas is subsampled to N x N (half
// pel, with an offset that depends on the edge pair), and the pattern is kept
// unless it is plain or equal to, or the inverse of, one already in the list.
// For 4x4 at half-pel resolution this gives the 86 wedgelets of the 4x4 list.
package dfbc_ref_pkg;

  typedef logic [15:0] pat_t [16];

  function automatic int line_code(input logic v [16], input int n);
    for (int i = 1; i < n; i++)
      if (v[i] != v[0]) return i - 1;
    return n - 1;
  endfunction

  function automatic bit row_uniform(input logic [15:0] r, input int n);
    logic [15:0] m = 16'((32'd1 << n) - 1);
    return ((r & m) == 16'd0) || ((r & m) == m);
  endfunction

  // Random point on edge e (0 top, 1 right, 2 bottom, 3 left), in half-pixel
  // units, so the block spans 0..2n.
  function automatic void edge_point(input int e, input int n,
                                     output int x, output int y);
    int t = int'($urandom_range(0, 2 * n));
    case (e)
      0: begin x = t;     y = 0;     end
      1: begin x = 2 * n; y = t;     end
      2: begin x = t;     y = 2 * n; end
      default: begin x = 0; y = t;   end
    endcase
  endfunction

  function automatic void gen_wedge(input int n, output pat_t p);
    int x1, y1, x2, y2, e1, e2, ones;
    do begin
      e1 = int'($urandom_range(0, 3));
      do e2 = int'($urandom_range(0, 3)); while (e2 == e1);
      edge_point(e1, n, x1, y1);
      edge_point(e2, n, x2, y2);
      ones = 0;
      for (int r = 0; r < 16; r++) begin
        p[r] = '0;
        for (int c = 0; c < n; c++)
          if (r < n) begin
            // side of pixel centre (2c+1, 2r+1) relative to the line
            p[r][c] = ((x2 - x1) * (2 * r + 1 - y1) -
                       (y2 - y1) * (2 * c + 1 - x1)) > 0;
            ones += int'(p[r][c]);
          end
      end
    end while (ones == 0 || ones == n * n);
  endfunction

  // Number of rows stored after ending rows removal.
  function automatic int stored_rows(input pat_t p, input int n);
    int l;
    if (!row_uniform(p[n-1], n)) return n;
    l = n - 1;
    while (l > 0 && p[l-1] == p[n-1]) l--;
    return l + 1;
  endfunction

  function automatic void push_code(ref bit q[$], input int v, input int len);
    for (int i = len - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  // Appends the D-FB&C+ code of p to q; returns the number of bits added.
  function automatic int encode(input pat_t p, input int n, ref bit q[$]);
    logic col [16];
    logic row [16];
    int   len = $clog2(n);
    int   s0  = q.size();
    for (int r = 0; r < 16; r++) col[r] = (r < n) ? p[r][0] : 1'b0;
    q.push_back(bit'(p[0][0]));
    push_code(q, line_code(col, n), len);
    for (int r = 0; r < stored_rows(p, n); r++) begin
      for (int c = 0; c < 16; c++) row[c] = (c < n) ? p[r][c] : 1'b0;
      push_code(q, line_code(row, n), len);
    end
    return q.size() - s0;
  endfunction

  // Packs a bit queue into bytes, first bit in bit 7.
  function automatic void pack_bytes(input bit q[$], ref logic [7:0] b[$]);
    b.delete();
    for (int i = 0; i < q.size(); i += 8) begin
      logic [7:0] v = '0;
      for (int k = 0; k < 8; k++)
        if (i + k < q.size()) v[7-k] = q[i+k];
      b.push_back(v);
    end
  endfunction

  typedef enum int {RES_DOUBLE, RES_FULL, RES_HALF} wedge_res_e;
  localparam int CMAX = 32;                 // largest canvas (16x16 at half pel)

  typedef bit canvas_t [CMAX][CMAX];        // [y][x]

  function automatic void draw_line(int x0, int y0, int x1, int y1, ref canvas_t c);
    bit steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    int t, dx, dy, err, derr, y, ystep;
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0;
    dy = (y1 > y0) ? y1 - y0 : y0 - y1;
    err = 0; derr = dy << 1; y = y0;
    ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) c[x][y] = 1'b1; else c[y][x] = 1'b1;
      err += derr;
      if (err >= dx) begin y += ystep; err -= dx << 1; end
    end
  endfunction

  // fill from (x,y) in steps (sx,sy) until a set pixel is met
  function automatic void fill_run(int x, int y, int sx, int sy, ref canvas_t c);
    while (!c[y][x]) begin c[y][x] = 1'b1; x += sx; y += sy; end
  endfunction

  function automatic void gen_pattern(int n, int ori, int xs, int ys, int xe, int ye,
                                      wedge_res_e res, output pat_t p);
    canvas_t c;
    int r, ox, oy;
    r = (res == RES_HALF) ? 2 * n : n;
    if (res == RES_DOUBLE) begin
      xs <<= 1; ys <<= 1; xe <<= 1; ye <<= 1;
      case (ori)
        1: xs = r - 1;
        2: begin xe = r - 1; ys = r - 1; end
        3: ye = r - 1;
        4: ye = r - 1;
        5: xs = r - 1;
        default: ;
      endcase
    end
    for (int yy = 0; yy < CMAX; yy++) for (int xx = 0; xx < CMAX; xx++) c[yy][xx] = 1'b0;
    draw_line(xs, ys, xe, ye, c);
    case (ori)
      0: for (int x = 0; x < xs; x++) fill_run(x, 0, 0, 1, c);
      1: for (int y = 0; y < ys; y++) fill_run(r - 1, y, -1, 0, c);
      2: for (int x = r - 1; x > xs; x--) fill_run(x, r - 1, 0, -1, c);
      3: for (int y = r - 1; y > ys; y--) fill_run(0, y, 1, 0, c);
      4: if (xs + xe < r) for (int y = 0; y < r; y++) fill_run(0, y, 1, 0, c);
         else            for (int y = 0; y < r; y++) fill_run(r - 1, y, -1, 0, c);
      default:
         if (ys + ye < r) for (int x = 0; x < r; x++) fill_run(x, 0, 0, 1, c);
         else            for (int x = 0; x < r; x++) fill_run(x, r - 1, 0, -1, c);
    endcase
    ox = 0; oy = 0;
    if (res == RES_HALF)
      case (ori)
        1: ox = 1;
        2: begin ox = 1; oy = 1; end
        3: oy = 1;
        4: ox = (xs + xe < r) ? 0 : 1;
        5: oy = (ys + ye < r) ? 0 : 1;
        default: ;
      endcase
    for (int y = 0; y < 16; y++) begin
      p[y] = '0;
      if (y < n)
        for (int x = 0; x < n; x++)
          p[y][x] = (res == RES_HALF) ? c[2 * y + oy][2 * x + ox] : c[y][x];
    end
  endfunction

  function automatic void wedge_list(int n, wedge_res_e res, ref pat_t lst[$]);
    int b = (res == RES_DOUBLE) ? n / 2 : (res == RES_FULL) ? n : 2 * n;
    int sx, sy, ex, ey, dsx, dsy, dex, dey;
    lst.delete();
    for (int ori = 0; ori < 6; ori++) begin
      case (ori)
        0: begin sx = 0;     sy = 0;     ex = 0;     ey = 0;     dsx =  1; dsy =  0; dex =  0; dey =  1; end
        1: begin sx = b - 1; sy = 0;     ex = b - 1; ey = 0;     dsx =  0; dsy =  1; dex = -1; dey =  0; end
        2: begin sx = b - 1; sy = b - 1; ex = b - 1; ey = b - 1; dsx = -1; dsy =  0; dex =  0; dey = -1; end
        3: begin sx = 0;     sy = b - 1; ex = 0;     ey = b - 1; dsx =  0; dsy = -1; dex =  1; dey =  0; end
        4: begin sx = 0;     sy = 0;     ex = 0;     ey = b - 1; dsx =  1; dsy =  0; dex =  1; dey =  0; end
        default:
           begin sx = b - 1; sy = 0;     ex = 0;     ey = 0;     dsx =  0; dsy =  1; dex =  0; dey =  1; end
      endcase
      for (int k = 0; k < b; k++)
        for (int l = 0; l < b; l++) begin
          pat_t p;
          bit keep;
          int ones;
          gen_pattern(n, ori, sx + k * dsx, sy + k * dsy, ex + l * dex, ey + l * dey, res, p);
          ones = 0;
          for (int y = 0; y < n; y++) ones += $countones(p[y]);
          keep = (ones != 0) && (ones != n * n);
          foreach (lst[i]) begin
            bit same = 1'b1, inv = 1'b1;
            if (!keep) break;
            for (int y = 0; y < n; y++) begin
              logic [15:0] m = 16'((32'd1 << n) - 1);
              if (lst[i][y] != p[y]) same = 1'b0;
              if ((lst[i][y] ^ m) != p[y]) inv = 1'b0;
            end
            if (same || inv) keep = 1'b0;
          end
          if (keep) lst.push_back(p);
        end
    end
  endfunction

endpackage
