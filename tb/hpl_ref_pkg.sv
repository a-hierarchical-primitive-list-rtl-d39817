// Reference model of the hierarchical primitive-list binner, for testbenches.
//
// Written with plain integer arithmetic (loops for log2, divisions for
// groups), independently of the RTL's bit-level circuits. It gives the fitting
// result of a tile box, the layer offset table layout used by the tests, the
// list indices a primitive is recorded in, and the lists that cover a tile.
package hpl_ref_pkg;

  typedef struct {
    int ltype;   // 0 square, 1 hrect, 2 vrect, 3 unaligned grid
    int layer;
    int sel;     // layer before step-down
    int step;
  } fit_t;

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int imin(int a, int b);
    return a < b ? a : b;
  endfunction

  // Straddles a group edge though it would fit in one group.
  function automatic bit crosses(int lo, int hi, int g);
    return (hi - lo + 1 <= g) && (lo / g != hi / g);
  endfunction

  // Inside the shifted grid, within one shifted group where it fits one.
  function automatic bit ug_ok(int lo, int hi, int g, int tiles);
    int hf = g / 2;
    int n  = cdiv(tiles, g) - 1;
    if (lo < hf) return 0;
    if ((hi - hf) / g >= n) return 0;
    if (hi - lo + 1 <= g && (lo - hf) / g != (hi - hf) / g) return 0;
    return 1;
  endfunction

  function automatic fit_t fit(int x0, int y0, int x1, int y1, int tx, int ty,
                               int thresh, int nl, bit ug_en = 1'b1);
    fit_t r;
    int w = x1 - x0 + 1, h = y1 - y0 + 1;
    int rf = imin(w, h);
    int shape;  // 0 normal 1 wide 2 high
    int l = 0, g;
    bit mis, pass;
    if (w > h) shape = (w - h > thresh) ? 1 : 0;
    else       shape = (h - w > thresh) ? 2 : 0;
    while ((1 << l) < rf) l++;
    if (l > 4) l = 4;            // the layer select logic saturates at 4
    if (l > nl - 1) l = nl - 1;
    g = 1 << l;
    r.sel = l;
    mis  = crosses(x0, x1, g) || crosses(y0, y1, g);
    pass = ug_en && (l >= 1) && ug_ok(x0, x1, g, tx) && ug_ok(y0, y1, g, ty);
    if (shape == 1) begin
      r.ltype = 1; r.step = int'(crosses(y0, y1, g));
    end else if (shape == 2) begin
      r.ltype = 2; r.step = int'(crosses(x0, x1, g));
    end else if (!mis) begin
      r.ltype = 0; r.step = 0;
    end else if (pass) begin
      r.ltype = 3; r.step = 0;
    end else begin
      r.ltype = 0; r.step = 1;
    end
    r.layer = l - r.step;
    return r;
  endfunction

  // Number of list columns and rows of kind t at layer l.
  function automatic int ncols(int t, int l, int tx);
    int n = cdiv(tx, 1 << l);
    case (t)
      1: return 2;
      3: return n - 1;
      default: return n;
    endcase
  endfunction

  function automatic int nrows(int t, int l, int ty);
    int n = cdiv(ty, 1 << l);
    case (t)
      2: return 2;
      3: return n - 1;
      default: return n;
    endcase
  endfunction

  // Offset table layout used by the tests: layer-major, kinds in code order.
  function automatic int offset(int l, int t, int tx, int ty);
    int o = 0;
    for (int ll = 0; ll <= l; ll++)
      for (int tt = 0; tt < 4; tt++) begin
        if (ll == l && tt == t) return o;
        if (!(tt == 3 && ll == 0)) o += ncols(tt, ll, tx) * nrows(tt, ll, ty);
      end
    return o;
  endfunction

  function automatic int total_lists(int nl, int tx, int ty);
    return offset(nl, 0, tx, ty);
  endfunction

  // Cell column / row of tile coordinate x / y for kind t, layer l.
  function automatic int cx_of(int t, int l, int x, int tx);
    int g = 1 << l;
    case (t)
      1: return (x >= cdiv(tx, 2)) ? 1 : 0;
      3: return (x - g / 2) / g;
      default: return x / g;
    endcase
  endfunction

  function automatic int cy_of(int t, int l, int y, int ty);
    int g = 1 << l;
    case (t)
      2: return (y >= cdiv(ty, 2)) ? 1 : 0;
      3: return (y - g / 2) / g;
      default: return y / g;
    endcase
  endfunction

  function automatic int lindex(int t, int l, int cx, int cy, int tx, int ty);
    return offset(l, t, tx, ty) + cy * ncols(t, l, tx) + cx;
  endfunction

  // List index covering tile (x, y) for kind t, layer l; -1 if none.
  function automatic int tile_list(int t, int l, int x, int y, int tx, int ty);
    int g = 1 << l;
    if (t == 3) begin
      if (l == 0 || x < g / 2 || y < g / 2) return -1;
      if (cx_of(t, l, x, tx) >= ncols(t, l, tx)) return -1;
      if (cy_of(t, l, y, ty) >= nrows(t, l, ty)) return -1;
    end
    return lindex(t, l, cx_of(t, l, x, tx), cy_of(t, l, y, ty), tx, ty);
  endfunction

endpackage
