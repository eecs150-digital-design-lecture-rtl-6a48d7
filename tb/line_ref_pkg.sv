// line_ref_pkg: reference model of integer Bresenham line drawing for the
// testbenches (any quadrant, any slope). Returns the pixels of the line from
// (x0,y0) to (x1,y1) in the order the algorithm visits them.
package line_ref_pkg;

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic void line_pixels(int x0, int y0, int x1, int y1,
                                      ref int px[$], ref int py[$]);
    int t, dx, dy, e, ys, y;
    bit steep;
    px.delete();
    py.delete();
    steep = iabs(y1 - y0) > iabs(x1 - x0);
    if (steep) begin
      t = x0; x0 = y0; y0 = t;
      t = x1; x1 = y1; y1 = t;
    end
    if (x0 > x1) begin
      t = x0; x0 = x1; x1 = t;
      t = y0; y0 = y1; y1 = t;
    end
    dx = x1 - x0;
    dy = iabs(y1 - y0);
    e  = dx / 2;
    ys = (y0 < y1) ? 1 : -1;
    y  = y0;
    for (int x = x0; x <= x1; x++) begin
      if (steep) begin px.push_back(y); py.push_back(x); end
      else       begin px.push_back(x); py.push_back(y); end
      e = e - dy;
      if (e < 0) begin
        y = y + ys;
        e = e + dx;
      end
    end
  endfunction

endpackage
