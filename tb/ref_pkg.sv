// ref_pkg -- reference arithmetic shared by the testbenches.
//
// These routines recompute, in a plain software style, what the clustering
// hardware should produce: connected pixel groups found by a stack-based flood
// fill over a small 2-D bit grid (8-neighbourhood), and centroids rounded to
// the nearest 1/8 pixel with real arithmetic.  They share no code with the RTL.
package ref_pkg;

  localparam int G = 16;  // grid side, enough for a 2x4 SP or a 3x3 candidate

  typedef bit grid_t [G][G];

  // Rounded centroid in 1/8 pixel.
  function automatic int rmean(input int sum, input int n);
    return int'($floor(real'(sum) * 8.0 / real'(n) + 0.5));
  endfunction

  // Mark the 8-connected group of g holding (x0, y0) in m (w columns, h rows).
  function automatic void flood(input grid_t g, input int w, input int h,
                                input int x0, input int y0, ref grid_t m);
    int sx[$], sy[$];
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) m[x][y] = 0;
    if (!g[x0][y0]) return;
    sx.push_back(x0); sy.push_back(y0); m[x0][y0] = 1;
    while (sx.size() > 0) begin
      int cx, cy;
      cx = sx.pop_back(); cy = sy.pop_back();
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++) begin
          int nx, ny;
          nx = cx + dx; ny = cy + dy;
          if (nx >= 0 && ny >= 0 && nx < w && ny < h && g[nx][ny] && !m[nx][ny]) begin
            m[nx][ny] = 1;
            sx.push_back(nx); sy.push_back(ny);
          end
        end
    end
  endfunction

endpackage
