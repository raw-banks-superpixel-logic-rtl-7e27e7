// rb_model_pkg -- behavioural reference of the raw-bank clustering engine,
// used by the pool and end-to-end testbenches.
//
// It works on whole events held in queues rather than on a cycle basis:
//   * make_bank builds the raw bank of a random hit map: one word per hit SP,
//     HINT = 1 when any of the eight surrounding SPs is hit too;
//   * lone_clusters gives the clusters of one SP clustered on its own;
//   * run_matrices places the non-isolated SPs into windows (first window
//     holding the SP, else a new window centred on it and clamped to the
//     sensor, else overflow) and clusters each window by the seed rules;
//   * cpu_clusters labels the complete hit map with a flood fill, as a software
//     reconstruction would, for an efficiency figure.
// The ordering it predicts is the engine's: SPs in bank order, clusters of a
// window in seed order x * 12 + y, windows in allocation order.
package rb_model_pkg;
  import sp_pkg::*;
  import ref_pkg::*;

  localparam int MPW = 10, MPH = 12;  // window size in pixels

  typedef bit win_px_t [MPW][MPH];

  typedef struct {
    int                oc, orr;
    win_px_t           px;
    logic [TIME_W-1:0] t  [5][3];
    bit                tu [5][3];
  } win_t;

  // Sensor hit map of the region used by a test, in SP units (cols x rows).
  typedef struct {
    int                c0, r0, nc, nr;     // region origin and size in SPs
    logic [7:0]        pat [int];          // key c * 256 + r
    logic [TIME_W-1:0] tim [int];
  } hitmap_t;

  function automatic void lone_clusters(input sp_word_t w, input topo_flag_t f,
                                        ref cluster_t q [$]);
    grid_t g, done, m;
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) begin g[x][y] = 0; done[x][y] = 0; end
    for (int i = 0; i < 8; i++) g[i / 4][i % 4] = w.pix[i];
    for (int i = 0; i < 8; i++)
      if (g[i / 4][i % 4] && !done[i / 4][i % 4]) begin
        int sx, sy, c;
        cluster_t e;
        sx = 0; sy = 0; c = 0;
        flood(g, 2, 4, i / 4, i % 4, m);
        for (int x = 0; x < 2; x++) for (int y = 0; y < 4; y++)
          if (m[x][y]) begin sx += x; sy += y; c++; done[x][y] = 1; end
        e.x = POS_W'(int'(w.col) * 16 + rmean(sx, c));
        e.y = POS_W'(int'(w.row) * 32 + rmean(sy, c));
        e.t = w.t;
        e.flag = f;
        q.push_back(e);
      end
  endfunction

  function automatic bit wp(input win_t w, input int x, input int y);
    if (x < 0 || y < 0 || x >= MPW || y >= MPH) return 0;
    return w.px[x][y];
  endfunction

  // Clusters of one window, in seed order; counts off-diagonal seeds.
  function automatic void window_clusters(input win_t w, ref cluster_t q [$], ref int n_diag);
    for (int x = 0; x < MPW; x++)
      for (int y = 0; y < MPH; y++) begin
        bit quiet, std, dg;
        quiet = !wp(w, x-1, y+1) && !wp(w, x-1, y) && !wp(w, x-1, y-1) && !wp(w, x, y-1)
             && !wp(w, x+1, y-1);
        std = quiet && wp(w, x, y);
        dg  = quiet && !wp(w, x, y) && wp(w, x, y+1) && wp(w, x+1, y);
        if (std || dg) begin
          grid_t g, m;
          int sx, sy, c, ty;
          bit sc, on_edge;
          cluster_t e;
          sx = 0; sy = 0; c = 0; sc = 1; on_edge = 0;
          for (int i = 0; i < G; i++) for (int j = 0; j < G; j++) g[i][j] = 0;
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) g[i][j] = wp(w, x+i, y+j);
          if (std) flood(g, 3, 3, 0, 0, m); else flood(g, 3, 3, 0, 1, m);
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++)
              if (m[i][j]) begin
                sx += i; sy += j; c++;
                if (x+i == 0 || y+j == 0 || x+i == MPW-1 || y+j == MPH-1) on_edge = 1;
                for (int a = -1; a <= 1; a++)
                  for (int b = -1; b <= 1; b++)
                    if ((i+a < 0 || i+a > 2 || j+b < 0 || j+b > 2) && wp(w, x+i+a, y+j+b)) sc = 0;
              end
          ty = std ? y : y + 1;
          e.x = POS_W'((w.oc * 2 + x) * 8 + rmean(sx, c));
          e.y = POS_W'((w.orr * 4 + y) * 8 + rmean(sy, c));
          e.t = w.tu[x / 2][ty / 4] ? w.t[x / 2][ty / 4] : '0;
          e.flag = topo_flag_t'({1'b0, sc, on_edge});
          if (dg) n_diag++;
          q.push_back(e);
        end
      end
  endfunction

  // Matrix path of one bank: window placement, overflow and window clusters.
  function automatic void run_matrices(input sp_word_t bank [$], input int nmat,
                                       ref cluster_t nsp [$], ref cluster_t ovf [$],
                                       ref int n_alloc, ref int n_join, ref int n_ovf,
                                       ref int n_diag);
    win_t wins [$];
    foreach (bank[k]) begin
      sp_word_t s;
      int hitw;
      s = bank[k];
      if (!s.hint) continue;
      hitw = -1;
      foreach (wins[i])
        if (hitw < 0 && int'(s.col) >= wins[i].oc && int'(s.col) < wins[i].oc + 5 &&
            int'(s.row) >= wins[i].orr && int'(s.row) < wins[i].orr + 3) hitw = i;
      if (hitw >= 0) n_join++;
      else if (wins.size() < nmat) begin
        win_t w;
        w.oc  = int'(s.col) - 2; if (w.oc < 0) w.oc = 0; if (w.oc > 187) w.oc = 187;
        w.orr = int'(s.row) - 1; if (w.orr < 0) w.orr = 0; if (w.orr > 125) w.orr = 125;
        for (int x = 0; x < MPW; x++) for (int y = 0; y < MPH; y++) w.px[x][y] = 0;
        for (int c = 0; c < 5; c++) for (int r = 0; r < 3; r++) begin w.tu[c][r] = 0; w.t[c][r] = '0; end
        wins.push_back(w);
        hitw = wins.size() - 1;
        n_alloc++;
      end else begin
        n_ovf++;
        lone_clusters(s, FLAG_OVERFLOW, ovf);
        continue;
      end
      begin
        int dc, dr;
        win_t w;
        w  = wins[hitw];
        dc = int'(s.col) - w.oc;
        dr = int'(s.row) - w.orr;
        for (int i = 0; i < 8; i++)
          if (s.pix[i]) w.px[dc * 2 + i / 4][dr * 4 + i % 4] = 1;
        if (!w.tu[dc][dr]) begin
          w.tu[dc][dr] = 1;
          w.t[dc][dr]  = s.t;
        end
        wins[hitw] = w;
      end
    end
    foreach (wins[i]) window_clusters(wins[i], nsp, n_diag);
  endfunction

  // Random hit map: nclus small pixel groups in a region of nc x nr SPs.
  function automatic void random_hits(ref hitmap_t h, input int c0, input int r0,
                                      input int nc, input int nr, input int nclus);
    h.c0 = c0; h.r0 = r0; h.nc = nc; h.nr = nr;
    h.pat.delete(); h.tim.delete();
    for (int k = 0; k < nclus; k++) begin
      int px, py, shape;
      px = c0 * 2 + $urandom_range(0, nc * 2 - 1);
      py = r0 * 4 + $urandom_range(0, nr * 4 - 1);
      shape = $urandom_range(0, 7);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          bit on;
          case (shape)
            0: on = (i == 0 && j == 0);
            1: on = (i == 0 && j < 2);
            2: on = (i < 2 && j == 0);
            3: on = (i < 2 && j < 2);
            4: on = (i == j);
            5: on = (i + j == 1);                 // off-diagonal pair
            6: on = (i == 1) || (j == 1 && $urandom_range(0, 1) == 1);
            default: on = ($urandom_range(0, 2) == 0);
          endcase
          if (on && px + i < (c0 + nc) * 2 && py + j < (r0 + nr) * 4) begin
            int key, sc, sr;
            sc = (px + i) / 2; sr = (py + j) / 4;
            key = sc * 256 + sr;
            if (!h.pat.exists(key)) begin h.pat[key] = '0; h.tim[key] = TIME_W'($urandom); end
            begin
              logic [7:0] v;
              v = h.pat[key];
              v[((px + i) % 2) * 4 + (py + j) % 4] = 1'b1;
              h.pat[key] = v;
            end
          end
        end
    end
  endfunction

  // Raw bank of a hit map, column-major or shuffled.
  function automatic void make_bank(input hitmap_t h, input bit shuffle, ref sp_word_t bank [$]);
    bank.delete();
    foreach (h.pat[key]) begin
      sp_word_t w;
      int c, r;
      bit nb;
      c = key / 256; r = key % 256;
      nb = 0;
      for (int dc = -1; dc <= 1; dc++)
        for (int dr = -1; dr <= 1; dr++)
          if ((dc != 0 || dr != 0) && h.pat.exists((c + dc) * 256 + r + dr)) nb = 1;
      w.hint = nb;
      w.t    = h.tim[key];
      w.col  = COL_W'(c);
      w.row  = ROW_W'(r);
      w.pix  = h.pat[key];
      bank.push_back(w);
    end
    if (shuffle) bank.shuffle();
  endfunction

  // Software reconstruction: 8-connected groups of the whole hit map.
  function automatic int cpu_clusters(input hitmap_t h, ref cluster_t q [$]);
    bit on [int], seen [int];
    int n;
    foreach (h.pat[key])
      for (int i = 0; i < 8; i++)
        if (h.pat[key][i]) on[((key / 256) * 2 + i / 4) * 1024 + (key % 256) * 4 + i % 4] = 1;
    n = 0;
    foreach (on[p]) begin
      int stk [$];
      int sx, sy, c;
      cluster_t e;
      if (seen.exists(p)) continue;
      sx = 0; sy = 0; c = 0;
      stk.push_back(p); seen[p] = 1;
      while (stk.size() > 0) begin
        int v;
        v = stk.pop_back();
        sx += v / 1024; sy += v % 1024; c++;
        for (int a = -1; a <= 1; a++)
          for (int b = -1; b <= 1; b++) begin
            int u;
            u = (v / 1024 + a) * 1024 + v % 1024 + b;
            if (on.exists(u) && !seen.exists(u)) begin seen[u] = 1; stk.push_back(u); end
          end
      end
      e.x = POS_W'(rmean(sx, c));
      e.y = POS_W'(rmean(sy, c));
      e.t = '0;
      e.flag = FLAG_ISOLATED;
      q.push_back(e);
      n++;
    end
    return n;
  endfunction

endpackage
