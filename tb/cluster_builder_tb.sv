// cluster_builder_tb -- seeds, candidates and flags over random matrices.
//
// Each trial fills a 10 x 12 pixel matrix with random hits, sometimes planting
// the off-diagonal pattern, and random SP times, then starts the builder.  The
// testbench finds the seeds itself (an active pixel, or an empty one with
// active pixels above and to the right, whose five lower-left neighbours are
// empty), floods each 3 x 3 candidate to get the seed's cluster, works out the
// self-contained and on_edge flags from the surrounding ring and the matrix
// border, and compares the clusters in seed order, plus the number of cycles
// from start to done (one per cluster plus one).
module cluster_builder_tb;
  import sp_pkg::*;
  import ref_pkg::*;

  localparam int MC = 5, MR = 3, PW = 10, PH = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [PW-1:0][PH-1:0]           pix;
  logic [MC-1:0][MR-1:0][TIME_W-1:0] slot_t;
  logic [COL_W-1:0] org_col;
  logic [ROW_W-1:0] org_row;
  logic busy, done, out_valid, out_diag;
  cluster_t out_cl;
  int checks = 0, failures = 0;
  int n_diag = 0, n_sc = 0, n_nsc = 0, n_edge = 0;

  cluster_builder #(.MCOLS(MC), .MROWS(MR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit p(input int x, input int y);
    if (x < 0 || y < 0 || x >= PW || y >= PH) return 0;
    return pix[x][y];
  endfunction

  cluster_t exp_q [$];
  bit       expd_q [$];

  task automatic build_expected();
    exp_q.delete();
    expd_q.delete();
    for (int x = 0; x < PW; x++)
      for (int y = 0; y < PH; y++) begin
        bit quiet, std, dg;
        quiet = !p(x-1, y+1) && !p(x-1, y) && !p(x-1, y-1) && !p(x, y-1) && !p(x+1, y-1);
        std = quiet && p(x, y);
        dg  = quiet && !p(x, y) && p(x, y+1) && p(x+1, y);
        if (std || dg) begin
          grid_t g, m;
          int sx, sy, c, ty;
          bit sc, on_edge;
          cluster_t e;
          sx = 0; sy = 0; c = 0; sc = 1; on_edge = 0;
          for (int i = 0; i < G; i++) for (int j = 0; j < G; j++) g[i][j] = 0;
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) g[i][j] = p(x+i, y+j);
          if (std) flood(g, 3, 3, 0, 0, m); else flood(g, 3, 3, 0, 1, m);
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++)
              if (m[i][j]) begin
                sx += i; sy += j; c++;
                if (x+i == 0 || y+j == 0 || x+i == PW-1 || y+j == PH-1) on_edge = 1;
                for (int a = -1; a <= 1; a++)
                  for (int b = -1; b <= 1; b++)
                    if ((i+a < 0 || i+a > 2 || j+b < 0 || j+b > 2) && p(x+i+a, y+j+b)) sc = 0;
              end
          ty = std ? y : y + 1;
          e.x = POS_W'((int'(org_col) * 2 + x) * 8 + rmean(sx, c));
          e.y = POS_W'((int'(org_row) * 4 + y) * 8 + rmean(sy, c));
          e.t = slot_t[x / 2][ty / 4];
          e.flag = topo_flag_t'({1'b0, sc, on_edge});
          exp_q.push_back(e);
          expd_q.push_back(dg);
        end
      end
  endtask

  initial begin
    rst_n = 0;
    pix = '0; slot_t = '0; org_col = '0; org_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      int dens, got, cycles;
      @(negedge clk);
      dens = $urandom_range(3, 25);
      for (int x = 0; x < PW; x++)
        for (int y = 0; y < PH; y++) pix[x][y] = ($urandom_range(0, 99) < dens);
      if (trial % 3 == 0) begin  // plant an off-diagonal pair with empty lower-left
        int x, y;
        x = $urandom_range(1, PW - 3); y = $urandom_range(1, PH - 3);
        pix[x][y] = 0; pix[x][y+1] = 1; pix[x+1][y] = 1;
        pix[x-1][y+1] = 0; pix[x-1][y] = 0; pix[x-1][y-1] = 0; pix[x][y-1] = 0; pix[x+1][y-1] = 0;
      end
      for (int c = 0; c < MC; c++) for (int r = 0; r < MR; r++) slot_t[c][r] = TIME_W'($urandom);
      org_col = COL_W'($urandom_range(0, 187));
      org_row = ROW_W'($urandom_range(0, 125));
      build_expected();
      start = 1;
      @(posedge clk);
      #1 start = 0;
      got = 0; cycles = 0;
      while (!done && cycles < 200) begin
        @(posedge clk);
        #1 cycles++;
        if (out_valid) begin
          checks++;
          if (got >= exp_q.size()) begin
            failures++;
            $display("trial %0d: extra cluster %p", trial, out_cl);
          end else if (out_cl != exp_q[got] || out_diag != expd_q[got]) begin
            failures++;
            $display("trial %0d cluster %0d: got %p diag %0b expected %p diag %0b", trial, got,
                     out_cl, out_diag, exp_q[got], expd_q[got]);
          end else begin
            if (out_diag) n_diag++;
            if (out_cl.flag[1]) n_sc++; else n_nsc++;
            if (out_cl.flag[0]) n_edge++;
          end
          got++;
        end
      end
      checks++;
      if (got != exp_q.size() || cycles != exp_q.size() + 1) begin
        failures++;
        $display("trial %0d: %0d clusters in %0d cycles, expected %0d in %0d", trial, got, cycles,
                 exp_q.size(), exp_q.size() + 1);
      end
    end
    $display("diag %0d self-contained %0d not-self-contained %0d on_edge %0d", n_diag, n_sc, n_nsc, n_edge);
    checks++;
    if (n_diag == 0 || n_sc == 0 || n_nsc == 0 || n_edge == 0) begin
      failures++;
      $display("a seed pattern or flag never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
