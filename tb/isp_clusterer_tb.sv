// isp_clusterer_tb -- random isolated SPs through the lone-SP clusterer.
//
// Each cycle a random SP word (and a random overflow marker) is presented.
// One cycle later the testbench expects the groups of the SP's pixels, found by
// flood fill, as absolute centroids (SP column * 2 + local column, SP row * 4 +
// local row, in 1/8 pixel), with the SP's time and the Isolated or Overflow flag.
module isp_clusterer_tb;
  import sp_pkg::*;
  import ref_pkg::*;

  logic           clk = 0, rst_n = 0;
  logic           in_valid, in_ovf;
  sp_word_t       in_sp;
  logic [1:0]     out_valid;
  cluster_t [1:0] out_cl;
  int checks = 0, failures = 0, two_seen = 0;

  isp_clusterer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected clusters of the word presented in the previous cycle.
  task automatic expect_of(input sp_word_t w, input logic v, input logic ovf,
                           output int n, output cluster_t e [2]);
    grid_t g, done, m;
    n = 0;
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) begin g[x][y] = 0; done[x][y] = 0; end
    for (int i = 0; i < 8; i++) g[i / 4][i % 4] = w.pix[i];
    for (int i = 0; i < 8; i++)
      if (v && g[i / 4][i % 4] && !done[i / 4][i % 4]) begin
        int sx, sy, c;
        sx = 0; sy = 0; c = 0;
        flood(g, 2, 4, i / 4, i % 4, m);
        for (int x = 0; x < 2; x++) for (int y = 0; y < 4; y++)
          if (m[x][y]) begin sx += x; sy += y; c++; done[x][y] = 1; end
        e[n].x    = POS_W'(int'(w.col) * 16 + rmean(sx, c));
        e[n].y    = POS_W'(int'(w.row) * 32 + rmean(sy, c));
        e[n].t    = w.t;
        e[n].flag = ovf ? FLAG_OVERFLOW : FLAG_ISOLATED;
        n++;
      end
  endtask

  initial begin
    sp_word_t pw;
    logic     pv, po;
    in_valid = 0; in_ovf = 0; in_sp = '0;
    pv = 0; po = 0; pw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        int n;
        cluster_t e [2];
        expect_of(pw, pv, po, n, e);
        if (n == 2) two_seen++;
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (out_valid[k] != (k < n)) begin
            failures++;
            $display("cycle %0d lane %0d: valid %0b, expected %0b", cyc, k, out_valid[k], k < n);
          end else if (k < n && out_cl[k] != e[k]) begin
            failures++;
            $display("cycle %0d lane %0d: got %p expected %p", cyc, k, out_cl[k], e[k]);
          end
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_ovf   = $urandom_range(0, 1);
      in_sp    = sp_word_t'({$urandom, $urandom});
      in_sp.col = COL_W'($urandom_range(0, SP_COLS - 1));
      pw = in_sp; pv = in_valid; po = in_ovf;
    end
    checks++;
    if (two_seen == 0) begin failures++; $display("no SP with two clusters was seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
