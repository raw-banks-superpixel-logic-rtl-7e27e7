// rb_cluster_top_full_tb -- the engine at its default size (512-entry SP
// cache, 16 reading matrices) on whole-sensor events.
//
// Same stimulus and reference as rb_cluster_top_tb, but the hits are spread over
// all 192 x 128 SPs of a sensor, a few hundred pixel groups per event, and the
// engine is instantiated without parameter overrides.  The description below
// is that of the reduced-size test.
//
// Random events are generated as pixel groups (single pixels, pairs, squares,
// diagonals, off-diagonal pairs and random 3 x 3 blobs) scattered over a region
// of the sensor, turned into raw banks (one word per hit SP, HINT = 1 when a
// neighbouring SP is hit) and streamed in back to back with random gaps, so the
// next bank fills the SP cache while the matrices of the previous one are read
// out.  The three cluster streams are compared, in order, with the behavioural
// reference.  The test counts every mechanism of the design and fails if one
// never happens: isolated SPs with one and two clusters, matrix allocation and
// joining, overflow, the off-diagonal seed, each matrix flag, and input stalls
// while the cache is full.  It also prints how many clusters of a software
// flood-fill reconstruction are found with the same centroid.
module rb_cluster_top_full_tb;
  import sp_pkg::*;
  import ref_pkg::*;
  import rb_model_pkg::*;

  localparam int CACHE_DEPTH = 512;
  localparam int NMAT        = 16;
  localparam int EVENTS      = 4;
  localparam int REGION_C    = 192;
  localparam int REGION_R    = 128;
  localparam int NCL_LO      = 150;   // pixel groups per event
  localparam int NCL_HI      = 400;
  localparam bit ALL_MECH    = 0;   // every mechanism must occur

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last;
  sp_word_t in_word;
  logic [1:0] isp_valid, ovf_valid;
  cluster_t [1:0] isp_cl, ovf_cl;
  logic nsp_valid, nsp_diag, event_done, ev_alloc, ev_join, ev_ovf;
  cluster_t nsp_cl;
  logic [$clog2(CACHE_DEPTH):0] cache_level;

  int checks = 0, failures = 0;
  int n_alloc = 0, n_join = 0, n_ovf = 0, n_diag = 0, n_stall = 0, n_done = 0, n_two = 0;
  int e_alloc = 0, e_join = 0, e_ovf = 0, e_diag = 0;
  int n_flag [8];
  cluster_t got_isp [$], got_ovf [$], got_nsp [$];
  cluster_t exp_isp [$], exp_ovf [$], exp_nsp [$];
  int cpu_total = 0, cpu_found = 0;

  rb_cluster_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (isp_valid[k]) got_isp.push_back(isp_cl[k]);
      if (ovf_valid[k]) got_ovf.push_back(ovf_cl[k]);
    end
    if (isp_valid[1]) n_two++;
    if (nsp_valid) begin got_nsp.push_back(nsp_cl); if (nsp_diag) n_diag++; end
    if (ev_alloc) n_alloc++;
    if (ev_join) n_join++;
    if (ev_ovf) n_ovf++;
    if (event_done) n_done++;
    if (in_valid && !in_ready) n_stall++;
  end

  task automatic cmp(input string what, input cluster_t got [$], input cluster_t exp [$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("%s: %0d clusters, expected %0d", what, got.size(), exp.size());
    end
    foreach (exp[i]) if (i < got.size()) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("%s cluster %0d: got %p expected %p", what, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic one_event(input int ev);
    hitmap_t  h;
    sp_word_t bank [$];
    cluster_t cpu [$];
    int c0, r0;
    c0 = (ev % 5 == 0) ? 0 : $urandom_range(0, SP_COLS - REGION_C);
    r0 = (ev % 7 == 0) ? SP_ROWS - REGION_R : $urandom_range(0, SP_ROWS - REGION_R);
    random_hits(h, c0, r0, REGION_C, REGION_R, $urandom_range(NCL_LO, NCL_HI));
    make_bank(h, (ev % 2) == 1, bank);
    if (bank.size() == 0) return;
    foreach (bank[k]) if (!bank[k].hint) lone_clusters(bank[k], FLAG_ISOLATED, exp_isp);
    run_matrices(bank, NMAT, exp_nsp, exp_ovf, e_alloc, e_join, e_ovf, e_diag);
    cpu_total += cpu_clusters(h, cpu);
    foreach (cpu[i]) begin
      bit f;
      f = 0;
      foreach (exp_isp[j]) if (exp_isp[j].x == cpu[i].x && exp_isp[j].y == cpu[i].y) f = 1;
      foreach (exp_nsp[j]) if (exp_nsp[j].x == cpu[i].x && exp_nsp[j].y == cpu[i].y) f = 1;
      foreach (exp_ovf[j]) if (exp_ovf[j].x == cpu[i].x && exp_ovf[j].y == cpu[i].y) f = 1;
      if (f) cpu_found++;
    end
    foreach (bank[k]) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_word  = bank[k];
      in_last  = (k == bank.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    in_last  = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_word = '0;
    foreach (n_flag[i]) n_flag[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < EVENTS; ev++) one_event(ev);
    // drain: wait for the matrices of the last bank
    repeat (2000) @(posedge clk);
    cmp("isolated", got_isp, exp_isp);
    cmp("overflow", got_ovf, exp_ovf);
    cmp("matrix", got_nsp, exp_nsp);
    foreach (got_nsp[i]) n_flag[got_nsp[i].flag]++;
    checks++;
    if (n_alloc != e_alloc || n_join != e_join || n_ovf != e_ovf || n_diag != e_diag) begin
      failures++;
      $display("alloc/join/ovf/diag %0d/%0d/%0d/%0d expected %0d/%0d/%0d/%0d", n_alloc, n_join,
               n_ovf, n_diag, e_alloc, e_join, e_ovf, e_diag);
    end
    $display("isolated clusters %0d (SPs with two: %0d), matrix clusters %0d, overflow clusters %0d",
             got_isp.size(), n_two, got_nsp.size(), got_ovf.size());
    $display("allocations %0d joins %0d overflow SPs %0d off-diagonal seeds %0d stall cycles %0d banks done %0d",
             n_alloc, n_join, n_ovf, n_diag, n_stall, n_done);
    $display("flags: SC+edge %0d SC %0d NSC+edge %0d NSC %0d", n_flag[3], n_flag[2], n_flag[1], n_flag[0]);
    $display("software clusters found with the same centroid: %0d of %0d", cpu_found, cpu_total);
    checks++;
    if (ALL_MECH && (got_isp.size() == 0 || n_two == 0 || n_alloc == 0 || n_join == 0 || n_ovf == 0 ||
        n_diag == 0 || n_stall == 0 || n_flag[0] == 0 || n_flag[1] == 0 || n_flag[2] == 0 ||
        n_flag[3] == 0)) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
