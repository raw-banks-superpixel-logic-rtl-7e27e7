// matrix_pool_tb -- distribution line, matrix allocation, overflow and readout.
//
// Random events (small pixel groups scattered over a 12 x 8-SP region) are
// turned into raw banks; their non-isolated SPs are fed to the pool as cache
// entries, with random gaps, and the bank ends either on its last SP or on a
// bare end marker.  A pool of four matrices is used so that overflow occurs.
// After event_done the clusters of the matrices and of the overflowed SPs are
// compared, in order, with the behavioural reference, and the allocation, join
// and overflow pulses are counted against it.
module matrix_pool_tb;
  import sp_pkg::*;
  import ref_pkg::*;
  import rb_model_pkg::*;

  localparam int NMAT = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  cache_entry_t in_entry;
  logic ovf_valid, out_valid, out_diag, event_done, ev_alloc, ev_join, ev_ovf;
  sp_word_t ovf_sp;
  cluster_t out_cl;
  int checks = 0, failures = 0;
  int c_alloc, c_join, c_ovf, c_diag;
  int m_alloc = 0, m_join = 0, m_ovf = 0, m_diag = 0;  // running counts
  int tot_alloc = 0, tot_join = 0, tot_ovf = 0, tot_diag = 0, tot_stall = 0;
  cluster_t got_nsp [$], got_ovf [$];

  matrix_pool #(.NMAT(NMAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin got_nsp.push_back(out_cl); if (out_diag) m_diag++; end
    if (ovf_valid) lone_clusters(ovf_sp, FLAG_OVERFLOW, got_ovf);
    if (ev_alloc) m_alloc++;
    if (ev_join) m_join++;
    if (ev_ovf) m_ovf++;
    if (in_valid && !in_ready) tot_stall++;
  end

  task automatic cmp(input string what, input cluster_t got [$], input cluster_t exp [$], input int ev);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("event %0d %s: %0d clusters, expected %0d", ev, what, got.size(), exp.size());
    end else
      foreach (exp[i]) if (got[i] != exp[i]) begin
        failures++;
        $display("event %0d %s cluster %0d: got %p expected %p", ev, what, i, got[i], exp[i]);
        break;
      end
  endtask

  task automatic run_event(input int ev);
    hitmap_t  h;
    sp_word_t bank [$], nsp_words [$];
    cluster_t e_nsp [$], e_ovf [$];
    int e_alloc, e_join, e_ovf_n, e_diag;
    bit marker;
    e_alloc = 0; e_join = 0; e_ovf_n = 0; e_diag = 0;
    c_alloc = m_alloc; c_join = m_join; c_ovf = m_ovf; c_diag = m_diag;
    got_nsp.delete(); got_ovf.delete();
    random_hits(h, (ev % 3 == 0) ? 0 : $urandom_range(0, 170), (ev % 4 == 0) ? 120 : $urandom_range(0, 110),
                12, 8, $urandom_range(4, 30));
    make_bank(h, (ev % 2) == 1, bank);
    run_matrices(bank, NMAT, e_nsp, e_ovf, e_alloc, e_join, e_ovf_n, e_diag);
    foreach (bank[k]) if (bank[k].hint) nsp_words.push_back(bank[k]);
    marker = (nsp_words.size() == 0) || ($urandom_range(0, 1) == 1);
    foreach (nsp_words[k]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_entry.sp = nsp_words[k];
      in_entry.has_sp = 1;
      in_entry.eoe = !marker && (k == nsp_words.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    if (marker) begin
      @(negedge clk);
      in_valid = 1; in_entry = '0; in_entry.eoe = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    // a word offered during readout must wait
    in_valid = 1; in_entry = '0; in_entry.has_sp = 1; in_entry.sp = nsp_words.size() ? nsp_words[0] : '0;
    #1;
    checks++;
    if (in_ready) begin failures++; $display("event %0d: pool accepts input during readout", ev); end
    in_valid = 0;
    while (!event_done) @(posedge clk);
    @(negedge clk);
    c_alloc = m_alloc - c_alloc; c_join = m_join - c_join; c_ovf = m_ovf - c_ovf;
    c_diag = m_diag - c_diag;
    cmp("matrix", got_nsp, e_nsp, ev);
    cmp("overflow", got_ovf, e_ovf, ev);
    checks++;
    if (c_alloc != e_alloc || c_join != e_join || c_ovf != e_ovf_n || c_diag != e_diag) begin
      failures++;
      $display("event %0d: alloc/join/ovf/diag %0d/%0d/%0d/%0d expected %0d/%0d/%0d/%0d", ev,
               c_alloc, c_join, c_ovf, c_diag, e_alloc, e_join, e_ovf_n, e_diag);
    end
    tot_alloc += c_alloc; tot_join += c_join; tot_ovf += c_ovf; tot_diag += c_diag;

  endtask

  initial begin
    in_valid = 0; in_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 60; ev++) run_event(ev);
    $display("allocations %0d joins %0d overflows %0d off-diagonal seeds %0d", tot_alloc, tot_join,
             tot_ovf, tot_diag);
    checks++;
    if (tot_alloc == 0 || tot_join == 0 || tot_ovf == 0 || tot_diag == 0) begin
      failures++; $display("a pool mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
