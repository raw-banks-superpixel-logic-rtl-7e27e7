// sp_matrix_tb -- window claiming and pixel placement of one reading matrix.
//
// The matrix is allocated at a random origin, then fed random SPs near and
// in_win its window.  A model of the window (a 5 x 3 array of 8-bit SP
// patterns and first times) is updated only for SPs whose column and row fall
// in_win; the testbench checks hit for every SP and, after every write, each
// of the 120 pixels and 15 slot times, then clears the matrix.
module sp_matrix_tb;
  import sp_pkg::*;

  localparam int MC = 5, MR = 3;
  logic clk = 0, rst_n = 0, clear = 0, alloc = 0, wr = 0;
  logic [COL_W-1:0] alloc_col, org_col;
  logic [ROW_W-1:0] alloc_row, org_row;
  sp_word_t sp;
  logic used, hit;
  logic [MC*2-1:0][MR*4-1:0] pix;
  logic [MC-1:0][MR-1:0][TIME_W-1:0] slot_t;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  logic [7:0]        m_pix [MC][MR];
  logic [TIME_W-1:0] m_t   [MC][MR];
  bit                m_u   [MC][MR];

  sp_matrix #(.MCOLS(MC), .MROWS(MR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string where);
    checks++;
    for (int c = 0; c < MC; c++)
      for (int r = 0; r < MR; r++) begin
        for (int i = 0; i < 8; i++)
          if (pix[c*2 + i/4][r*4 + i%4] != m_pix[c][r][i]) begin
            failures++;
            $display("%s: pixel %0d of slot (%0d,%0d) is %0b", where, i, c, r, pix[c*2 + i/4][r*4 + i%4]);
          end
        if (m_u[c][r] && slot_t[c][r] != m_t[c][r]) begin
          failures++;
          $display("%s: time of slot (%0d,%0d) %0d expected %0d", where, c, r, slot_t[c][r], m_t[c][r]);
        end
      end
  endtask

  initial begin
    sp = '0; alloc_col = '0; alloc_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      int oc, orr;
      @(negedge clk);
      checks++;
      if (used) begin failures++; $display("matrix not empty at round %0d", round); end
      oc = $urandom_range(0, 187); orr = $urandom_range(0, 125);
      for (int c = 0; c < MC; c++) for (int r = 0; r < MR; r++) begin m_pix[c][r] = 0; m_u[c][r] = 0; end
      // allocate with a first SP in_win the window
      sp = sp_word_t'({$urandom, $urandom});
      sp.col = COL_W'(oc + $urandom_range(0, MC - 1));
      sp.row = ROW_W'(orr + $urandom_range(0, MR - 1));
      alloc_col = COL_W'(oc); alloc_row = ROW_W'(orr);
      alloc = 1;
      m_pix[int'(sp.col) - oc][int'(sp.row) - orr] = sp.pix;
      m_t[int'(sp.col) - oc][int'(sp.row) - orr]   = sp.t;
      m_u[int'(sp.col) - oc][int'(sp.row) - orr]   = 1;
      @(posedge clk); #1 alloc = 0;
      checks++;
      if (!used || org_col != COL_W'(oc) || org_row != ROW_W'(orr)) begin
        failures++; $display("allocation did not take");
      end
      compare("after alloc");
      for (int k = 0; k < 40; k++) begin
        int dc, dr;
        bit in_win;
        @(negedge clk);
        dc = $urandom_range(0, 8) - 2; dr = $urandom_range(0, 6) - 2;
        sp = sp_word_t'({$urandom, $urandom});
        sp.col = COL_W'(oc + dc); sp.row = ROW_W'(orr + dr);
        in_win = (oc + dc >= oc) && (oc + dc < oc + MC) && (orr + dr >= orr) && (orr + dr < orr + MR)
                 && (oc + dc < SP_COLS) && (orr + dr < SP_ROWS);
        wr = 1;
        #1;
        checks++;
        if (hit != in_win) begin
          failures++; $display("SP (%0d,%0d) vs origin (%0d,%0d): hit %0b", sp.col, sp.row, oc, orr, hit);
        end
        if (in_win) begin
          hits++;
          m_pix[dc][dr] |= sp.pix;
          if (!m_u[dc][dr]) begin m_t[dc][dr] = sp.t; m_u[dc][dr] = 1; end
        end else misses++;
        @(posedge clk); #1 wr = 0;
        compare("after write");
      end
      @(negedge clk);
      clear = 1;
      @(posedge clk); #1 clear = 0;
      checks++;
      if (used || pix != '0) begin failures++; $display("clear did not empty the matrix"); end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
