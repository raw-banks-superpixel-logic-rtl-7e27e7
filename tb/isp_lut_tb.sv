// isp_lut_tb -- exhaustive check of the 8-bit isolated-SP table.
//
// For all 256 pixel patterns the testbench labels the 2 x 4 pixel block with a
// flood fill, orders the groups by their lowest pixel number (x * 4 + y) and
// compares the group count and each rounded centroid with the table entry.
module isp_lut_tb;
  import sp_pkg::*;
  import ref_pkg::*;

  logic [7:0] pattern;
  isp_entry_t entry;
  int checks = 0, failures = 0;

  isp_lut dut (.pattern(pattern), .entry(entry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      grid_t g, done, m;
      int n, ecx[2], ecy[2];
      for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) begin g[x][y] = 0; done[x][y] = 0; end
      for (int i = 0; i < 8; i++) g[i / 4][i % 4] = p[i];
      n = 0;
      for (int i = 0; i < 8; i++)
        if (g[i / 4][i % 4] && !done[i / 4][i % 4]) begin
          int sx, sy, c;
          sx = 0; sy = 0; c = 0;
          flood(g, 2, 4, i / 4, i % 4, m);
          for (int x = 0; x < 2; x++) for (int y = 0; y < 4; y++)
            if (m[x][y]) begin sx += x; sy += y; c++; done[x][y] = 1; end
          if (n < 2) begin ecx[n] = rmean(sx, c); ecy[n] = rmean(sy, c); end
          n++;
        end
      pattern = 8'(p);
      #1;
      checks++;
      if (int'(entry.n) != n) begin
        failures++;
        $display("pattern %02h: %0d clusters, expected %0d", p, entry.n, n);
      end
      for (int k = 0; k < n && k < 2; k++) begin
        checks++;
        if (int'(entry.c[k].cx) != ecx[k] || int'(entry.c[k].cy) != ecy[k]) begin
          failures++;
          $display("pattern %02h cluster %0d: (%0d,%0d) expected (%0d,%0d)", p, k,
                   entry.c[k].cx, entry.c[k].cy, ecx[k], ecy[k]);
        end
      end
    end
    // Pattern 1 (pixel 0 alone, lower left) and 255 (full SP), spelled out.
    pattern = 8'h01; #1; checks++;
    if (entry.n != 2'd1 || entry.c[0].cx != 0 || entry.c[0].cy != 0) failures++;
    pattern = 8'hFF; #1; checks++;
    if (entry.n != 2'd1 || entry.c[0].cx != 4 || entry.c[0].cy != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
