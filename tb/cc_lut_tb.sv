// cc_lut_tb -- exhaustive check of the 9-bit cluster-candidate table.
//
// For all 512 candidates the testbench floods the 3 x 3 grid from the seed
// pixel (bit 0), or from bit 1, or bit 3, when the lower positions are empty,
// and compares the group's pixels and rounded centroid with the entry.
module cc_lut_tb;
  import sp_pkg::*;
  import ref_pkg::*;

  logic [8:0] cand;
  cc_entry_t  entry;
  int checks = 0, failures = 0;

  cc_lut dut (.cand(cand), .entry(entry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 512; p++) begin
      grid_t g, m;
      int sx, sy, c;
      logic [8:0] emask;
      sx = 0; sy = 0; c = 0;
      for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) begin g[x][y] = 0; m[x][y] = 0; end
      for (int k = 0; k < 9; k++) g[k / 3][k % 3] = p[k];
      if (p[0])      flood(g, 3, 3, 0, 0, m);
      else if (p[1]) flood(g, 3, 3, 0, 1, m);
      else if (p[3]) flood(g, 3, 3, 1, 0, m);
      emask = '0;
      for (int k = 0; k < 9; k++)
        if (m[k / 3][k % 3]) begin emask[k] = 1; sx += k / 3; sy += k % 3; c++; end
      cand = 9'(p);
      #1;
      checks++;
      if (entry.mask != emask) begin
        failures++;
        $display("cand %03h: mask %03h expected %03h", p, entry.mask, emask);
      end
      if (c > 0) begin
        checks++;
        if (int'(entry.cx) != rmean(sx, c) || int'(entry.cy) != rmean(sy, c)) begin
          failures++;
          $display("cand %03h: (%0d,%0d) expected (%0d,%0d)", p, entry.cx, entry.cy,
                   rmean(sx, c), rmean(sy, c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
