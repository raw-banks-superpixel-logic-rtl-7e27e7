// isp_lut -- the 8-bit look-up table of the isolated-SP path.
//
// An isolated SP has no active pixel in any neighbouring SP, so all of its
// clusters lie inside its own 2 x 4 pixels and can be read from a table
// addressed by the 8-bit pixel pattern (256 entries).  Each entry gives the
// number of clusters (at most two: in a 2-pixel-wide block, clusters that do not
// touch are split by an empty pixel row) and the local centroid of each, with
// cluster 0 being the one that holds the lowest-numbered active pixel.
// The table is the source's idea; its contents are computed at elaboration from
// the 8-neighbourhood rule by sp_pkg::isp_lut_entry, one constant per address.
//
// Interface: purely combinational, pattern in, entry out.
module isp_lut
  import sp_pkg::*;
(
  input  logic [7:0] pattern,
  output isp_entry_t entry
);

  isp_entry_t rom [256];

  for (genvar a = 0; a < 256; a++) begin : g_rom
    localparam isp_entry_t ENTRY = isp_lut_entry(8'(a));
    assign rom[a] = ENTRY;
  end

  assign entry = rom[pattern];

endmodule
