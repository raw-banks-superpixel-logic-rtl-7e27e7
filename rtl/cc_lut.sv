// cc_lut -- the 9-bit look-up table of the non-isolated-SP path.
//
// A cluster candidate is the 3 x 3 pixel square whose lower-left pixel is a
// seed.  Candidate bit k is the pixel dx = k / 3 columns right and dy = k % 3
// rows above the seed, so the bits read
//     2 5 8
//     1 4 7
//     0 3 6
// as in the source.  The entry gives the pixels of the seed's cluster within the
// candidate (8-neighbourhood, grown from bit 0, or from bit 1 when bit 0 is
// empty, which is the off-diagonal pattern) and their rounded centroid relative
// to the seed.  The 512 entries are constants computed at elaboration by
// sp_pkg::cc_lut_entry; which fields an entry holds is this design's choice.
//
// Interface: purely combinational, candidate in, entry out.
module cc_lut
  import sp_pkg::*;
(
  input  logic [8:0] cand,
  output cc_entry_t  entry
);

  cc_entry_t rom [512];

  for (genvar a = 0; a < 512; a++) begin : g_rom
    localparam cc_entry_t ENTRY = cc_lut_entry(9'(a));
    assign rom[a] = ENTRY;
  end

  assign entry = rom[cand];

endmodule
