// rb_dispatch -- splits a raw bank by the HINT bit of each SP word.
//
// HINT = 0 marks an isolated SP: its clusters can be read from the 8-bit LUT at
// once, so the word goes to the isolated-SP path.  HINT = 1 marks an SP with
// active neighbours: it is written to the SP cache for the matrix path.  This
// routing is the source's.  The last word of a raw bank (in_last) always writes
// a cache entry with eoe = 1, with the SP in it when HINT = 1 and as a bare
// marker when HINT = 0, so that the matrix path learns where the bank ends; the
// marker is this design's choice.
//
// Interface: valid/ready input stream of sp_word_t with in_last; the isolated
// path has no back-pressure (isp_valid/isp_sp); the cache port is valid/ready.
// A word that needs the cache waits while cache_ready is low; a plain isolated
// word never waits.  Purely combinational.
module rb_dispatch
  import sp_pkg::*;
(
  input  logic         in_valid,
  output logic         in_ready,
  input  sp_word_t     in_word,
  input  logic         in_last,
  output logic         isp_valid,
  output sp_word_t     isp_sp,
  output logic         cache_valid,
  input  logic         cache_ready,
  output cache_entry_t cache_entry
);

  logic needs_cache;
  assign needs_cache = in_word.hint || in_last;

  assign in_ready    = needs_cache ? cache_ready : 1'b1;
  assign isp_valid   = in_valid && in_ready && !in_word.hint;
  assign isp_sp      = in_word;
  assign cache_valid = in_valid && needs_cache;

  always_comb begin
    cache_entry.eoe    = in_last;
    cache_entry.has_sp = in_word.hint;
    cache_entry.sp     = in_word;
  end

endmodule
