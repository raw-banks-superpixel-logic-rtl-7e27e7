// rb_cluster_top -- clustering of VELO pixel hits straight from raw banks.
//
// A raw bank lists the hit SuperPixels (2 x 4 pixel groups) of one sensor as
// 36-bit words.  Most clusters lie inside a single SP with no active neighbour;
// the HINT bit of the word marks those.  rb_dispatch sends such an isolated SP
// to isp_clusterer, which reads its clusters from an 8-bit look-up table in one
// cycle.  Every other SP goes through the SP cache (sp_cache) to matrix_pool,
// which gathers neighbouring SPs into 5 x 3-SP reading matrices, searches them
// for seed pixels, looks each 3 x 3 cluster candidate up in a 9-bit table and
// emits flagged clusters.  When no matrix is free, the SP is clustered alone by a
// second isp_clusterer and flagged Overflow.  The two-path structure, the
// tables, the matrix size and the flags are the source's; buffer depths, matrix
// count and the overflow route are this design's choices.
//
// Interface: input stream in_valid/in_ready/in_word/in_last (in_last on the
// final word of each raw bank).  Three cluster outputs, without back-pressure:
// isp_valid/isp_cl (two lanes, isolated SPs, one cycle after the word is
// accepted), ovf_valid/ovf_cl (two lanes, Overflow), nsp_valid/nsp_cl (one
// cluster per cycle from the matrices, after the raw bank's end has reached
// the pool).  event_done pulses when a raw bank's matrices are all read out.
// nsp_diag marks clusters found by the off-diagonal seed pattern; ev_alloc,
// ev_join and ev_ovf pulse on each matrix allocation, SP joining an open matrix
// and overflow; cache_level is the SP cache occupancy.
module rb_cluster_top
  import sp_pkg::*;
#(
  parameter int unsigned CACHE_DEPTH = 512,
  parameter int unsigned NMAT        = 16,
  parameter int unsigned MCOLS       = 5,
  parameter int unsigned MROWS       = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  sp_word_t       in_word,
  input  logic           in_last,
  output logic [1:0]     isp_valid,
  output cluster_t [1:0] isp_cl,
  output logic [1:0]     ovf_valid,
  output cluster_t [1:0] ovf_cl,
  output logic           nsp_valid,
  output cluster_t       nsp_cl,
  output logic           nsp_diag,
  output logic           event_done,
  output logic           ev_alloc,
  output logic           ev_join,
  output logic           ev_ovf,
  output logic [$clog2(CACHE_DEPTH):0] cache_level
);

  logic         d_isp_valid;
  sp_word_t     d_isp_sp;
  logic         c_wr_valid, c_wr_ready, c_rd_valid, c_rd_ready;
  cache_entry_t c_wr_entry, c_rd_entry;
  logic         p_ovf_valid;
  sp_word_t     p_ovf_sp;

  rb_dispatch u_dispatch (
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_word     (in_word),
    .in_last     (in_last),
    .isp_valid   (d_isp_valid),
    .isp_sp      (d_isp_sp),
    .cache_valid (c_wr_valid),
    .cache_ready (c_wr_ready),
    .cache_entry (c_wr_entry)
  );

  isp_clusterer u_isp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (d_isp_valid),
    .in_sp     (d_isp_sp),
    .in_ovf    (1'b0),
    .out_valid (isp_valid),
    .out_cl    (isp_cl)
  );

  sp_cache #(.DEPTH(CACHE_DEPTH)) u_cache (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (c_wr_valid),
    .wr_ready (c_wr_ready),
    .wr_entry (c_wr_entry),
    .rd_valid (c_rd_valid),
    .rd_ready (c_rd_ready),
    .rd_entry (c_rd_entry),
    .level    (cache_level)
  );

  matrix_pool #(.NMAT(NMAT), .MCOLS(MCOLS), .MROWS(MROWS)) u_pool (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (c_rd_valid),
    .in_ready   (c_rd_ready),
    .in_entry   (c_rd_entry),
    .ovf_valid  (p_ovf_valid),
    .ovf_sp     (p_ovf_sp),
    .out_valid  (nsp_valid),
    .out_cl     (nsp_cl),
    .out_diag   (nsp_diag),
    .event_done (event_done),
    .ev_alloc   (ev_alloc),
    .ev_join    (ev_join),
    .ev_ovf     (ev_ovf)
  );

  isp_clusterer u_ovf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p_ovf_valid),
    .in_sp     (p_ovf_sp),
    .in_ovf    (1'b1),
    .out_valid (ovf_valid),
    .out_cl    (ovf_cl)
  );

endmodule
