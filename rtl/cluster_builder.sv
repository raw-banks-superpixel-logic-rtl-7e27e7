// cluster_builder -- seed search, cluster candidates and topology flags for
// one reading matrix; one cluster per clock cycle.
//
// Seed rule.  A pixel (x, y) of the matrix is a seed when it is active and its
// five lower-left neighbours (x-1, y+1), (x-1, y), (x-1, y-1), (x, y-1) and
// (x+1, y-1) are all inactive, so every cluster has its seed at its lower-left
// end.  A cluster that runs diagonally up-left to down-right, with (x, y+1) and
// (x+1, y) active but (x, y) empty, has no such pixel; the off-diagonal pattern
// therefore also makes the empty position (x, y) a seed when those two pixels
// are active and the same five neighbours are inactive.  Both patterns are the
// source's; pixels outside the matrix count as inactive.
//
// Candidate and flags.  The 3 x 3 square whose lower-left pixel is the seed is
// the cluster candidate; cc_lut gives the seed's cluster inside it and its
// centroid.  The cluster is self-contained when no active pixel of the ring
// around the square touches it, and at the edge when one of its pixels lies on
// the outermost pixel rows or columns of the matrix.  Flag codes are the
// source's ({0, self_contained, edge}); the exact tests are this design's.
// The cluster time is the time of the SP holding the seed pixel, or the pixel
// above it for the off-diagonal pattern.
//
// Timing.  start (one cycle) snapshots all seeds of pix; pix, slot_t and the
// origin must then stay still until done.  The lowest-numbered pending seed
// (numbered x * height + y) is turned into a cluster each cycle, registered on
// out_valid/out_cl: the k-th cluster (k = 1..n) is registered k clock edges
// after the edge that samples start, and done is registered at edge n + 1.
module cluster_builder
  import sp_pkg::*;
#(
  parameter int unsigned MCOLS = 5,
  parameter int unsigned MROWS = 3
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        start,
  input  logic [MCOLS*SP_PX_X-1:0][MROWS*SP_PX_Y-1:0] pix,
  input  logic [MCOLS-1:0][MROWS-1:0][TIME_W-1:0]     slot_t,
  input  logic [COL_W-1:0]                            org_col,
  input  logic [ROW_W-1:0]                            org_row,
  output logic                                        busy,
  output logic                                        done,
  output logic                                        out_valid,
  output cluster_t                                    out_cl,
  output logic                                        out_diag
);

  localparam int PW = int'(MCOLS * SP_PX_X);  // matrix width in pixels
  localparam int PH = int'(MROWS * SP_PX_Y);  // matrix height in pixels
  localparam int NP = PW * PH;

  function automatic logic px(input logic [MCOLS*SP_PX_X-1:0][MROWS*SP_PX_Y-1:0] p,
                              input int x, input int y);
    if (x < 0 || y < 0 || x >= PW || y >= PH) return 1'b0;
    return p[x][y];
  endfunction

  // ---------------------------------------------------------- seed search
  logic [NP-1:0] seed_std, seed_diag;
  always_comb begin
    for (int x = 0; x < PW; x++)
      for (int y = 0; y < PH; y++) begin
        logic quiet;
        quiet = !px(pix, x-1, y+1) && !px(pix, x-1, y) && !px(pix, x-1, y-1)
             && !px(pix, x, y-1) && !px(pix, x+1, y-1);
        seed_std[x*PH+y]  = quiet && px(pix, x, y);
        seed_diag[x*PH+y] = quiet && !px(pix, x, y) && px(pix, x, y+1) && px(pix, x+1, y);
      end
  end

  logic [NP-1:0] pending, diag_pending;
  logic          sel_found;
  int            sel;

  always_comb begin
    sel_found = 1'b0;
    sel       = 0;
    for (int i = NP - 1; i >= 0; i--)
      if (pending[i]) begin
        sel_found = 1'b1;
        sel       = i;
      end
  end

  // --------------------------------------------------- candidate and flags
  int         sx, sy;
  logic [8:0] cand;
  cc_entry_t  entry;
  logic       self_cont, at_edge;
  logic       is_diag;

  assign sx      = sel / PH;
  assign sy      = sel % PH;
  assign is_diag = diag_pending[sel];

  always_comb begin
    for (int k = 0; k < 9; k++) cand[k] = px(pix, sx + k / 3, sy + k % 3);
  end

  cc_lut u_lut (
    .cand  (cand),
    .entry (entry)
  );

  always_comb begin
    self_cont = 1'b1;
    at_edge   = 1'b0;
    for (int k = 0; k < 9; k++) begin
      if (entry.mask[k] && (sx + k / 3 == 0 || sy + k % 3 == 0 ||
                            sx + k / 3 == PW - 1 || sy + k % 3 == PH - 1))
        at_edge = 1'b1;
      for (int i = -1; i <= 1; i++)
        for (int j = -1; j <= 1; j++)
          if (entry.mask[k] && (k / 3 + i < 0 || k / 3 + i > 2 || k % 3 + j < 0 || k % 3 + j > 2)
              && px(pix, sx + k / 3 + i, sy + k % 3 + j))
            self_cont = 1'b0;
    end
  end

  logic [TIME_W-1:0] seed_t;
  always_comb begin
    int ty;
    ty     = is_diag ? sy + 1 : sy;
    seed_t = slot_t[sx / int'(SP_PX_X)][ty / int'(SP_PX_Y)];
  end

  logic [POS_W-1:0] x_base, y_base;
  assign x_base = (POS_W'({org_col, 1'b0}) + POS_W'(sx)) << FRAC;
  assign y_base = (POS_W'({org_row, 2'b00}) + POS_W'(sy)) << FRAC;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      pending      <= '0;
      diag_pending <= '0;
      out_valid    <= 1'b0;
      out_cl       <= '0;
      out_diag     <= 1'b0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (start) begin
        busy         <= 1'b1;
        pending      <= seed_std | seed_diag;
        diag_pending <= seed_diag;
      end else if (busy) begin
        if (sel_found) begin
          pending[sel]   <= 1'b0;
          out_valid      <= 1'b1;
          out_diag       <= is_diag;
          out_cl.x       <= x_base + POS_W'(entry.cx);
          out_cl.y       <= y_base + POS_W'(entry.cy);
          out_cl.t       <= seed_t;
          out_cl.flag    <= topo_flag_t'({1'b0, self_cont, at_edge});
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
