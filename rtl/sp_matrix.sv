// sp_matrix -- one reading matrix of MCOLS x MROWS SPs.
//
// The clustering works on small windows of the sensor: 5 x 3 SPs, that is
// 10 x 12 pixels, in the source.  A matrix is empty until it is allocated; the
// allocating SP fixes the window's lower-left SP (origin) and is stored at once.
// From then on the matrix claims every SP of the distribution line that falls in
// its window (hit) and ORs its pixels into the 10 x 12 pixel array.  It keeps,
// per SP slot, the time of the first SP written there.  clear empties it again.
// Window size and the fill-as-they-pass principle are the source's; the origin
// rule lives in matrix_pool and the time keeping is this design's choice.
//
// Interface: hit is combinational from sp and the stored origin.  alloc loads
// origin (alloc_col, alloc_row) and writes sp; wr writes sp into the existing
// window (only when hit).  pix[x][y] is pixel column x, row y of the window;
// slot_t[c][r] the time of SP slot (c, r).  Synchronous active-low reset.
module sp_matrix
  import sp_pkg::*;
#(
  parameter int unsigned MCOLS = 5,
  parameter int unsigned MROWS = 3
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     clear,
  input  logic                                     alloc,
  input  logic [COL_W-1:0]                         alloc_col,
  input  logic [ROW_W-1:0]                         alloc_row,
  input  logic                                     wr,
  input  sp_word_t                                 sp,
  output logic                                     used,
  output logic                                     hit,
  output logic [COL_W-1:0]                         org_col,
  output logic [ROW_W-1:0]                         org_row,
  output logic [MCOLS*SP_PX_X-1:0][MROWS*SP_PX_Y-1:0] pix,
  output logic [MCOLS-1:0][MROWS-1:0][TIME_W-1:0]  slot_t
);

  logic [MCOLS-1:0][MROWS-1:0] slot_used;
  logic [COL_W:0]              dcol;  // one extra bit: negative offsets wrap high
  logic [ROW_W:0]              drow;
  logic [COL_W-1:0]            base_col;
  logic [ROW_W-1:0]            base_row;

  // hit tests the stored window only; the write position is taken from the
  // origin being loaded (alloc) or the stored one.
  logic [COL_W:0] hcol;
  logic [ROW_W:0] hrow;
  logic           in_win;
  assign hcol     = {1'b0, sp.col} - {1'b0, org_col};
  assign hrow     = {1'b0, sp.row} - {1'b0, org_row};
  assign hit      = used && (hcol < (COL_W + 1)'(MCOLS)) && (hrow < (ROW_W + 1)'(MROWS));

  assign base_col = alloc ? alloc_col : org_col;
  assign base_row = alloc ? alloc_row : org_row;
  assign dcol     = {1'b0, sp.col} - {1'b0, base_col};
  assign drow     = {1'b0, sp.row} - {1'b0, base_row};
  assign in_win   = (dcol < (COL_W + 1)'(MCOLS)) && (drow < (ROW_W + 1)'(MROWS));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      used      <= 1'b0;
      org_col   <= '0;
      org_row   <= '0;
      pix       <= '0;
      slot_used <= '0;
      slot_t    <= '0;
    end else if (alloc || (wr && hit)) begin
      if (alloc) begin
        used      <= 1'b1;
        org_col   <= alloc_col;
        org_row   <= alloc_row;
      end
      for (int c = 0; c < int'(MCOLS); c++)
        for (int r = 0; r < int'(MROWS); r++)
          if (in_win && dcol == (COL_W + 1)'(c) && drow == (ROW_W + 1)'(r)) begin
            for (int i = 0; i < 8; i++)
              pix[c*SP_PX_X + i/SP_PX_Y][r*SP_PX_Y + i%SP_PX_Y] <=
                sp.pix[i] | ((alloc) ? 1'b0 : pix[c*SP_PX_X + i/SP_PX_Y][r*SP_PX_Y + i%SP_PX_Y]);
            if (alloc || !slot_used[c][r]) slot_t[c][r] <= sp.t;
            slot_used[c][r] <= 1'b1;
          end else if (alloc) begin
            for (int i = 0; i < 8; i++)
              pix[c*SP_PX_X + i/SP_PX_Y][r*SP_PX_Y + i%SP_PX_Y] <= 1'b0;
            slot_used[c][r] <= 1'b0;
          end
    end
  end

endmodule
