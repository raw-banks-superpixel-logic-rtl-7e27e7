// matrix_pool -- the SP distribution line, a pool of NMAT reading matrices and
// their readout.
//
// Fill phase.  Entries come from the SP cache one per clock cycle.  Every
// matrix compares the SP with its window; the SP is written into the lowest-
// numbered matrix that claims it.  When none does, the lowest-numbered empty
// matrix is allocated with a window placed so that the SP sits in its middle
// column and middle row, shifted inwards at the sensor border.  When no matrix
// is empty either, the SP leaves on ovf_valid/ovf_sp to be clustered on its own
// and flagged Overflow.  Filling matrices as SPs pass on a line, and opening a
// new matrix for an SP no matrix holds, follow the source's figure; the centred
// placement, the first-claim rule and the overflow route are this design's.
//
// Readout phase.  The cache entry with eoe = 1 ends the raw bank: the pool stops
// reading the cache and hands the used matrices one after another to the
// cluster_builder, which emits one cluster per cycle on out_valid/out_cl.  Then
// all matrices are cleared, event_done pulses, and filling starts again.
//
// Interface: in_valid/in_ready/in_entry from the cache (in_ready is high in the
// fill phase only); ovf_valid/ovf_sp; out_valid/out_cl/out_diag; single-cycle
// event pulses ev_alloc, ev_join and ev_ovf for the fill decisions.
module matrix_pool
  import sp_pkg::*;
#(
  parameter int unsigned NMAT  = 16,
  parameter int unsigned MCOLS = 5,
  parameter int unsigned MROWS = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  cache_entry_t in_entry,
  output logic         ovf_valid,
  output sp_word_t     ovf_sp,
  output logic         out_valid,
  output cluster_t     out_cl,
  output logic         out_diag,
  output logic         event_done,
  output logic         ev_alloc,
  output logic         ev_join,
  output logic         ev_ovf
);

  localparam int unsigned IW = $clog2(NMAT + 1);
  localparam logic [COL_W-1:0] MAX_OC = COL_W'(SP_COLS - MCOLS);
  localparam logic [ROW_W-1:0] MAX_OR = ROW_W'(SP_ROWS - MROWS);

  typedef enum logic [1:0] {S_FILL, S_START, S_WAIT, S_CLEAR} state_t;
  state_t state;

  logic [NMAT-1:0] used, hit, alloc, wr;
  logic [MCOLS*SP_PX_X-1:0][MROWS*SP_PX_Y-1:0] m_pix [NMAT];
  logic [MCOLS-1:0][MROWS-1:0][TIME_W-1:0]     m_t   [NMAT];
  logic [COL_W-1:0] m_col [NMAT];
  logic [ROW_W-1:0] m_row [NMAT];
  logic [COL_W-1:0] a_col;
  logic [ROW_W-1:0] a_row;
  logic             clear_all;
  logic [IW-1:0]    idx;

  // Window origin for a newly allocated matrix: SP in the middle, clamped.
  always_comb begin
    logic [COL_W:0] c;
    logic [ROW_W:0] r;
    c = {1'b0, in_entry.sp.col} - (COL_W + 1)'(MCOLS / 2);
    r = {1'b0, in_entry.sp.row} - (ROW_W + 1)'(MROWS / 2);
    a_col = c[COL_W] ? '0 : (c[COL_W-1:0] > MAX_OC ? MAX_OC : c[COL_W-1:0]);
    a_row = r[ROW_W] ? '0 : (r[ROW_W-1:0] > MAX_OR ? MAX_OR : r[ROW_W-1:0]);
  end

  logic take;
  assign in_ready = (state == S_FILL);
  assign take     = in_valid && in_ready && in_entry.has_sp;

  // First claiming matrix, else first empty one.
  always_comb begin
    logic found;
    alloc = '0;
    wr    = '0;
    found = 1'b0;
    for (int m = 0; m < int'(NMAT); m++)
      if (!found && hit[m]) begin
        wr[m] = take;
        found = 1'b1;
      end
    for (int m = 0; m < int'(NMAT); m++)
      if (!found && !used[m]) begin
        alloc[m] = take;
        found    = 1'b1;
      end
  end

  assign ev_join   = |wr;
  assign ev_alloc  = |alloc;
  assign ev_ovf    = take && !(|hit) && (&used);
  assign ovf_valid = ev_ovf;
  assign ovf_sp    = in_entry.sp;

  for (genvar m = 0; m < NMAT; m++) begin : g_mat
    sp_matrix #(.MCOLS(MCOLS), .MROWS(MROWS)) u_mat (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear_all),
      .alloc     (alloc[m]),
      .alloc_col (a_col),
      .alloc_row (a_row),
      .wr        (wr[m]),
      .sp        (in_entry.sp),
      .used      (used[m]),
      .hit       (hit[m]),
      .org_col   (m_col[m]),
      .org_row   (m_row[m]),
      .pix       (m_pix[m]),
      .slot_t    (m_t[m])
    );
  end

  // ---------------------------------------------------------------- readout
  logic b_start, b_busy, b_done;
  logic sel_used;
  logic [MCOLS*SP_PX_X-1:0][MROWS*SP_PX_Y-1:0] s_pix;
  logic [MCOLS-1:0][MROWS-1:0][TIME_W-1:0]     s_t;
  logic [COL_W-1:0] s_col;
  logic [ROW_W-1:0] s_row;

  always_comb begin
    sel_used = 1'b0;
    s_pix    = '0;
    s_t      = '0;
    s_col    = '0;
    s_row    = '0;
    for (int m = 0; m < int'(NMAT); m++)
      if (idx == IW'(m)) begin
        sel_used = used[m];
        s_pix    = m_pix[m];
        s_t      = m_t[m];
        s_col    = m_col[m];
        s_row    = m_row[m];
      end
  end

  assign b_start   = (state == S_START) && sel_used;
  assign clear_all = (state == S_CLEAR);

  cluster_builder #(.MCOLS(MCOLS), .MROWS(MROWS)) u_build (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (b_start),
    .pix       (s_pix),
    .slot_t    (s_t),
    .org_col   (s_col),
    .org_row   (s_row),
    .busy      (b_busy),
    .done      (b_done),
    .out_valid (out_valid),
    .out_cl    (out_cl),
    .out_diag  (out_diag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_FILL;
      idx        <= '0;
      event_done <= 1'b0;
    end else begin
      event_done <= 1'b0;
      unique case (state)
        S_FILL:
          if (in_valid && in_entry.eoe) begin
            state <= S_START;
            idx   <= '0;
          end
        S_START:
          if (idx == IW'(NMAT))  state <= S_CLEAR;
          else if (sel_used)     state <= S_WAIT;
          else                   idx   <= idx + 1'b1;
        S_WAIT:
          if (b_done) begin
            state <= S_START;
            idx   <= idx + 1'b1;
          end
        S_CLEAR: begin
          state      <= S_FILL;
          event_done <= 1'b1;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  a_one_target : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ovf_valid, |alloc, |wr}));
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
    b_start |-> !b_busy);

endmodule
