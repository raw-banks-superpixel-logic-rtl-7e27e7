// isp_clusterer -- clusters of one lone SP per clock cycle.
//
// The SP's 8-bit pixel pattern addresses the isp_lut; the local centroids it
// returns are offset by the SP's pixel origin (column * 2, row * 4) to give
// absolute centroids in pixel units with sp_pkg::FRAC fractional bits.  Up to
// two clusters come out side by side, each with its own valid bit, one clock
// cycle after the SP is presented, and each carries the SP's time.  Reading the
// clusters of an isolated SP straight from a table is the source's method.
//
// The same module serves SPs that could not be placed in a reading matrix
// (in_ovf = 1): they are clustered as if they were alone and flagged Overflow
// instead of Isolated.  That use is this design's choice.
//
// Interface: in_valid/in_sp/in_ovf (no back-pressure, one SP per cycle),
// out_valid[k]/out_cl[k] for cluster k, registered.  Synchronous active-low reset.
module isp_clusterer
  import sp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  sp_word_t       in_sp,
  input  logic           in_ovf,
  output logic [1:0]     out_valid,
  output cluster_t [1:0] out_cl
);

  isp_entry_t entry;

  isp_lut u_lut (
    .pattern (in_sp.pix),
    .entry   (entry)
  );

  logic [POS_W-1:0] x0, y0;
  assign x0 = POS_W'({in_sp.col, 1'b0}) << FRAC;
  assign y0 = POS_W'({in_sp.row, 2'b00}) << FRAC;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_cl    <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        out_valid[k]   <= in_valid && (entry.n > 2'(k));
        out_cl[k].x    <= x0 + POS_W'(entry.c[k].cx);
        out_cl[k].y    <= y0 + POS_W'(entry.c[k].cy);
        out_cl[k].t    <= in_sp.t;
        out_cl[k].flag <= in_ovf ? FLAG_OVERFLOW : FLAG_ISOLATED;
      end
    end
  end

endmodule
