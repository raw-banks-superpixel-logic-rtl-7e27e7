// sp_cache -- the SP cache: a first-in first-out buffer of non-isolated SPs.
//
// Non-isolated SPs of a raw bank wait here until the distribution line feeds
// them, one per clock cycle, to the reading matrices.  The source names the
// cache but not its organisation: this is a plain synchronous FIFO over a
// DEPTH-entry memory array, with first-word fall-through (rd_entry shows the
// oldest entry whenever rd_valid is high) and a registered occupancy count.
//
// Interface: wr_valid/wr_ready/wr_entry in, rd_valid/rd_ready/rd_entry out.
// A write and a read may happen in the same cycle.  Synchronous active-low
// reset empties the buffer.  DEPTH must be a power of two.
module sp_cache
  import sp_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  cache_entry_t wr_entry,
  output logic         rd_valid,
  input  logic         rd_ready,
  output cache_entry_t rd_entry,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  cache_entry_t  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign wr_ready = (level != (AW + 1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_entry = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_entry;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      level <= level + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    level <= (AW + 1)'(DEPTH));

endmodule
