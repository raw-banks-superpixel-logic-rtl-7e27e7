// sp_pkg -- shared types, constants and look-up-table builders of the
// raw-bank SuperPixel clustering engine.
//
// A SuperPixel (SP) is a group of 2 x 4 neighbouring pixels of a VELO pixel
// sensor, 192 x 128 SPs per sensor.  Inside an SP the pixel bit i sits at
// column x = i / 4 and row y = i % 4: bits 0..3 are the left column from bottom
// to top, bits 4..7 the right column.  A raw bank is a list of 36-bit SP words,
// most significant field first: hint (1), time (12), SP column (8), SP row (7),
// pixel pattern (8).  The field widths and order, the sensor size and the pixel
// numbering follow the source description; which of the 8- and 7-bit fields is
// the column is this design's reading (192 columns need 8 bits, 128 rows need 7).
//
// A cluster leaves the engine as an absolute centroid in pixel units with FRAC
// fractional bits (x = SP column * 2 + local column, y = SP row * 4 + local row),
// the time of its SP and a 3-bit topology flag.  The flag codes are the source's;
// the centroid format and the rounding (to nearest, ties up) are this design's.
//
// The look-up-table builders below are constant functions: the LUT modules call
// them once per address at elaboration, so the tables are ROMs computed from a
// formula instead of being stored as data.  Pixels are joined into a cluster when
// they touch by a side or a corner (8-neighbourhood).
package sp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned SP_COLS = 192;  // SPs per sensor along x
  localparam int unsigned SP_ROWS = 128;  // SPs per sensor along y
  localparam int unsigned SP_PX_X = 2;    // pixels per SP along x
  localparam int unsigned SP_PX_Y = 4;    // pixels per SP along y
  localparam int unsigned TIME_W  = 12;
  localparam int unsigned COL_W   = 8;
  localparam int unsigned ROW_W   = 7;
  localparam int unsigned SP_W    = 36;
  localparam int unsigned FRAC    = 3;    // fractional bits of a centroid
  localparam int unsigned PXC_W   = 9;    // integer bits of a pixel coordinate
  localparam int unsigned POS_W   = PXC_W + FRAC;

  // ---------------------------------------------------------------- words
  typedef struct packed {
    logic              hint;  // 0: isolated SP, 1: SP with active neighbours
    logic [TIME_W-1:0] t;
    logic [COL_W-1:0]  col;
    logic [ROW_W-1:0]  row;
    logic [7:0]        pix;
  } sp_word_t;

  // One SP-cache entry: an SP, or only an end-of-raw-bank marker.
  typedef struct packed {
    logic     eoe;     // last entry of the raw bank
    logic     has_sp;  // sp holds a non-isolated SP
    sp_word_t sp;
  } cache_entry_t;

  typedef enum logic [2:0] {
    FLAG_NSC_NOEDGE = 3'b000,  // not self-contained, not at matrix edge
    FLAG_NSC_EDGE   = 3'b001,  // not self-contained, at matrix edge
    FLAG_SC_NOEDGE  = 3'b010,  // self-contained, not at matrix edge
    FLAG_SC_EDGE    = 3'b011,  // self-contained, at matrix edge
    FLAG_OVERFLOW   = 3'b100,  // no matrix free: clustered as a lone SP
    FLAG_ISOLATED   = 3'b101   // isolated SP, clustered by the 8-bit LUT
  } topo_flag_t;

  typedef struct packed {
    logic [POS_W-1:0]  x;     // centroid column, FRAC fractional bits
    logic [POS_W-1:0]  y;     // centroid row, FRAC fractional bits
    logic [TIME_W-1:0] t;
    topo_flag_t        flag;
  } cluster_t;

  // 8-bit LUT entry: up to two clusters inside one SP.
  typedef struct packed {
    logic [FRAC:0]   cx;  // local centroid column 0..1
    logic [FRAC+1:0] cy;  // local centroid row 0..3
  } isp_cent_t;

  typedef struct packed {
    logic [1:0]          n;  // number of clusters, 0..2
    isp_cent_t [1:0]     c;  // c[0] holds the lowest-numbered pixel
  } isp_entry_t;

  // 9-bit LUT entry: the cluster of the seed inside a 3x3 cluster candidate.
  // Candidate bit k holds the pixel at dx = k / 3, dy = k % 3 from the
  // candidate's lower-left corner.
  typedef struct packed {
    logic [8:0]      mask;  // candidate pixels that form the seed's cluster
    logic [FRAC+1:0] cx;    // local centroid column 0..2
    logic [FRAC+1:0] cy;    // local centroid row 0..2
  } cc_entry_t;

  // ------------------------------------------------------- LUT builders
  // Rounded fixed-point mean: round(sum * 2^FRAC / n).
  function automatic int unsigned fx_mean(input int unsigned sum, input int unsigned n);
    if (n == 0) return 0;
    return (sum * (2 << FRAC) + n) / (2 * n);
  endfunction

  // Grow a set of pixels of a W-column, H-row block by one 8-neighbourhood
  // step, inside the set of active pixels. Bit i is pixel (i / H, i % H).
  function automatic logic [15:0] grow(input logic [15:0] m, input logic [15:0] act,
                                       input int unsigned w, input int unsigned h);
    logic [15:0] r;
    r = m;
    for (int unsigned i = 0; i < w * h; i++)
      for (int unsigned j = 0; j < w * h; j++) begin
        int dx, dy;
        dx = int'(i / h) - int'(j / h);
        dy = int'(i % h) - int'(j % h);
        if (m[j] && act[i] && dx >= -1 && dx <= 1 && dy >= -1 && dy <= 1) r[i] = 1'b1;
      end
    return r;
  endfunction

  // Connected component of act that holds pixel start.
  function automatic logic [15:0] component(input logic [15:0] act, input int unsigned start,
                                            input int unsigned w, input int unsigned h);
    logic [15:0] m;
    m = '0;
    m[start] = act[start];
    for (int unsigned k = 0; k < w * h; k++) m = grow(m, act, w, h);
    return m;
  endfunction

  // Sum of the column (axis 0) or row (axis 1) numbers of a pixel set, or
  // its pixel count (axis 2).
  function automatic int unsigned msum(input logic [15:0] m, input int unsigned w,
                                       input int unsigned h, input int unsigned axis);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < w * h; i++)
      if (m[i]) s += (axis == 0) ? i / h : (axis == 1) ? i % h : 1;
    return s;
  endfunction

  function automatic isp_entry_t isp_lut_entry(input logic [7:0] pat);
    isp_entry_t  e;
    logic [15:0] rest, m;
    int unsigned sx, sy, n;
    e    = '0;
    m    = '0;
    rest = {8'h00, pat};
    for (int unsigned k = 0; k < 2; k++) begin
      for (int unsigned i = 8; i > 0; i--)
        if (rest[i-1]) begin
          m = component(rest, i - 1, SP_PX_X, SP_PX_Y);
        end
      if (rest != '0) begin
        sx = msum(m, SP_PX_X, SP_PX_Y, 0);
        sy = msum(m, SP_PX_X, SP_PX_Y, 1);
        n  = msum(m, SP_PX_X, SP_PX_Y, 2);
        e.c[k].cx = (FRAC + 1)'(fx_mean(sx, n));
        e.c[k].cy = (FRAC + 2)'(fx_mean(sy, n));
        e.n       = e.n + 2'd1;
        rest      = rest & ~m;
      end
    end
    return e;
  endfunction

  // The seed's cluster starts at candidate pixel 0 (an active seed) or, for
  // the off-diagonal pattern with an empty seed position, at pixel 1.
  function automatic cc_entry_t cc_lut_entry(input logic [8:0] pat);
    cc_entry_t   e;
    logic [15:0] m;
    int unsigned sx, sy, n;
    e = '0;
    m = '0;
    if (pat[0])      m = component({7'h00, pat}, 0, 3, 3);
    else if (pat[1]) m = component({7'h00, pat}, 1, 3, 3);
    else if (pat[3]) m = component({7'h00, pat}, 3, 3, 3);
    sx = msum(m, 3, 3, 0);
    sy = msum(m, 3, 3, 1);
    n  = msum(m, 3, 3, 2);
    e.mask = m[8:0];
    e.cx   = (FRAC + 2)'(fx_mean(sx, n));
    e.cy   = (FRAC + 2)'(fx_mean(sy, n));
    return e;
  endfunction

endpackage
