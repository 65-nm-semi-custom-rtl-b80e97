// scm_latch_array: the storage array, WORDS rows of WIDTH low-leakage latches.
//
// Row r is written by its own gated clock `gclk[r]`: while it is high every
// latch of the row takes the shared write data `wdata`. Row r is read when
// `rd_en[r]` is high: its cells drive their values onto the per-column read
// bitlines (RBLs). Each bitline is a 3-state bus in silicon; here it is the
// OR of the column's cell outputs, which equals the bus value because at
// most one row is enabled. With no row enabled `rbl` reads 0. Reading is
// combinational, with no clock.
//
// RBL_SEGMENTS splits every column bitline into that many segments of
// WORDS/RBL_SEGMENTS consecutive rows, each a short 3-state bus, and joins
// the segments with a static AND-OR multiplexer selected by the segment
// holding the enabled row. Fewer cells per bitline make reads faster in
// silicon; the logic function is the same. The default of 1 (one bitline
// over all rows) is the array of the 4 kbit test chip; segmentation is the
// improvement proposed for faster reads.
module scm_latch_array #(
  parameter int unsigned WORDS        = scm_pkg::WORDS,
  parameter int unsigned WIDTH        = scm_pkg::WIDTH,
  parameter int unsigned RBL_SEGMENTS = 1
) (
  input  logic [WORDS-1:0] gclk,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WORDS-1:0] rd_en,
  output logic [WIDTH-1:0] rbl
);
  localparam int unsigned SEG_ROWS = WORDS / RBL_SEGMENTS;

  logic [WIDTH-1:0] drv     [WORDS];
  logic [WIDTH-1:0] seg_rbl [RBL_SEGMENTS];
  logic [RBL_SEGMENTS-1:0] seg_sel;

  if (RBL_SEGMENTS == 0 || WORDS % RBL_SEGMENTS != 0) begin : g_seg_check
    $error("scm_latch_array: RBL_SEGMENTS must divide WORDS");
  end

  for (genvar r = 0; r < WORDS; r++) begin : g_row
    for (genvar c = 0; c < WIDTH; c++) begin : g_col
      lowleak_latch u_cell (
        .gclk    (gclk[r]),
        .d       (wdata[c]),
        .rd_en   (rd_en[r]),
        .rbl_drv (drv[r][c])
      );
    end
  end

  // Wired 3-state bitline segments, resolved as an OR over their rows, and
  // the segment select: the segment that holds the enabled row.
  always_comb begin
    for (int unsigned s = 0; s < RBL_SEGMENTS; s++) begin
      seg_rbl[s] = '0;
      seg_sel[s] = 1'b0;
      for (int unsigned k = 0; k < SEG_ROWS; k++) begin
        seg_rbl[s] |= drv[s * SEG_ROWS + k];
        seg_sel[s] |= rd_en[s * SEG_ROWS + k];
      end
    end
  end

  // Static multiplexer joining the segments (a wire when there is one).
  always_comb begin
    rbl = '0;
    for (int unsigned s = 0; s < RBL_SEGMENTS; s++)
      rbl |= seg_rbl[s] & {WIDTH{seg_sel[s]}};
  end
endmodule
