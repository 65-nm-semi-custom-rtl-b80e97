// scm_macro: the 4 kbit latch-based standard-cell memory, one write port and
// one read port.
//
// Structure: rising-edge flip-flops capture the write request (we, waddr,
// wdata) and the read request (re, raddr). The write logic decodes the
// registered write address and opens one row clock gate; the gated clock is
// high during the low phase of `clk`, so the addressed row of latches is
// transparent for the second half of the cycle and closes at the next
// rising edge, while the write data register still holds the data. The read
// logic decodes the registered read address into the 3-state enables of one
// row; the cells of that row drive the column read bitlines, which are the
// read data output.
//
// Timing, with a request presented before rising edge k:
//   write: the word is stored by edge k+1 (one cycle);
//   read:  `rdata` is valid after edge k and is sampled at edge k+1;
//          with `re` low `rdata` is 0 (no bitline driver).
//   read and write of the same address in the same request: the latch is
//          transparent in the low phase, so `rdata` sampled at edge k+1 is
//          the newly written word (write-through).
// Reset clears the request registers only; the array contents are not
// reset, as in any memory.
//
// The array of latches with clock-gate write logic and 3-state read logic
// follows the memory architecture; the registered interface, the clock
// phases and the 128 x 32 organisation are this design's choices.
module scm_macro #(
  parameter int unsigned WORDS  = scm_pkg::WORDS,
  parameter int unsigned WIDTH  = scm_pkg::WIDTH,
  parameter int unsigned ADDR_W = $clog2(WORDS),
  parameter int unsigned RBL_SEGMENTS = 1   // read bitline segments, see scm_latch_array
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic              we_q, re_q;
  logic [ADDR_W-1:0] waddr_q, raddr_q;
  logic [WIDTH-1:0]  wdata_q;
  logic [WORDS-1:0]  row_gclk, row_rd_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_q    <= 1'b0;
      re_q    <= 1'b0;
      waddr_q <= '0;
      raddr_q <= '0;
      wdata_q <= '0;
    end else begin
      we_q    <= we;
      re_q    <= re;
      waddr_q <= waddr;
      raddr_q <= raddr;
      wdata_q <= wdata;
    end
  end

  scm_write_logic #(.WORDS(WORDS), .ADDR_W(ADDR_W)) u_write (
    .clk   (clk),
    .we    (we_q),
    .waddr (waddr_q),
    .gclk  (row_gclk)
  );

  scm_read_logic #(.WORDS(WORDS), .ADDR_W(ADDR_W)) u_read (
    .re    (re_q),
    .raddr (raddr_q),
    .rd_en (row_rd_en)
  );

  scm_latch_array #(.WORDS(WORDS), .WIDTH(WIDTH), .RBL_SEGMENTS(RBL_SEGMENTS)) u_array (
    .gclk  (row_gclk),
    .wdata (wdata_q),
    .rd_en (row_rd_en),
    .rbl   (rdata)
  );
endmodule
