// scm_write_logic: write address decoder and row clock gates.
//
// The registered write address is decoded to one-hot; the row that matches
// receives an enabled clock gate when `we` is set. The output `gclk` has one
// bit per row: a high pulse during the low phase of `clk` on the addressed
// row only, and no pulse anywhere when `we` is low. `we` and `waddr` must be
// stable during the high phase of `clk` (they come from flip-flops clocked
// on the rising edge). Addresses at or above WORDS enable no row.
module scm_write_logic #(
  parameter int unsigned WORDS  = scm_pkg::WORDS,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  output logic [WORDS-1:0]  gclk
);
  logic [WORDS-1:0] row_en;

  always_comb begin
    row_en = '0;
    for (int unsigned r = 0; r < WORDS; r++)
      row_en[r] = we && (waddr == ADDR_W'(r));
  end

  for (genvar r = 0; r < WORDS; r++) begin : g_row
    clock_gate u_cg (.clk(clk), .en(row_en[r]), .gclk(gclk[r]));
  end
endmodule
