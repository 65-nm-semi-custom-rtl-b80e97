// scm_read_logic: read address decoder of the memory.
//
// Decodes the registered read address into one-hot output enables, one per
// row, that switch on the 3-state read buffers of the addressed row. When
// `re` is low no row drives the read bitlines. Purely combinational; the
// address comes from flip-flops in scm_macro. Addresses at or above WORDS
// enable no row.
module scm_read_logic #(
  parameter int unsigned WORDS  = scm_pkg::WORDS,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WORDS-1:0]  rd_en
);
  always_comb begin
    rd_en = '0;
    for (int unsigned r = 0; r < WORDS; r++)
      rd_en[r] = re && (raddr == ADDR_W'(r));
  end

  // Never more than one driver on a read bitline.
  always_comb assert ($onehot0(rd_en)) else $error("scm_read_logic: several rows enabled");
endmodule
