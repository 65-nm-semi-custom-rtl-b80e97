// scm_testchip: the memory test chip, a 4 kbit latch-based standard-cell
// memory reached only through a scan chain.
//
// The scan interface holds one access at a time: the tester shifts in
// {we, waddr, data, re, raddr}, pulses `exec`, waits while `busy` is high
// and shifts out the chain, whose data field then holds the word read (see
// scm_scan_if for the protocol and scm_macro for the memory timing). This
// is how write/read patterns such as random data and checkerboards are
// applied and checked on silicon. The memory is 128 words of 32 bits by
// default (4096 bits); the organisation is this design's choice.
module scm_testchip #(
  parameter int unsigned WORDS = scm_pkg::WORDS,
  parameter int unsigned WIDTH = scm_pkg::WIDTH,
  parameter int unsigned RBL_SEGMENTS = 1   // read bitline segments, see scm_latch_array
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  input  logic exec,
  output logic scan_out,
  output logic busy
);
  localparam int unsigned ADDR_W = $clog2(WORDS);

  logic              mem_we, mem_re;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [WIDTH-1:0]  mem_wdata, mem_rdata;

  scm_scan_if #(.WORDS(WORDS), .WIDTH(WIDTH), .ADDR_W(ADDR_W)) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .scan_en   (scan_en),
    .scan_in   (scan_in),
    .exec      (exec),
    .scan_out  (scan_out),
    .busy      (busy),
    .mem_we    (mem_we),
    .mem_waddr (mem_waddr),
    .mem_wdata (mem_wdata),
    .mem_re    (mem_re),
    .mem_raddr (mem_raddr),
    .mem_rdata (mem_rdata)
  );

  scm_macro #(.WORDS(WORDS), .WIDTH(WIDTH), .ADDR_W(ADDR_W), .RBL_SEGMENTS(RBL_SEGMENTS)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .re    (mem_re),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );
endmodule
