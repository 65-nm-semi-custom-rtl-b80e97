// tb_scm_macro: the memory at its default size (128 x 32). Applies a
// checkerboard pattern and its inverse, then random writes and reads with a
// simultaneous read of the address being written, and compares each read
// with a reference array. A read request presented before rising edge k
// must be valid when sampled at edge k+1 (one-cycle read latency); reads
// with `re` low must return 0. A second memory with read bitlines split
// into 8 segments runs on the same requests and must give the same data.
module tb_scm_macro;
  localparam int unsigned WORDS = scm_pkg::WORDS;
  localparam int unsigned WIDTH = scm_pkg::WIDTH;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata, rdata_seg;
  logic [WIDTH-1:0] model [WORDS];
  int checks = 0, failures = 0, cycles = 0, write_through = 0;

  scm_macro #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(rdata));

  scm_macro #(.WORDS(WORDS), .WIDTH(WIDTH), .RBL_SEGMENTS(8)) dut_seg (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(rdata_seg));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [WIDTH-1:0] checker_word(int a, bit inv);
    logic [WIDTH-1:0] w;
    for (int b = 0; b < WIDTH; b++) w[b] = 1'((a + b) % 2) ^ inv;
    return w;
  endfunction

  // One access: request set up after a rising edge, taken at the next edge,
  // read data sampled one edge later.
  task automatic access(input bit w, input int wa, input logic [WIDTH-1:0] wd,
                        input bit r, input int ra);
    logic [WIDTH-1:0] exp;
    @(negedge clk);
    we = w; waddr = AW'(wa); wdata = wd; re = r; raddr = AW'(ra);
    @(posedge clk);          // request registered
    #1;
    we = 1'b0; re = 1'b0;
    if (w) model[wa] = wd;   // write-through: same-address read sees new data
    exp = r ? model[ra] : '0;
    if (w && r && wa == ra) write_through++;
    @(posedge clk);          // one cycle later the read data is sampled
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL cycle %0d: re=%0b raddr=%0d rdata=%h expected %h",
               cycles, r, ra, rdata, exp);
    end
    checks++;
    if (rdata_seg !== exp) begin
      failures++;
      $display("FAIL segmented cycle %0d: re=%0b raddr=%0d rdata=%h expected %h",
               cycles, r, ra, rdata_seg, exp);
    end
  endtask

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int inv = 0; inv < 2; inv++) begin
      for (int a = 0; a < WORDS; a++) access(1, a, checker_word(a, inv[0]), 0, 0);
      for (int a = 0; a < WORDS; a++) access(0, 0, '0, 1, a);
    end
    for (int i = 0; i < 3000; i++) begin
      int wa, ra;
      wa = int'($urandom_range(WORDS - 1));
      ra = ($urandom_range(7) == 0) ? wa : int'($urandom_range(WORDS - 1));
      access(1'($urandom), wa, WIDTH'($urandom), ($urandom_range(9) != 0), ra);
    end
    checks++;
    if (write_through == 0) begin
      failures++;
      $display("FAIL same-address write and read never exercised");
    end
    $display("write_through=%0d", write_through);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
