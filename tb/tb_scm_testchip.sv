// tb_scm_testchip: end-to-end test of the test chip at its default size
// (128 x 32 = 4 kbit), driven only through the scan chain as a tester
// would. It runs the two functional patterns of the chip: checkerboard and
// inverse checkerboard (write all words, read all back), then random
// writes and reads. Every read is shifted out and compared with a reference
// array. The mechanisms of the design are counted and each must occur:
// writes, reads, a write and a read of the same address in one access
// (write-through), an access with reading disabled (chain data kept),
// an exec ignored while shifting and an exec ignored while busy.
module tb_scm_testchip;
  localparam int unsigned WORDS = scm_pkg::WORDS;
  localparam int unsigned WIDTH = scm_pkg::WIDTH;
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned L = 2 * AW + WIDTH + 2;
  localparam int unsigned N_RANDOM = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0, exec = 1'b0, scan_out, busy;
  logic [WIDTH-1:0] model [WORDS];
  logic [L-1:0] expected = '0;
  int checks = 0, failures = 0, cycles = 0;
  int n_write = 0, n_read = 0, n_through = 0, n_noread = 0;
  int n_exec_shift = 0, n_exec_busy = 0;

  scm_testchip dut (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
    .exec(exec), .scan_out(scan_out), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [WIDTH-1:0] checker_word(int a, bit inv);
    logic [WIDTH-1:0] w;
    for (int b = 0; b < WIDTH; b++) w[b] = 1'((a + b) % 2) ^ inv;
    return w;
  endfunction

  // Shift a vector in while the previous result comes out; compare that
  // result with what the reference says it must be.
  task automatic shift(input logic [L-1:0] vec);
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      scan_en = 1'b1; scan_in = vec[i];
      exec = (i == 5 && vec[2]);        // sometimes try exec while shifting
      if (exec) n_exec_shift++;
      #1;
      checks++;
      if (scan_out !== expected[i]) begin
        failures++;
        $display("FAIL result bit %0d at cycle %0d: got %0b expected %0b",
                 i, cycles, scan_out, expected[i]);
      end
    end
  endtask

  task automatic access(input bit w, input int wa, input logic [WIDTH-1:0] wd,
                        input bit r, input int ra);
    logic [L-1:0] vec;
    vec = {w, AW'(wa), wd, r, AW'(ra)};
    shift(vec);
    @(negedge clk);
    scan_en = 1'b0; exec = 1'b1;
    @(negedge clk);
    exec = (wa % 3 == 0);               // exec held into the busy cycle
    if (exec) n_exec_busy++;
    #1;
    checks++;
    if (busy !== 1'b1) begin
      failures++;
      $display("FAIL busy not set at cycle %0d", cycles);
    end
    @(negedge clk);
    exec = 1'b0;
    // reference: write first (write-through), then read
    if (w) begin model[wa] = wd; n_write++; end
    expected = vec;
    if (r) begin
      expected[AW + 1 +: WIDTH] = model[ra];
      n_read++;
      if (w && wa == ra) n_through++;
    end else n_noread++;
  endtask

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    start = cycles;
    for (int inv = 0; inv < 2; inv++) begin
      for (int a = 0; a < WORDS; a++) access(1, a, checker_word(a, inv[0]), 0, 0);
      for (int a = 0; a < WORDS; a++) access(0, 0, '0, 1, a);
    end
    for (int i = 0; i < N_RANDOM; i++) begin
      int wa, ra;
      wa = int'($urandom_range(WORDS - 1));
      ra = ($urandom_range(7) == 0) ? wa : int'($urandom_range(WORDS - 1));
      access(1'($urandom), wa, WIDTH'($urandom), ($urandom_range(9) != 0), ra);
    end
    shift('0);                          // unload the last result
    // one access costs L shift cycles plus 3 cycles of exec/capture/idle
    checks++;
    if (cycles - start != (4 * WORDS + N_RANDOM) * (L + 3) + L) begin
      failures++;
      $display("FAIL cycle count %0d", cycles - start);
    end
    $display("writes=%0d reads=%0d write_through=%0d read_disabled=%0d exec_ignored_shift=%0d exec_ignored_busy=%0d",
             n_write, n_read, n_through, n_noread, n_exec_shift, n_exec_busy);
    checks += 6;
    if (n_write == 0 || n_read == 0 || n_through == 0 || n_noread == 0 ||
        n_exec_shift == 0 || n_exec_busy == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
