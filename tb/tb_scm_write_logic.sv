// tb_scm_write_logic: checks the write decoder and row clock gates at the
// default size: in every cycle the addressed row, and only that row, gets a
// pulse in the low phase when `we` is set; no row pulses when it is clear.
module tb_scm_write_logic;
  localparam int unsigned WORDS = scm_pkg::WORDS;
  localparam int unsigned AW = $clog2(WORDS);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [WORDS-1:0] gclk, exp;
  int checks = 0, failures = 0, cycles = 0;

  scm_write_logic #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .waddr(waddr), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic [WORDS-1:0] e, input string what);
    checks++;
    if (gclk !== e) begin
      failures++;
      $display("FAIL %s at cycle %0d: gclk=%h expected %h", what, cycles, gclk, e);
    end
  endtask

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < 2 * WORDS + 200; i++) begin
      // first pass visits every row, then random addresses
      #1;
      we    = (i < WORDS) ? 1'b1 : 1'($urandom);
      waddr = (i < 2 * WORDS) ? AW'(i) : AW'($urandom);
      exp = '0;
      if (we) exp[waddr] = 1'b1;
      #2 check('0, "no pulse in high phase");
      @(negedge clk);
      #1 check(exp, "pulse on addressed row");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
