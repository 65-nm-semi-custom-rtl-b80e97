// tb_clock_gate: checks the row clock gate: one gated pulse in the low phase
// of a cycle whose enable was high at the falling clock edge, none
// otherwise, and no glitch when the enable changes during the low phase.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0, cycles = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: gclk=%0b expected %0b", what, cycles, gclk, exp);
    end
  endtask

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      bit e, e2;
      e  = 1'($urandom);
      e2 = 1'($urandom);
      // enable set during the high phase
      #1 en = e;
      #2 check(0, "high phase");
      @(negedge clk);
      #1 check(e, "low phase pulse");
      en = e2;                      // change during low phase: must not glitch
      #2 check(e, "enable change in low phase ignored");
      @(posedge clk);
      #1 check(0, "pulse ends at rising edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
