// tb_lowleak_latch: checks the storage cell on its own: transparency while
// the write clock is high, hold after it falls, and that the read output
// carries the stored bit only while its 3-state enable is on.
module tb_lowleak_latch;
  logic gclk, d, rd_en, rbl_drv;
  int checks = 0, failures = 0;
  bit model;

  lowleak_latch dut (.gclk(gclk), .d(d), .rd_en(rd_en), .rbl_drv(rbl_drv));

  task automatic expect_out(input bit exp, input string what);
    #1;
    checks++;
    if (rbl_drv !== exp) begin
      failures++;
      $display("FAIL %s: rbl_drv=%0b expected %0b", what, rbl_drv, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gclk = 1; d = 0; rd_en = 1; #1;
    model = 0;
    expect_out(0, "transparent 0");
    d = 1; expect_out(1, "transparent follows 1");
    model = 1;
    gclk = 0; #1;
    d = 0; expect_out(1, "hold 1 after gclk falls");
    rd_en = 0; expect_out(0, "released output reads 0");
    rd_en = 1; expect_out(1, "re-enabled output shows held 1");
    for (int i = 0; i < 200; i++) begin
      bit g, dv, re;
      g = 1'($urandom); dv = 1'($urandom); re = 1'($urandom);
      gclk = g; d = dv; rd_en = re;
      if (g) model = dv;
      expect_out(re & model, "random sequence");
      gclk = 0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
