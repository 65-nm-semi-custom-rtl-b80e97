// tb_scm_scan_if: checks the scan interface against a bit-level model of the
// chain at the default size. Random vectors are shifted in while the
// previous result is shifted out and compared; each `exec` must present the
// vector's fields to the memory for exactly one cycle, and the capture cycle
// must load the memory's read data into the data field only when the vector
// reads. Also checks that `exec` is ignored while shifting and while busy.
module tb_scm_scan_if;
  localparam int unsigned WORDS = scm_pkg::WORDS;
  localparam int unsigned WIDTH = scm_pkg::WIDTH;
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned L = 2 * AW + WIDTH + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0, exec = 1'b0, scan_out, busy;
  logic mem_we, mem_re;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [WIDTH-1:0] mem_wdata, mem_rdata = '0;
  logic [L-1:0] expected = '0;
  int checks = 0, failures = 0, cycles = 0;

  scm_scan_if #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in), .exec(exec),
    .scan_out(scan_out), .busy(busy),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
    .mem_re(mem_re), .mem_raddr(mem_raddr), .mem_rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [L-1:0] vec;
      logic [WIDTH-1:0] rd;
      for (int k = 0; k < L; k += 32) vec[k +: 32] = $urandom;
      // shift in the new vector, shifting out the previous result
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        scan_en = 1'b1; scan_in = vec[i];
        exec = (i == 3);                      // exec while shifting: ignored
        #1 check(scan_out === expected[i], "scan_out bit");
        check(!mem_we && !mem_re, "no memory access while shifting");
      end
      @(negedge clk);
      scan_en = 1'b0; exec = 1'b1;
      #1;
      check(mem_we === vec[L-1], "mem_we field");
      check(mem_waddr === vec[AW + 1 + WIDTH +: AW], "mem_waddr field");
      check(mem_wdata === vec[AW + 1 +: WIDTH], "mem_wdata field");
      check(mem_re === vec[AW], "mem_re field");
      check(mem_raddr === vec[0 +: AW], "mem_raddr field");
      @(negedge clk);
      // exec held high into the capture cycle: must be ignored
      rd = WIDTH'($urandom);
      mem_rdata = rd;
      #1;
      check(busy === 1'b1, "busy in capture cycle");
      check(!mem_we && !mem_re, "access lasts one cycle");
      @(negedge clk);
      exec = 1'b0;
      #1 check(busy === 1'b0, "busy clears");
      expected = vec;
      if (vec[AW]) expected[AW + 1 +: WIDTH] = rd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
