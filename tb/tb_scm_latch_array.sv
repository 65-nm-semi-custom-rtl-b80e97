// tb_scm_latch_array: drives the storage array directly with row write
// clocks and read enables, at a reduced size, and compares every read with
// a reference array. Also checks that a row written while not selected for
// reading leaves the bitlines alone, and that no read enable gives 0.
module tb_scm_latch_array;
  localparam int unsigned WORDS = 16;
  localparam int unsigned WIDTH = 8;
  logic [WORDS-1:0] gclk = '0, rd_en = '0;
  logic [WIDTH-1:0] wdata = '0, rbl, rbl_seg;
  logic [WIDTH-1:0] model [WORDS];
  int checks = 0, failures = 0;

  scm_latch_array #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .gclk(gclk), .wdata(wdata), .rd_en(rd_en), .rbl(rbl));

  scm_latch_array #(.WORDS(WORDS), .WIDTH(WIDTH), .RBL_SEGMENTS(4)) dut_seg (
    .gclk(gclk), .wdata(wdata), .rd_en(rd_en), .rbl(rbl_seg));

  task automatic write_row(input int r, input logic [WIDTH-1:0] v);
    wdata = v; #1;
    gclk[r] = 1'b1; #1;
    gclk[r] = 1'b0; #1;
    wdata = ~v; #1;           // data changes after the row closed
    model[r] = v;
  endtask

  task automatic read_row(input int r);
    rd_en = '0; rd_en[r] = 1'b1; #1;
    checks++;
    if (rbl !== model[r]) begin
      failures++;
      $display("FAIL row %0d: rbl=%h expected %h", r, rbl, model[r]);
    end
    checks++;
    if (rbl_seg !== model[r]) begin
      failures++;
      $display("FAIL segmented row %0d: rbl=%h expected %h", r, rbl_seg, model[r]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int r = 0; r < WORDS; r++) write_row(r, WIDTH'(r * 37 + 5));
    for (int r = 0; r < WORDS; r++) read_row(r);
    for (int i = 0; i < 2000; i++) begin
      if (1'($urandom)) write_row(int'($urandom_range(WORDS - 1)), WIDTH'($urandom));
      else read_row(int'($urandom_range(WORDS - 1)));
    end
    rd_en = '0; #1;
    checks++;
    if (rbl !== '0 || rbl_seg !== '0) begin
      failures++;
      $display("FAIL undriven bitlines read %h", rbl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
