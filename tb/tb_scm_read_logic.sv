// tb_scm_read_logic: exhaustive check of the read decoder at the default
// size: each address enables exactly its own row, `re` low enables none.
module tb_scm_read_logic;
  localparam int unsigned WORDS = scm_pkg::WORDS;
  localparam int unsigned AW = $clog2(WORDS);
  logic re;
  logic [AW-1:0] raddr;
  logic [WORDS-1:0] rd_en, exp;
  int checks = 0, failures = 0;

  scm_read_logic #(.WORDS(WORDS)) dut (.re(re), .raddr(raddr), .rd_en(rd_en));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int a = 0; a < WORDS; a++) begin
        re = 1'(r); raddr = AW'(a);
        #1;
        exp = '0;
        if (r == 1) exp[a] = 1'b1;
        checks++;
        if (rd_en !== exp) begin
          failures++;
          $display("FAIL re=%0d addr=%0d rd_en=%h expected %h", r, a, rd_en, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
