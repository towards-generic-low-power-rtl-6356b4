// tb_scm_wad: exhaustive check of the write address decoder at its default
// size (88 words, 7-bit address). Every address and both write-enable values
// are applied. The expected row-select word is computed here: a single one at
// the address when enabled and in range, all zero otherwise.
module tb_scm_wad;
  localparam int unsigned R  = 88;
  localparam int unsigned AW = $clog2(R);

  logic          we;
  logic [AW-1:0] waddr;
  logic [R-1:0]  row_sel;
  int checks = 0, failures = 0;

  scm_wad #(.R(R)) dut (.we(we), .waddr(waddr), .row_sel(row_sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < (1 << AW); a++) begin
        we    = e[0];
        waddr = AW'(a);
        #1;
        exp = '0;
        if (e == 1 && a < int'(R)) exp[a] = 1'b1;
        checks++;
        if (row_sel !== exp) begin
          failures++;
          $display("FAIL we=%0d addr=%0d row_sel=%h expected %h", e, a, row_sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
