// tb_scm_rad: exhaustive check of the read address decoder at its default
// size (88 words, 7-bit address). The expected select is a single one at the
// address, or all zero for an address of 88 or above.
module tb_scm_rad;
  localparam int unsigned R  = 88;
  localparam int unsigned AW = $clog2(R);

  logic [AW-1:0] raddr;
  logic [R-1:0]  row_sel;
  int checks = 0, failures = 0;

  scm_rad #(.R(R)) dut (.raddr(raddr), .row_sel(row_sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] exp;
    for (int a = 0; a < (1 << AW); a++) begin
      raddr = AW'(a);
      #1;
      exp = '0;
      if (a < int'(R)) exp[a] = 1'b1;
      checks++;
      if (row_sel !== exp) begin
        failures++;
        $display("FAIL addr=%0d row_sel=%h expected %h", a, row_sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
