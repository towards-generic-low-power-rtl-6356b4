// tb_scm_latch_array: checks the latch storage array (8 words of 16 bits) by
// driving the row clocks directly. An open row must follow the write data
// while its clock is high, and must keep the last value when the clock goes
// low, even when the data lines change later. All other rows must be
// unchanged. A reference copy of the array is kept here.
module tb_scm_latch_array;
  localparam int unsigned R = 8;
  localparam int unsigned C = 16;

  logic [R-1:0] row_clk;
  logic [C-1:0] wdata;
  logic [C-1:0] rows [R];
  logic [C-1:0] model [R];
  int checks = 0, failures = 0;

  scm_latch_array #(.R(R), .C(C)) dut (.row_clk(row_clk), .wdata(wdata), .rows(rows));

  task automatic check_all(input string what);
    for (int r = 0; r < int'(R); r++) begin
      checks++;
      if (rows[r] !== model[r]) begin
        failures++;
        $display("FAIL %s row %0d: %h expected %h", what, r, rows[r], model[r]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [C-1:0] d1, d2;
    row_clk = '0;
    wdata   = '0;
    // fill every row once
    for (int i = 0; i < int'(R); i++) begin
      wdata = C'($urandom);
      #1 row_clk[i] = 1'b1;
      #1 row_clk[i] = 1'b0;
      model[i] = wdata;
      #1;
    end
    check_all("fill");
    for (int i = 0; i < 300; i++) begin
      r  = int'($urandom_range(R - 1));
      d1 = C'($urandom);
      d2 = C'($urandom);
      wdata = d1;
      #1 row_clk[r] = 1'b1;
      #1;
      model[r] = d1;
      check_all("transparent");
      wdata = d2;               // still open: must follow
      #1;
      model[r] = d2;
      check_all("follows data");
      row_clk[r] = 1'b0;
      #1;
      wdata = C'($urandom);     // closed: must hold d2
      #1;
      check_all("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
