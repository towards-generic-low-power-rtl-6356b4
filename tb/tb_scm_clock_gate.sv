// tb_scm_clock_gate: checks the row clock gate over random enable patterns.
// The clock has a 10-unit period, high for the first half. For every cycle the
// enable is set during the high half, and sometimes changed again during the
// low half. Expected: gclk stays low while clk is high, and during the low half
// it equals the enable value present at the falling edge, whatever the enable
// does later in that half. The pulse must end at the rising edge.
module tb_scm_clock_gate;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int pulses = 0;

  scm_clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s: gclk=%0d expected %0d at %0t", what, gclk, exp, $time);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sel;
    for (int i = 0; i < 500; i++) begin
      // high half: clock rises, enable is applied
      clk = 1'b1;
      #1;
      check(1'b0, "after rising edge");
      sel = 1'($urandom);
      en  = sel;
      #2;
      check(1'b0, "high half");
      #2;
      // low half
      clk = 1'b0;
      #1;
      check(sel, "low half start");
      if (sel) pulses++;
      en = ~sel;               // late change must not reach gclk
      #2;
      check(sel, "low half after enable change");
      #2;
    end
    checks++;
    if (pulses == 0 || pulses == 500) begin
      failures++;
      $display("FAIL enable pattern did not exercise both cases");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
