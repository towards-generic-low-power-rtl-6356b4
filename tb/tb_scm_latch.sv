// tb_scm_latch: cycle-level check of the latch based SCM at its default size
// (88 words of 135 bits).
//
// Inputs are applied 1 time unit after each rising edge, so address and
// enable settle in the high half and write data is held to the next rising
// edge. Each cycle writes a random word to a random address (sometimes out of
// range, sometimes with write disabled) and reads a random address. The read
// address is never the word being read in that cycle, as the memory requires.
// A reference array predicts every read: a write in cycle n is visible to a
// read registered at the end of cycle n. Checks:
//   - read data of the address registered one edge earlier (latency one);
//   - changing raddr does not change rdata before the next edge;
//   - out-of-range writes are dropped and out-of-range reads return zero;
//   - disabled writes change nothing.
module tb_scm_latch;
  localparam int unsigned R  = 88;
  localparam int unsigned C  = 135;
  localparam int unsigned AW = $clog2(R);
  localparam int unsigned N  = 4000;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [C-1:0]  wdata = '0;
  logic [AW-1:0] raddr = '0;
  logic [C-1:0]  rdata;
  logic [C-1:0]  model [R];
  int checks = 0, failures = 0;
  int n_writes = 0, n_dropped = 0, n_oor_reads = 0;

  scm_latch #(.R(R), .C(C)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [C-1:0] rand_word();
    logic [C-1:0] w = '0;
    for (int i = 0; i < int'(C); i += 32) w = (w << 32) | C'($urandom);
    return w;
  endfunction

  function automatic logic [C-1:0] expect_word(input logic [AW-1:0] a);
    return (int'(a) < int'(R)) ? model[a] : '0;
  endfunction

  task automatic check(input logic [C-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: rdata=%h expected %h at %0t", what, rdata, exp, $time);
    end
  endtask

  initial begin
    #((N + 300) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] raddr_reg;   // address registered at the last edge
    logic          pend_we;
    logic [AW-1:0] pend_addr;
    logic [C-1:0]  pend_data;

    // one idle cycle registers an out-of-range read address, then every word
    // is initialised with a write
    @(posedge clk); #1;
    raddr = AW'(R);
    @(posedge clk); #1;
    for (int a = 0; a < int'(R); a++) begin
      @(posedge clk); #1;
      we = 1'b1; waddr = AW'(a); wdata = rand_word(); raddr = AW'(R);  // read out of range
      model[a] = wdata;
    end
    @(posedge clk); #1;
    we = 1'b0;
    raddr_reg = AW'(R);
    raddr = '0;
    pend_we = 1'b0;

    for (int i = 0; i < int'(N); i++) begin
      @(posedge clk); #1;
      // the write of the last cycle is now complete
      if (pend_we && int'(pend_addr) < int'(R)) model[pend_addr] = pend_data;
      raddr_reg = raddr;
      check(expect_word(raddr_reg), "read after one edge");
      if (int'(raddr_reg) >= int'(R)) n_oor_reads++;

      // next read address: must not change rdata before the next edge
      raddr = ($urandom_range(15) == 0) ? AW'($urandom_range(R, (1 << AW) - 1))
                                        : AW'($urandom_range(R - 1));
      // write of this cycle: avoid the word being read now
      we    = ($urandom_range(3) != 0);
      do waddr = AW'($urandom_range((1 << AW) - 1));
      while (waddr == raddr_reg);
      wdata = rand_word();
      #1;
      check(expect_word(raddr_reg), "rdata stable before edge");
      pend_we   = we;
      pend_addr = waddr;
      pend_data = wdata;
      if (we && int'(waddr) < int'(R)) n_writes++;
      if (we && int'(waddr) >= int'(R)) n_dropped++;
    end
    checks++;
    if (n_writes == 0 || n_dropped == 0 || n_oor_reads == 0) begin
      failures++;
      $display("FAIL coverage: writes=%0d dropped=%0d oor_reads=%0d", n_writes, n_dropped, n_oor_reads);
    end
    $display("writes=%0d dropped writes=%0d out-of-range reads=%0d", n_writes, n_dropped, n_oor_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
