// tb_ldpc_scm_bank_group: checks one banked memory (3 banks of 88 words of
// 135 bits, the R-memory size) while the set of powered banks changes.
//
// Each cycle applies a random bank_on pattern (bit 0 random too, since bank 0
// must stay on regardless), a random write and a random read, with inputs
// applied 1 time unit after the rising edge. A reference model keeps one array
// per bank. A write reaches only the banks that are on in its cycle. A read
// returns each bank's word if that bank was on when the read address was
// registered, and zero otherwise. The reads of a bank that was off and has
// been switched on again check that it kept its content, which is what this
// model promises.
module tb_ldpc_scm_bank_group;
  localparam int unsigned NB = 3;
  localparam int unsigned R  = 88;
  localparam int unsigned C  = 135;
  localparam int unsigned AW = $clog2(R);
  localparam int unsigned N  = 3000;

  logic             clk = 1'b0;
  logic [NB-1:0]    bank_on = '1;
  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0;
  logic [NB*C-1:0]  wdata = '0;
  logic [AW-1:0]    raddr = AW'(R);
  logic [NB*C-1:0]  rdata;
  logic [C-1:0]     model [NB][R];
  int checks = 0, failures = 0;
  int n_off_writes = 0, n_isolated = 0, n_reon = 0;

  ldpc_scm_bank_group #(.NUM_BANKS(NB), .R(R), .C(C)) dut (
    .clk(clk), .bank_on(bank_on), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [NB*C-1:0] rand_word();
    logic [NB*C-1:0] w = '0;
    for (int i = 0; i < int'(NB * C); i += 32) w = (w << 32) | (NB*C)'($urandom);
    return w;
  endfunction

  initial begin
    #((N + 300) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0]   raddr_reg;
    logic [NB-1:0]   on_reg, on_now, was_off;
    logic            pend_we;
    logic [AW-1:0]   pend_addr;
    logic [NB*C-1:0] pend_data, exp;

    @(posedge clk); #1;
    @(posedge clk); #1;
    // fill all banks with every bank on
    for (int a = 0; a < int'(R); a++) begin
      we = 1'b1; waddr = AW'(a); wdata = rand_word();
      for (int b = 0; b < int'(NB); b++) model[b][a] = wdata[b*C +: C];
      @(posedge clk); #1;
    end
    we = 1'b0;
    raddr = '0;
    on_now = '1;
    was_off = '0;
    pend_we = 1'b0;

    for (int i = 0; i < int'(N); i++) begin
      @(posedge clk); #1;
      if (pend_we && int'(pend_addr) < int'(R))
        for (int b = 0; b < int'(NB); b++)
          if (on_now[b]) model[b][pend_addr] = pend_data[b*C +: C];
      raddr_reg = raddr;
      on_reg    = on_now;
      exp = '0;
      if (int'(raddr_reg) < int'(R))
        for (int b = 0; b < int'(NB); b++)
          if (on_reg[b]) exp[b*C +: C] = model[b][raddr_reg];
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d on=%b: %h expected %h", raddr_reg, on_reg, rdata, exp);
      end
      for (int b = 1; b < int'(NB); b++) if (!on_reg[b]) n_isolated++;

      // new power state: change it in about one cycle of eight
      if ($urandom_range(7) == 0) bank_on = NB'($urandom);
      on_now = bank_on;
      on_now[0] = 1'b1;
      for (int b = 1; b < int'(NB); b++) begin
        if (!on_now[b]) was_off[b] = 1'b1;
        else if (was_off[b]) begin n_reon++; was_off[b] = 1'b0; end
      end
      raddr = AW'($urandom_range(R - 1));
      we    = ($urandom_range(2) != 0);
      do waddr = AW'($urandom_range(R - 1));
      while (waddr == raddr_reg);
      wdata = rand_word();
      if (we && on_now != '1) n_off_writes++;
      pend_we = we; pend_addr = waddr; pend_data = wdata;
    end
    checks++;
    if (n_off_writes == 0 || n_isolated == 0 || n_reon == 0) begin
      failures++;
      $display("FAIL coverage: off-bank writes=%0d isolated reads=%0d re-enables=%0d",
               n_off_writes, n_isolated, n_reon);
    end
    $display("writes with a bank off=%0d isolated bank reads=%0d re-enables=%0d",
             n_off_writes, n_isolated, n_reon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
