// tb_ldpc_scm_memories: end-to-end test of the decoder memory subsystem at its
// full default size. Q and T hold 3 banks of 24 words and R holds 3 banks of
// 88 words, with 135-bit banks (405-bit words).
//
// The test runs all three memories at once, one write and one read per memory
// per cycle, with inputs applied 1 time unit after the rising edge. It goes
// through the operating modes Z81, Z27, Z54, Z81, Z27. In each mode it first
// writes every word of every memory, then runs random traffic, then reads
// every word back. A reference model (one array per memory and bank) predicts
// each read: writes reach only powered banks, and a bank that is off reads
// zero. Checks and counted events:
//   - every read word, one cycle after its address (read latency one);
//   - bank_pwr_en for every mode;
//   - row clocks: at most one row of a bank pulses per cycle. Exactly one
//     pulses when that bank is written, and none when it is off;
//   - events that must each happen: every mode, a mode switch, a write
//     dropped by an off bank, an isolated (zero) bank read, a bank read back
//     after being switched on again, an out-of-range read.
module tb_ldpc_scm_memories;
  import ldpc_mem_pkg::*;

  localparam int unsigned C   = BANK_BITS;
  localparam int unsigned W   = NUM_BANKS * C;
  localparam int unsigned QN  = QT_WORDS;
  localparam int unsigned RN  = R_WORDS;
  localparam int unsigned QAW = $clog2(QN);
  localparam int unsigned RAW = $clog2(RN);
  localparam int unsigned RANDOM_CYCLES = 600;

  logic clk = 1'b0;
  mode_e mode = MODE_Z81;
  logic [NUM_BANKS-1:0] bank_pwr_en;

  logic           we    [3];
  logic [RAW-1:0] waddr [3];
  logic [W-1:0]   wdata [3];
  logic [RAW-1:0] raddr [3];
  logic [W-1:0]   rdata [3];

  // memory index: 0 = Q, 1 = T, 2 = R
  int unsigned words [3] = '{QN, QN, RN};
  logic [C-1:0] mdl [3][NUM_BANKS][RN];

  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_switch = 0, n_dropped = 0, n_isolated = 0, n_reon = 0, n_oor = 0, n_pulse = 0;

  ldpc_scm_memories dut (
    .clk(clk), .mode(mode), .bank_pwr_en(bank_pwr_en),
    .q_we(we[0]), .q_waddr(waddr[0][QAW-1:0]), .q_wdata(wdata[0]),
    .q_raddr(raddr[0][QAW-1:0]), .q_rdata(rdata[0]),
    .t_we(we[1]), .t_waddr(waddr[1][QAW-1:0]), .t_wdata(wdata[1]),
    .t_raddr(raddr[1][QAW-1:0]), .t_rdata(rdata[1]),
    .r_we(we[2]), .r_waddr(waddr[2]), .r_wdata(wdata[2]),
    .r_raddr(raddr[2]), .r_rdata(rdata[2])
  );

  always #5 clk = ~clk;

  // ---- row clock observation (clock gating) ----
  logic [QN-1:0] q_rowclk [NUM_BANKS];
  logic [RN-1:0] r_rowclk [NUM_BANKS];

  task automatic sample_row_clocks();
    q_rowclk[0] = dut.u_qmem.g_bank[0].u_scm.row_clk;
    q_rowclk[1] = dut.u_qmem.g_bank[1].u_scm.row_clk;
    q_rowclk[2] = dut.u_qmem.g_bank[2].u_scm.row_clk;
    r_rowclk[0] = dut.u_rmem.g_bank[0].u_scm.row_clk;
    r_rowclk[1] = dut.u_rmem.g_bank[1].u_scm.row_clk;
    r_rowclk[2] = dut.u_rmem.g_bank[2].u_scm.row_clk;
  endtask

  // expected row pulses for the cycle in progress, set by the driver
  logic exp_q_pulse [NUM_BANKS];
  logic exp_r_pulse [NUM_BANKS];

  always @(negedge clk) begin
    #2;  // middle of the low half, where a selected row is open
    sample_row_clocks();
    for (int b = 0; b < int'(NUM_BANKS); b++) begin
      checks += 2;
      if ($countones(q_rowclk[b]) != (exp_q_pulse[b] ? 1 : 0)) begin
        failures++;
        $display("FAIL Q bank %0d row clocks %b at %0t", b, q_rowclk[b], $time);
      end
      if ($countones(r_rowclk[b]) != (exp_r_pulse[b] ? 1 : 0)) begin
        failures++;
        $display("FAIL R bank %0d row clocks %b at %0t", b, r_rowclk[b], $time);
      end
      if (exp_r_pulse[b]) n_pulse++;
    end
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w = '0;
    for (int i = 0; i < int'(W); i += 32) w = (w << 32) | W'($urandom);
    return w;
  endfunction

  initial begin
    #(40000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // state carried from one cycle to the next
  logic [NUM_BANKS-1:0] on_now = '1, was_off = '0;
  logic                 pend_we   [3];
  logic [RAW-1:0]       pend_addr [3];
  logic [W-1:0]         pend_data [3];
  logic [RAW-1:0]       raddr_reg [3];
  logic [NUM_BANKS-1:0] on_reg;

  // Complete last cycle's writes in the model and check this cycle's reads.
  task automatic settle_and_check();
    logic [W-1:0] exp;
    for (int m = 0; m < 3; m++)
      if (pend_we[m] && int'(pend_addr[m]) < int'(words[m]))
        for (int b = 0; b < int'(NUM_BANKS); b++)
          if (on_now[b]) mdl[m][b][pend_addr[m]] = pend_data[m][b*C +: C];
    on_reg = on_now;
    for (int m = 0; m < 3; m++) begin
      raddr_reg[m] = raddr[m];
      exp = '0;
      if (int'(raddr_reg[m]) < int'(words[m])) begin
        for (int b = 0; b < int'(NUM_BANKS); b++) begin
          if (on_reg[b]) exp[b*C +: C] = mdl[m][b][raddr_reg[m]];
          else n_isolated++;
        end
      end else n_oor++;
      checks++;
      if (rdata[m] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL mem %0d read %0d: %h expected %h", m, raddr_reg[m], rdata[m], exp);
      end
    end
  endtask

  // Apply one cycle's operations. wa = -1 picks a random write address.
  // ra_sel = -1 picks a random read address (sometimes out of range),
  // ra_sel = -2 reads out of range, ra_sel >= 0 reads that word.
  task automatic drive(input logic do_we, input int wa, input int ra_sel);
    for (int m = 0; m < 3; m++) begin
      int ra;
      if (ra_sel >= 0)       ra = ra_sel % int'(words[m]);
      else if (ra_sel == -2) ra = int'(words[m]);
      else ra = ($urandom_range(19) == 0) ? int'(words[m]) : int'($urandom_range(words[m] - 1));
      raddr[m] = RAW'(ra);
      we[m] = do_we;
      if (wa >= 0) waddr[m] = RAW'(wa % int'(words[m]));
      else waddr[m] = RAW'($urandom_range(words[m] - 1));
      // never write the word that is being read in this cycle
      if (we[m] && waddr[m] == raddr_reg[m]) we[m] = 1'b0;
      wdata[m] = rand_word();
      pend_we[m] = we[m]; pend_addr[m] = waddr[m]; pend_data[m] = wdata[m];
      if (we[m] && on_now != '1) n_dropped++;
    end
    for (int b = 0; b < int'(NUM_BANKS); b++) begin
      exp_q_pulse[b] = we[0] && on_now[b];
      exp_r_pulse[b] = we[2] && on_now[b];
    end
  endtask

  task automatic next_cycle();
    @(posedge clk); #1;
    settle_and_check();
  endtask

  task automatic set_mode(input mode_e md);
    logic [NUM_BANKS-1:0] exp_mask;
    if (md != mode) n_switch++;
    mode = md;
    n_mode[int'(md)]++;
    on_now = bank_mask(md);
    for (int b = 1; b < int'(NUM_BANKS); b++) begin
      if (!on_now[b]) was_off[b] = 1'b1;
      else if (was_off[b]) begin n_reon++; was_off[b] = 1'b0; end
    end
    exp_mask = (md == MODE_Z27) ? 3'b001 : (md == MODE_Z54) ? 3'b011 : 3'b111;
    fork
      begin
        #2;
        checks++;
        if (bank_pwr_en !== exp_mask) begin
          failures++;
          $display("FAIL bank_pwr_en %b for mode %s", bank_pwr_en, md.name());
        end
      end
    join_none
  endtask

  initial begin
    static mode_e seq [5] = '{MODE_Z81, MODE_Z27, MODE_Z54, MODE_Z81, MODE_Z27};
    for (int m = 0; m < 3; m++) begin
      we[m] = 1'b0; waddr[m] = '0; wdata[m] = '0; raddr[m] = RAW'(words[m]);
      pend_we[m] = 1'b0; pend_addr[m] = '0; pend_data[m] = '0; raddr_reg[m] = RAW'(words[m]);
    end
    for (int b = 0; b < int'(NUM_BANKS); b++) begin exp_q_pulse[b] = 1'b0; exp_r_pulse[b] = 1'b0; end
    @(posedge clk); #1;
    @(posedge clk); #1;
    for (int m = 0; m < 3; m++) raddr_reg[m] = raddr[m];
    on_reg = on_now;

    foreach (seq[s]) begin
      set_mode(seq[s]);
      // write every word while reading out of range
      for (int a = 0; a < int'(RN); a++) begin
        drive(1'b1, a, -2);
        for (int m = 0; m < 3; m++) if (a >= int'(words[m])) we[m] = 1'b0;
        for (int m = 0; m < 3; m++) pend_we[m] = we[m];
        for (int b = 0; b < int'(NUM_BANKS); b++) begin
          exp_q_pulse[b] = we[0] && on_now[b];
          exp_r_pulse[b] = we[2] && on_now[b];
        end
        next_cycle();
      end
      // random traffic
      for (int i = 0; i < int'(RANDOM_CYCLES); i++) begin
        drive(($urandom_range(3) != 0), -1, -1);
        next_cycle();
      end
      // read every word back
      for (int a = 0; a < int'(RN); a++) begin
        drive(1'b0, 0, a);
        next_cycle();
      end
    end
    drive(1'b0, 0, 0);
    next_cycle();

    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_switch == 0 ||
        n_dropped == 0 || n_isolated == 0 || n_reon == 0 || n_oor == 0 || n_pulse == 0) begin
      failures++;
      $display("FAIL an expected event never happened");
    end
    $display("modes Z27=%0d Z54=%0d Z81=%0d switches=%0d", n_mode[0], n_mode[1], n_mode[2], n_switch);
    $display("writes with banks off=%0d isolated bank reads=%0d banks re-enabled=%0d",
             n_dropped, n_isolated, n_reon);
    $display("out-of-range reads=%0d R-memory row pulses=%0d", n_oor, n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
