// tb_scm_evaluated_sizes: runs the latch based SCM at the memory sizes used in
// the published area and power comparison. Each size gets random data written
// to random addresses and read from random addresses for 1000 cycles, and
// every read is checked.
//   Table of R x C: 16x8, 16x128, 32x8, 32x128, 64x8, 64x128, 128x8, 128x128
//   (16x128 is also the size of the technology comparison).
//   Corners of the 49-point sweep R = 8..512, C = 2..128: 8x2, 8x128, 512x2,
//   512x128.
module tb_scm_evaluated_sizes;
  localparam int NCFG = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   ck   [NCFG];
  int   fl   [NCFG];

  scm_size_check #(.R(16),  .C(8))   u0  (.clk(clk), .done(done[0]),  .checks(ck[0]),  .failures(fl[0]));
  scm_size_check #(.R(16),  .C(128)) u1  (.clk(clk), .done(done[1]),  .checks(ck[1]),  .failures(fl[1]));
  scm_size_check #(.R(32),  .C(8))   u2  (.clk(clk), .done(done[2]),  .checks(ck[2]),  .failures(fl[2]));
  scm_size_check #(.R(32),  .C(128)) u3  (.clk(clk), .done(done[3]),  .checks(ck[3]),  .failures(fl[3]));
  scm_size_check #(.R(64),  .C(8))   u4  (.clk(clk), .done(done[4]),  .checks(ck[4]),  .failures(fl[4]));
  scm_size_check #(.R(64),  .C(128)) u5  (.clk(clk), .done(done[5]),  .checks(ck[5]),  .failures(fl[5]));
  scm_size_check #(.R(128), .C(8))   u6  (.clk(clk), .done(done[6]),  .checks(ck[6]),  .failures(fl[6]));
  scm_size_check #(.R(128), .C(128)) u7  (.clk(clk), .done(done[7]),  .checks(ck[7]),  .failures(fl[7]));
  scm_size_check #(.R(8),   .C(2))   u8  (.clk(clk), .done(done[8]),  .checks(ck[8]),  .failures(fl[8]));
  scm_size_check #(.R(8),   .C(128)) u9  (.clk(clk), .done(done[9]),  .checks(ck[9]),  .failures(fl[9]));
  scm_size_check #(.R(512), .C(2))   u10 (.clk(clk), .done(done[10]), .checks(ck[10]), .failures(fl[10]));
  scm_size_check #(.R(512), .C(128)) u11 (.clk(clk), .done(done[11]), .checks(ck[11]), .failures(fl[11]));

  int checks = 0, failures = 0;

  initial begin
    #(5000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      checks   += ck[i];
      failures += fl[i];
      checks++;
      if (ck[i] < 1000) begin
        failures++;
        $display("FAIL configuration %0d ran only %0d reads", i, ck[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
