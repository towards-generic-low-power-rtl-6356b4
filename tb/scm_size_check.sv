// scm_size_check: drives one scm_latch of a given size with random traffic
// and checks every read against a reference array.
//
// After two idle cycles it writes every word, then runs CYCLES cycles. Each
// cycle has a random write (enabled three times in four) to a random word
// other than the one being read, and a random read. Inputs change 1 time unit
// after the rising edge. A read registered at an edge must return the word as
// of that edge. The counts are final when done rises.
module scm_size_check #(
  parameter int unsigned R      = 16,
  parameter int unsigned C      = 8,
  parameter int unsigned CYCLES = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW = (R > 1) ? $clog2(R) : 1;

  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [C-1:0]  wdata = '0;
  logic [AW-1:0] raddr = '0;
  logic [C-1:0]  rdata;
  logic [C-1:0]  model [R];

  scm_latch #(.R(R), .C(C)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  function automatic logic [C-1:0] rand_word();
    logic [C-1:0] w = '0;
    for (int i = 0; i < int'(C); i += 32) w = (w << 32) | C'($urandom);
    return w;
  endfunction

  initial begin
    logic [AW-1:0] raddr_reg;
    logic          pend_we;
    logic [AW-1:0] pend_addr;
    logic [C-1:0]  pend_data;
    done = 1'b0; checks = 0; failures = 0;
    raddr = AW'(R - 1);
    @(posedge clk); #1;
    @(posedge clk); #1;      // read register now holds R-1, no write pending
    for (int a = 0; a < int'(R); a++) begin
      // write word a; the registered read address is a-1 (R-1 at first)
      we = 1'b1; waddr = AW'(a); wdata = rand_word(); raddr = AW'(a);
      model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0;
    raddr = '0;
    @(posedge clk); #1;
    raddr_reg = raddr;
    pend_we = 1'b0;
    for (int i = 0; i < int'(CYCLES); i++) begin
      raddr = AW'($urandom_range(R - 1));
      we    = ($urandom_range(3) != 0) && (R > 1);
      do waddr = AW'($urandom_range(R - 1));
      while (R > 1 && waddr == raddr_reg);
      wdata = rand_word();
      pend_we = we; pend_addr = waddr; pend_data = wdata;
      @(posedge clk); #1;
      if (pend_we) model[pend_addr] = pend_data;
      raddr_reg = raddr;
      checks++;
      if (rdata !== model[raddr_reg]) begin
        failures++;
        if (failures < 5) $display("FAIL %0dx%0d read %0d: %h expected %h", R, C, raddr_reg, rdata, model[raddr_reg]);
      end
    end
    we   = 1'b0;
    done = 1'b1;
  end
endmodule
