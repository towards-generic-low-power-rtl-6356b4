// tb_scm_onehot_mux: checks the AND-OR read multiplexer at its default size
// (88 words of 135 bits). Random words are loaded, then every one-hot select
// and the all-zero select are applied. The expected output is the selected
// word, or zero.
module tb_scm_onehot_mux;
  localparam int unsigned R = 88;
  localparam int unsigned C = 135;

  logic [R-1:0] sel;
  logic [C-1:0] rows [R];
  logic [C-1:0] dout;
  int checks = 0, failures = 0;

  scm_onehot_mux #(.R(R), .C(C)) dut (.sel(sel), .rows(rows), .dout(dout));

  function automatic logic [C-1:0] rand_word();
    logic [C-1:0] w;
    for (int i = 0; i < int'(C); i += 32) w = {w[C-1:0] << 32} | C'($urandom);
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      for (int r = 0; r < int'(R); r++) rows[r] = rand_word();
      sel = '0;
      #1;
      checks++;
      if (dout !== '0) begin
        failures++;
        $display("FAIL zero select gave %h", dout);
      end
      for (int r = 0; r < int'(R); r++) begin
        sel = '0;
        sel[r] = 1'b1;
        #1;
        checks++;
        if (dout !== rows[r]) begin
          failures++;
          $display("FAIL select %0d: %h expected %h", r, dout, rows[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
