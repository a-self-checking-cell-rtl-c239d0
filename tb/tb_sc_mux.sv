// Testbench for sc_mux at the three sizes the cell uses: MUX2 (1 select
// bit), MUX4 (2) and MUX16 (4). Each size runs in tb_sc_mux_harness; this
// module waits for all three and sums their results.
module tb_sc_mux;
  logic d1, d2, d4;
  int c1, c2, c4, f1, f2, f4;

  tb_sc_mux_harness #(.N_SEL(1)) h1 (.done(d1), .checks(c1), .failures(f1));
  tb_sc_mux_harness #(.N_SEL(2)) h2 (.done(d2), .checks(c2), .failures(f2));
  tb_sc_mux_harness #(.N_SEL(4), .NVEC(2000)) h4 (.done(d4), .checks(c4), .failures(f4));

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c4, f1 + f2 + f4 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d1 && d2 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c4, f1 + f2 + f4);
    $finish;
  end
endmodule
