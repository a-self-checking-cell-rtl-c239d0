// Testbench for err_ctrl: all 2^14 combinations of the seven check pairs.
// The expected result is worked out by counting the faulty pairs (e1 != e2):
// the two rails must differ exactly when that count is odd, and z[1] must be
// the parity of the e1 bits.
module tb_err_ctrl;
  localparam int unsigned N = 7;
  logic [N-1:0] e1, e2;
  logic [1:0]   z;
  int checks = 0, failures = 0;

  err_ctrl #(.N_IN(N)) dut (.e1, .e2, .z);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nbad, p1;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {e1, e2} = v[2*N-1:0];
      #1;
      nbad = 0;
      p1   = 0;
      for (int i = 0; i < N; i++) begin
        if (e1[i] != e2[i]) nbad++;
        if (e1[i]) p1++;
      end
      checks++;
      if ((z[1] != z[0]) != (nbad % 2 == 1) || z[1] != (p1 % 2 == 1)) begin
        failures++;
        if (failures < 10) $display("mismatch e1=%b e2=%b z=%b", e1, e2, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
