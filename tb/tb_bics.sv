// Testbench for bics: no anomalous current gives the fault-free pair 00;
// each single memory element drawing current, and random sets of them, must
// give the error pair 10.
module tb_bics;
  localparam int unsigned N = 27;
  logic [N-1:0] iddq;
  logic e1, e2;
  int checks = 0, failures = 0;

  bics #(.N_ELEM(N)) dut (.iddq, .e1, .e2);

  task automatic expect_pair(logic x1, logic x2);
    #1;
    checks++;
    if (e1 !== x1 || e2 !== x2) begin
      failures++;
      $display("iddq=%b: got %b%b expected %b%b", iddq, e1, e2, x1, x2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iddq = '0;
    expect_pair(1'b0, 1'b0);
    for (int i = 0; i < N; i++) begin
      iddq = '0;
      iddq[i] = 1'b1;
      expect_pair(1'b1, 1'b0);
    end
    for (int r = 0; r < 200; r++) begin
      iddq = N'({$urandom, $urandom});
      expect_pair(iddq != 0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
