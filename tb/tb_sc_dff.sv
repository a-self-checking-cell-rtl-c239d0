// Testbench for sc_dff: reset loads init_val, data is captured on each rising
// edge, and a stuck fault forces q and raises iddq exactly while the clocked
// value differs from the forced one.
module tb_sc_dff;
  import sc_pkg::*;
  logic clk = 0, rst_n, init_val, d, q, flt_en, iddq;
  fault_kind_t flt_kind;
  logic model;   // expected clocked value
  int checks = 0, failures = 0;

  sc_dff dut (.clk, .rst_n, .init_val, .d, .q, .flt_en, .flt_kind, .iddq);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic xq, logic xi);
    checks++;
    if (q !== xq || iddq !== xi) begin
      failures++;
      $display("t=%0t q=%b iddq=%b expected %b %b", $time, q, iddq, xq, xi);
    end
  endtask

  initial begin
    logic forced;
    flt_en = 0; flt_kind = FK_STUCK0; d = 0;
    for (int iv = 0; iv < 2; iv++) begin
      rst_n = 0; init_val = iv[0];
      @(negedge clk);
      check(iv[0], 1'b0);
    end
    rst_n = 1;
    model = init_val;
    for (int f = 0; f < 3; f++) begin
      flt_en   = (f != 0);
      flt_kind = (f == 2) ? FK_STUCK1 : FK_STUCK0;
      forced   = (f == 2);
      for (int i = 0; i < 300; i++) begin
        d = 1'($urandom);
        @(negedge clk);
        model = d;
        if (flt_en) check(forced, model != forced);
        else        check(model, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
