// Testbench for sc_mem: bit-wise writes and parallel read-back of the 16-bit
// LUT memory, then every single stuck-at cell fault: the faulty cell must
// read the forced value and draw current (iddq) exactly while the written
// value differs, and no other cell may be affected.
module tb_sc_mem;
  import sc_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, we, din, flt_en;
  logic [3:0] addr;
  logic [N-1:0] q, iddq, model;
  logic [FIDX_W-1:0] flt_idx;
  fault_kind_t flt_kind;
  int checks = 0, failures = 0;

  sc_mem #(.N_BITS(N)) dut (.clk, .we, .addr, .din, .q, .flt_en, .flt_idx, .flt_kind, .iddq);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_bit(int a, logic v);
    we = 1; addr = 4'(a); din = v;
    @(negedge clk);
    we = 0;
    model[a] = v;
  endtask

  task automatic check(logic [N-1:0] xq, logic [N-1:0] xi);
    checks++;
    if (q !== xq || iddq !== xi) begin
      failures++;
      $display("q=%h iddq=%h expected %h %h", q, iddq, xq, xi);
    end
  endtask

  initial begin
    logic [N-1:0] xq, xi;
    logic forced;
    we = 0; din = 0; addr = 0; flt_en = 0; flt_idx = '0; flt_kind = FK_STUCK0;
    @(negedge clk);
    for (int a = 0; a < N; a++) write_bit(a, 1'($urandom));
    check(model, '0);
    for (int r = 0; r < 100; r++) begin
      write_bit(int'($urandom % N), 1'($urandom));
      check(model, '0);
    end
    // single stuck faults on every cell
    for (int c = 0; c < N; c++) begin
      for (int k = 0; k < 2; k++) begin
        flt_en = 1; flt_idx = FIDX_W'(c);
        flt_kind = (k != 0) ? FK_STUCK1 : FK_STUCK0;
        forced = k[0];
        for (int r = 0; r < 6; r++) begin
          write_bit(r < 2 ? c : int'($urandom % N), r < 2 ? 1'(r) : 1'($urandom));
          #1;
          xq = model; xq[c] = forced;
          xi = '0;    xi[c] = (model[c] != forced);
          check(xq, xi);
        end
      end
    end
    flt_en = 0;
    #1 check(model, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
