// Fault activation conditions of a routing multiplexer, checked at the cell
// output (default-size sc_clb).
//
// The LUT is programmed as F = I1 and the cell runs combinationally, so
// clb_out shows the output of routing multiplexer 0. For every select value
// and every pattern on its four lines, with one fault at a time in that
// multiplexer, the error code must read 01/10 exactly when the fault is
// activated:
//   * stuck-close transistor in the gate of line j: j is not selected, the
//     gate joins j to the selected path (same first-level pair, or the
//     second-level gate of the unselected pair), and the two values differ;
//   * stuck-open nMOS on the selected path: the selected value is 0 (a pMOS
//     alone passes it degraded); stuck-open pMOS: the selected value is 1;
//   * select inverter of the first level: flagged at least whenever the two
//     lines of the selected pair differ.
// Without a flag, clb_out must equal the selected line.
module tb_sc_clb_activation;
  import sc_pkg::*;
  localparam int unsigned K = 4, RS = 2, LUT_BITS = 16, CFG_BITS = 10, CAW = 5;

  logic clk = 0, rst_n = 1, cfg_we = 0, cfg_din = 0, clb_out;
  logic [CAW-1:0] cfg_addr = '0;
  logic [K-1:0][2**RS-1:0] route_in;
  fault_t flt;
  logic [1:0] err;

  sc_clb dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_din, .route_in, .flt, .clb_out, .err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flagged = 0, n_quiet = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(int unsigned a, logic v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = CAW'(a); cfg_din = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Expected activation of a fault in routing multiplexer 0.
  // site: transistor index (sc_pkg numbering), s: select, v: line values.
  function automatic logic activated(int unsigned site, fault_kind_t kind, int unsigned s,
                                     logic [3:0] v, output bit decided);
    int unsigned g, node, lvl_pair;
    logic is_n;
    decided = 1;
    if (site >= 12) begin
      // select inverter of the first level (site 12): the document only
      // says a difference between the two lines is flagged
      decided = (site == 12) && (v[{s[1], 1'b0}] != v[{s[1], 1'b1}]);
      return 1'b1;
    end
    g    = site / 2;
    is_n = (site % 2 == 0);
    node = g + 2;                       // heap node the gate connects upwards
    if (kind == FK_CLOSED) begin
      if (node >= 4) begin              // leaf gate of line j
        lvl_pair = (node - 4) / 2;
        return (node - 4) != s && lvl_pair == s / 2 && v[node-4] != v[s];
      end else begin                    // second-level gate of pair node-2
        return (node - 2) != s / 2 && v[{1'(node - 2), s[0]}] != v[s];
      end
    end else begin
      bit on_path;
      on_path = (node >= 4) ? ((node - 4) == s) : ((node - 2) == s / 2);
      return on_path && (is_n ? v[s] == 1'b0 : v[s] == 1'b1);
    end
  endfunction

  initial begin
    bit decided;
    logic exp_flag, flag;
    flt = '0;
    route_in = '0;
    for (int unsigned a = 0; a < LUT_BITS; a++) cfg_write(a, a[0]);   // F = I1
    for (int unsigned i = 0; i < CFG_BITS; i++) cfg_write(LUT_BITS + i, 1'b0);

    for (int unsigned site = 0; site < 13; site++) begin
      for (int kk = 0; kk < 2; kk++) begin
        if (site >= 12 && kk == 1) continue;
        for (int unsigned s = 0; s < 4; s++) begin
          flt = '0;
          cfg_write(LUT_BITS + 0, s[0]);
          cfg_write(LUT_BITS + 1, s[1]);
          flt.en = 1; flt.unit = U_MUX4_0; flt.idx = FIDX_W'(site);
          flt.kind = (kk != 0) ? FK_CLOSED : FK_OPEN;
          for (int unsigned v = 0; v < 16; v++) begin
            route_in = '0;
            route_in[0] = 4'(v);
            route_in[1] = 4'($urandom);
            route_in[2] = 4'($urandom);
            route_in[3] = 4'($urandom);
            #1;
            exp_flag = activated(site, flt.kind, s, 4'(v), decided);
            flag = (err[1] != err[0]);
            checks++;
            if (decided && flag != exp_flag) begin
              failures++;
              $display("site %0d %s sel=%0d lines=%b: flag=%b expected %b", site,
                       flt.kind.name(), s, 4'(v), flag, exp_flag);
            end
            checks++;
            if (!flag && clb_out !== route_in[0][s]) begin
              failures++;
              $display("site %0d %s sel=%0d lines=%b: silent wrong output", site,
                       flt.kind.name(), s, 4'(v));
            end
            if (flag) n_flagged++; else n_quiet++;
          end
        end
      end
    end
    checks++;
    if (n_flagged == 0 || n_quiet == 0) begin
      failures++;
      $display("activation never / always seen: flagged=%0d quiet=%0d", n_flagged, n_quiet);
    end
    $display("flagged=%0d quiet=%0d", n_flagged, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
