// End-to-end testbench for the self-checking CLB at its default size
// (4-input LUT, four 4-input routing multiplexers).
//
// A reference model in this file computes the cell's function from the
// configuration it wrote: I_k = route_in[k][sel_k], F = LUT[I4..I1], and a
// reference flip-flop. The test then
//   1. programs random functions and routings and checks the combinational
//      mode, the registered mode, the mode switch by rewriting out_sel and
//      the flip-flop's reset value, with the checker reading 00 or 11
//      throughout (no false alarm);
//   2. injects, one at a time, every single fault of every unit (stuck-open
//      and stuck-close transistors of all multiplexers, their select and
//      checker inverters, stuck SRAM cells and a stuck flip-flop), runs
//      random inputs under a fresh random configuration, and requires that
//      whenever clb_out differs from the reference the checker has already
//      reported 01 or 10, in that cycle or before.
// Each mechanism (both modes, reset, mode switch, both fault-free codes,
// detection of each fault class) must occur at least once.
module tb_sc_clb;
  import sc_pkg::*;
  localparam int unsigned K = 4, RS = 2;
  localparam int unsigned LUT_BITS = 2 ** K, CFG_BITS = K * RS + 2;
  localparam int unsigned CAW = $clog2(LUT_BITS + CFG_BITS);
  localparam int unsigned NCYC = 120;   // cycles per fault

  logic clk = 0, rst_n, cfg_we, cfg_din, clb_out;
  logic [CAW-1:0] cfg_addr;
  logic [K-1:0][2**RS-1:0] route_in;
  fault_t flt;
  logic [1:0] err;

  sc_clb dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_din, .route_in, .flt, .clb_out, .err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_comb = 0, n_reg = 0, n_reset = 0, n_switch = 0, n_ok00 = 0, n_ok11 = 0;
  int n_det_open = 0, n_det_closed = 0, n_det_selinv = 0, n_det_chk = 0, n_det_mem = 0;
  int n_faults = 0, n_detected = 0, n_corrupt = 0;

  // reference model state
  logic [LUT_BITS-1:0] r_lut;
  logic [CFG_BITS-1:0] r_cfg;
  logic                r_q;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_f(logic [K-1:0][2**RS-1:0] rin, logic [LUT_BITS-1:0] lut,
                                 logic [CFG_BITS-1:0] cfg);
    logic [K-1:0] a;
    for (int k = 0; k < K; k++) a[k] = rin[k][cfg[RS*k +: RS]];
    return lut[a];
  endfunction

  task automatic cfg_write(int unsigned a, logic v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = CAW'(a); cfg_din = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic configure(logic [LUT_BITS-1:0] lut, logic [CFG_BITS-1:0] cfg);
    for (int unsigned i = 0; i < LUT_BITS; i++) cfg_write(i, lut[i]);
    for (int unsigned i = 0; i < CFG_BITS; i++) cfg_write(LUT_BITS + i, cfg[i]);
    r_lut = lut;
    r_cfg = cfg;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    @(posedge clk);
    r_q = r_cfg[K*RS+1];
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (r_cfg[K*RS] && clb_out !== r_q) begin
      failures++;
      $display("reset value: got %b expected %b", clb_out, r_q);
    end
    if (r_cfg[K*RS] && !flt.en) n_reset++;
    // the flip-flop samples F at the next edge, before the first cycle()
    @(posedge clk);
    r_q = ref_f(route_in, r_lut, r_cfg);
    #1;
  endtask

  // One cycle with random routing lines. faulty = 1: only require that a
  // wrong output is never silent. Returns whether the checker flagged.
  task automatic cycle(bit faulty, inout bit flagged);
    logic f, want;
    @(negedge clk);
    route_in = (K * 2**RS)'($urandom);
    #1;
    f    = ref_f(route_in, r_lut, r_cfg);
    want = r_cfg[K*RS] ? r_q : f;
    if (err[1] != err[0]) flagged = 1;
    checks++;
    if (!faulty) begin
      if (clb_out !== want || err[1] != err[0]) begin
        failures++;
        $display("fault-free mismatch: out=%b want=%b err=%b", clb_out, want, err);
      end
      if (r_cfg[K*RS]) n_reg++; else n_comb++;
      if (err == 2'b00) n_ok00++;
      if (err == 2'b11) n_ok11++;
    end else if (clb_out !== want) begin
      n_corrupt++;
      if (!flagged) begin
        failures++;
        $display("silent corruption: unit=%s idx=%0d kind=%s", flt.unit.name(), flt.idx,
                 flt.kind.name());
      end
    end
    @(posedge clk);
    r_q = f;
  endtask

  initial begin
    bit flagged;
    int unsigned nsites;
    cfg_we = 0; cfg_addr = '0; cfg_din = 0; rst_n = 1; route_in = '0;
    flt = '0;

    // ---- fault-free: both modes and the mode switch ----
    for (int r = 0; r < 8; r++) begin
      configure(LUT_BITS'($urandom), CFG_BITS'($urandom));
      do_reset();
      flagged = 0;
      for (int c = 0; c < 50; c++) cycle(0, flagged);
      // switch mode by rewriting out_sel only
      cfg_write(LUT_BITS + K * RS, ~r_cfg[K*RS]);
      r_cfg[K*RS] = ~r_cfg[K*RS];
      // the flip-flop kept sampling F during the write cycles
      r_q = ref_f(route_in, r_lut, r_cfg);
      n_switch++;
      for (int c = 0; c < 50; c++) cycle(0, flagged);
    end

    // ---- single-fault campaign over every unit ----
    for (int u = 0; u <= int'(U_DFF); u++) begin
      case (u)
        int'(U_MUX16):  nsites = mux_nsites(K);
        int'(U_MUX2):   nsites = mux_nsites(1);
        int'(U_LUTMEM): nsites = LUT_BITS;
        int'(U_CFGMEM): nsites = CFG_BITS;
        int'(U_DFF):    nsites = 1;
        default:        nsites = mux_nsites(RS);
      endcase
      for (int unsigned s = 0; s < nsites; s++) begin
        for (int kk = 0; kk < 2; kk++) begin
          flt = '0;
          configure(LUT_BITS'($urandom), CFG_BITS'($urandom));
          do_reset();
          flt.en   = 1;
          flt.unit = unit_t'(u);
          flt.idx  = FIDX_W'(s);
          if (u >= int'(U_LUTMEM)) flt.kind = (kk != 0) ? FK_STUCK1 : FK_STUCK0;
          else                     flt.kind = (kk != 0) ? FK_CLOSED : FK_OPEN;
          flagged = 0;
          n_faults++;
          for (int c = 0; c < NCYC; c++) cycle(1, flagged);
          if (flagged) begin
            n_detected++;
            if (u >= int'(U_LUTMEM)) n_det_mem++;
            else begin
              int unsigned n, ntg;
              n   = (u == int'(U_MUX16)) ? K : (u == int'(U_MUX2)) ? 1 : RS;
              ntg = mux_ntg(n);
              if (s >= 2 * ntg + n)      n_det_chk++;
              else if (s >= 2 * ntg)     n_det_selinv++;
              else if (kk == 1)          n_det_closed++;
              else                       n_det_open++;
            end
          end
        end
      end
    end
    flt = '0;

    $display("modes: comb=%0d reg=%0d reset=%0d switch=%0d codes 00=%0d 11=%0d",
             n_comb, n_reg, n_reset, n_switch, n_ok00, n_ok11);
    $display("faults: injected=%0d flagged=%0d corrupting cycles=%0d", n_faults, n_detected,
             n_corrupt);
    $display("detected: stuck-open=%0d stuck-close=%0d select-inverter=%0d checker-inverter=%0d memory=%0d",
             n_det_open, n_det_closed, n_det_selinv, n_det_chk, n_det_mem);
    begin
      int seen [11];
      seen = '{n_comb, n_reg, n_reset, n_switch, n_ok00, n_ok11, n_det_open, n_det_closed,
               n_det_selinv, n_det_chk, n_det_mem};
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (seen[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
      checks++;
      if (n_corrupt == 0) begin
        failures++;
        $display("no fault ever corrupted the output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
