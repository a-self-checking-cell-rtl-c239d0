// Test harness for one size of sc_mux, used by tb_sc_mux.
//
// Drives a 2^N_SEL-input self-checking multiplexer fault-free and under every
// single fault of the numbering in sc_pkg, and checks:
//   * fault-free: the output class, y and the e1,e2 pair follow the selected
//     input (LOW -> 11, HIGH -> 00);
//   * any fault: whenever y is wrong, the pair must read 10 or 01
//     (the fault is never silent while it corrupts the output);
//   * every fault is flagged by at least one input pattern;
//   * for N_SEL = 2, the two fault cases worked through in the design: a
//     stuck-close transistor in the gate of I0 while I1 is selected with
//     I0 = 1, I1 = 0, and a stuck-open nMOS on the selected line passing 0,
//     both giving a window voltage read as e1,e2 = 1,0.
module tb_sc_mux_harness
  import sc_pkg::*;
#(
  parameter int unsigned N_SEL = 2,
  parameter int unsigned NVEC  = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NIN    = 2 ** N_SEL;
  localparam int unsigned NTG    = 2 * NIN - 2;
  localparam int unsigned NSITES = 2 * NTG + N_SEL + 2;
  localparam bit EXHAUST = (N_SEL <= 2);

  logic [N_SEL-1:0]  sel;
  logic [NIN-1:0]    d;
  logic              flt_en;
  logic [FIDX_W-1:0] flt_idx;
  fault_kind_t       flt_kind;
  vlevel_t           vout;
  logic              y, e1, e2;

  sc_mux #(.N_SEL(N_SEL)) dut (.sel, .d, .flt_en, .flt_idx, .flt_kind, .vout, .y, .e1, .e2);

  task automatic fail(string what);
    failures++;
    if (failures < 20)
      $display("N_SEL=%0d %s: sel=%0d d=%b flt=%0d/%0d/%s vout=%s y=%b e=%b%b",
               N_SEL, what, sel, d, flt_en, flt_idx, flt_kind.name(), vout.name(), y, e1, e2);
  endtask

  task automatic pattern(int unsigned v);
    if (EXHAUST) {d, sel} = (N_SEL + NIN)'(v);
    else begin
      sel = N_SEL'($urandom);
      d   = NIN'({$urandom, $urandom});
    end
  endtask

  initial begin
    int unsigned nv;
    bit seen;
    logic want;
    done = 0; checks = 0; failures = 0;
    flt_en = 0; flt_idx = '0; flt_kind = FK_OPEN;
    nv = EXHAUST ? (1 << (N_SEL + NIN)) : NVEC;

    // fault-free behaviour
    for (int unsigned v = 0; v < nv; v++) begin
      pattern(v);
      #1;
      want = d[sel];
      checks++;
      if (y !== want || vout !== (want ? V_HIGH : V_LOW) || e1 !== ~want || e2 !== ~want)
        fail("fault-free");
    end

    // every single fault
    for (int unsigned site = 0; site < NSITES; site++) begin
      for (int kk = 0; kk < 2; kk++) begin
        if (kk == 1 && site >= 2 * NTG) continue;   // inverters: one fault each
        flt_en = 1; flt_idx = FIDX_W'(site);
        flt_kind = (kk != 0) ? FK_CLOSED : FK_OPEN;
        seen = 0;
        for (int unsigned v = 0; v < nv; v++) begin
          pattern(v);
          #1;
          checks++;
          if (y !== d[sel] && e1 == e2) fail("silent wrong output");
          if (e1 != e2) seen = 1;
        end
        checks++;
        if (!seen) fail("fault never flagged");
      end
    end

    if (N_SEL == 2) begin
      // stuck-close in the gate of I0 (leaf 0 is heap node NIN, gate NIN-2)
      flt_en = 1; flt_kind = FK_CLOSED;
      flt_idx = FIDX_W'(2 * (NIN - 2));
      sel = N_SEL'(1); d = NIN'(4'b0001);
      #1; checks++;
      if (vout !== V_MID || e1 !== 1'b1 || e2 !== 1'b0) fail("stuck-close example");
      // same fault, inputs equal: the output stays correct and nothing is flagged
      d = NIN'(4'b0011);
      #1; checks++;
      if (vout !== V_HIGH || e1 !== 1'b0 || e2 !== 1'b0) fail("stuck-close masked");
      // stuck-open nMOS in the gate of I1 with I1 selected, passing 0
      flt_kind = FK_OPEN;
      flt_idx = FIDX_W'(2 * (NIN + 1 - 2));
      sel = N_SEL'(1); d = NIN'(4'b1101);
      #1; checks++;
      if (vout !== V_MID || e1 !== 1'b1 || e2 !== 1'b0) fail("stuck-open example");
    end
    flt_en = 0;
    done = 1;
  end
endmodule
