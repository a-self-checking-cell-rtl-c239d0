// Self-checking pass-transistor multiplexer (behavioural model).
//
// A 2^N_SEL-input multiplexer built as a binary tree of CMOS transmission
// gates: the leaf level is steered by sel[0], the gate next to the output by
// sel[N_SEL-1], and each select bit has an inverter making its complement.
// Three parts are added to make it self-checking:
//   * a weak nMOS (M21) that pulls the output node towards Vref, with
//     VT1 < Vref < VT2, so a floating or degraded output lands between the
//     thresholds;
//   * two inverters with different switching thresholds reading the output
//     node. The e2 inverter switches at VT1, the e1 inverter at VT2, so
//         out below VT1  -> e1,e2 = 1,1
//         out in window  -> e1,e2 = 1,0
//         out above VT2  -> e1,e2 = 0,0
//     A fault-free cell always gives 00 or 11; 10 or 01 marks a fault.
//
// This is a model of a transistor-level circuit, not logic to synthesise as
// written: node voltages are reduced to the three classes of sc_pkg::vlevel_t.
// Each tree node collects the drivers reaching it: full-swing 0/1 through
// complete transmission gates, degraded 0/1 through a pMOS or nMOS alone. Any
// mix of a 0 and a 1 (a stuck-close gate shorting two inputs) is taken to sit
// in the window, as is a node with only degraded or no drivers (M21 wins).
// These resolution rules are this model's; the document gives them only as
// the outcome of its circuit sizing.
//
// Fault injection (one fault at a time, flt_en high): flt_idx numbers the
// transistors as in sc_pkg (transmission gates, then select inverters, then
// the two checker inverters). A transmission-gate transistor takes FK_OPEN or
// FK_CLOSED. A faulty select inverter drives its input value instead of the
// complement; a faulty checker inverter follows its input, flipping its e
// output. Both follow the document's description of inverter faults.
//
// Interface: purely combinational. y is the digital value a downstream gate
// reads: 1 only for an output above VT2 (a window voltage reads as 0, this
// model's choice).
module sc_mux
  import sc_pkg::*;
#(
  parameter int unsigned N_SEL = 2
) (
  input  logic [N_SEL-1:0]      sel,
  input  logic [2**N_SEL-1:0]   d,
  input  logic                  flt_en,
  input  logic [FIDX_W-1:0]     flt_idx,
  input  fault_kind_t           flt_kind,
  output vlevel_t               vout,
  output logic                  y,
  output logic                  e1,
  output logic                  e2
);

  localparam int unsigned NIN = 2 ** N_SEL;       // data inputs
  localparam int unsigned NN  = 2 * NIN;          // heap size: nodes 1 .. NN-1
  localparam int unsigned NTG = NN - 2;           // transmission gates
  localparam int unsigned IDX_INV = 2 * NTG;      // first select inverter
  localparam int unsigned IDX_CHK = 2 * NTG + N_SEL;  // checker inverters

  drive_t node [NN];
  drive_t root;

  // Transmission gate of child c: nMOS and pMOS conduction with the fault
  // applied.
  function automatic drive_t pass_tg(drive_t din, logic n_on, logic p_on);
    drive_t r;
    r = '0;
    if (n_on && p_on) begin
      r = din;
    end else if (n_on) begin
      // an nMOS alone passes 0 fully but 1 degraded
      r.s0 = din.s0;
      r.w0 = din.w0;
      r.w1 = din.s1 | din.w1;
    end else if (p_on) begin
      // a pMOS alone passes 1 fully but 0 degraded
      r.s1 = din.s1;
      r.w1 = din.w1;
      r.w0 = din.s0 | din.w0;
    end
    return r;
  endfunction

  always_comb begin
    int unsigned k;
    int unsigned t;
    logic s, sb, ng, pg, n_on, p_on;
    logic n_open, n_closed, p_open, p_closed;
    for (int unsigned i = 0; i < NN; i++) node[i] = '0;
    for (int unsigned j = 0; j < NIN; j++) begin
      node[NIN+j].s0 = ~d[j];
      node[NIN+j].s1 = d[j];
    end
    // level by level from the leaves (depth N_SEL) to the output gate
    for (int unsigned dd = N_SEL; dd >= 1; dd--) begin
      for (int unsigned c = 2 ** dd; c < 2 ** (dd + 1); c++) begin
        k  = N_SEL - dd;
        t  = c - 2;
        s  = sel[k];
        sb = (flt_en && int'(flt_idx) == int'(IDX_INV + k)) ? sel[k] : ~sel[k];
        // right child: nMOS gate = sel, pMOS gate = complement; left: swapped
        if (c[0]) begin ng = s;  pg = sb; end
        else      begin ng = sb; pg = s;  end
        n_open   = flt_en && int'(flt_idx) == int'(2*t)   && flt_kind == FK_OPEN;
        n_closed = flt_en && int'(flt_idx) == int'(2*t)   && flt_kind == FK_CLOSED;
        p_open   = flt_en && int'(flt_idx) == int'(2*t+1) && flt_kind == FK_OPEN;
        p_closed = flt_en && int'(flt_idx) == int'(2*t+1) && flt_kind == FK_CLOSED;
        n_on = n_closed | (~n_open & ng);
        p_on = p_closed | (~p_open & ~pg);
        node[c>>1] = drive_t'(node[c>>1] | pass_tg(node[c], n_on, p_on));
      end
    end
    root = node[1];
  end

  // Output node with the M21 pull towards Vref.
  always_comb begin
    if ((root.s0 | root.w0) && (root.s1 | root.w1)) vout = V_MID;
    else if (root.s0)                               vout = V_LOW;
    else if (root.s1)                               vout = V_HIGH;
    else                                            vout = V_MID;
  end

  // Checker inverters (e2 at threshold VT1, e1 at VT2).
  always_comb begin
    logic chk1_flt, chk2_flt;
    chk1_flt = flt_en && int'(flt_idx) == int'(IDX_CHK);
    chk2_flt = flt_en && int'(flt_idx) == int'(IDX_CHK + 1);
    e1 = (vout != V_HIGH) ^ chk1_flt;
    e2 = (vout == V_LOW)  ^ chk2_flt;
    y  = (vout == V_HIGH);
  end

endmodule
