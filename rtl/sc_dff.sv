// D flip-flop of the cell, storing the LUT output for the registered mode.
//
// Rising-edge flip-flop with a synchronous, active-low reset that loads
// init_val, a configuration bit of the cell. The reset and the init bit are
// this design's choice; the document only says one of the configuration bits
// configures the flip-flop.
//
// Fault model, as for the SRAM cells: a stuck transistor can hold the
// flip-flop at 0 or 1 (FK_STUCK0/FK_STUCK1 with flt_en). q then shows the
// forced value, and iddq is high while the value clocked in differs from it,
// the static current that the built-in current sensor detects.
module sc_dff
  import sc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init_val,
  input  logic        d,
  output logic        q,
  input  logic        flt_en,
  input  fault_kind_t flt_kind,
  output logic        iddq
);

  logic state;   // value clocked in

  always_ff @(posedge clk) begin
    if (!rst_n) state <= init_val;
    else        state <= d;
  end

  always_comb begin
    logic stuck, forced;
    stuck  = flt_en && (flt_kind == FK_STUCK0 || flt_kind == FK_STUCK1);
    forced = (flt_kind == FK_STUCK1);
    q    = stuck ? forced : state;
    iddq = stuck && (state != forced);
  end

endmodule
