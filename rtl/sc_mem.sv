// Configuration SRAM of the cell (16x1 LUT memory or the routing/mode bits).
//
// N_BITS single-bit cells, all read in parallel (the LUT multiplexer and the
// routing selects see every bit at once) and written one bit at a time
// through a synchronous port: when we is high at a rising clk edge, cell
// addr takes din. The cells have no reset; they are meant to be programmed
// before use. The bit-wide write port is this design's choice: the document
// does not say how the programming bits are loaded.
//
// Fault model: one cell can be held at 0 or 1 by a stuck transistor
// (flt_kind FK_STUCK0/FK_STUCK1 on cell flt_idx). The cell then reads the
// forced value, and whenever the value written into it differs from the
// forced one the write path and the cell fight, drawing a static supply
// current that the built-in current sensor sees: iddq[i] goes high. A fault
// that does not change the stored value draws no current and changes
// nothing. This current model is this design's reading of the document's
// statement that the current sensor detects faults in the memory elements.
module sc_mem
  import sc_pkg::*;
#(
  parameter int unsigned N_BITS = 16,
  localparam int unsigned AW = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic              din,
  output logic [N_BITS-1:0] q,
  input  logic              flt_en,
  input  logic [FIDX_W-1:0] flt_idx,
  input  fault_kind_t       flt_kind,
  output logic [N_BITS-1:0] iddq
);

  logic [N_BITS-1:0] bits;   // value written into each cell

  always_ff @(posedge clk) begin
    if (we && int'(addr) < int'(N_BITS)) bits[addr] <= din;
  end

  always_comb begin
    logic stuck, forced;
    stuck  = flt_en && (flt_kind == FK_STUCK0 || flt_kind == FK_STUCK1);
    forced = (flt_kind == FK_STUCK1);
    q    = bits;
    iddq = '0;
    for (int unsigned i = 0; i < N_BITS; i++) begin
      if (stuck && int'(flt_idx) == int'(i)) begin
        q[i] = forced;
        iddq[i] = (bits[i] != forced);
      end
    end
  end

endmodule
