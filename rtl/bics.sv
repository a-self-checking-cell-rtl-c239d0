// Built-in current sensor (BICS) on the supply of the cell's memory elements
// (behavioural model).
//
// The Vcc and Gnd nodes of all memory elements (LUT SRAM, configuration SRAM
// and the flip-flop) are connected through the sensor, which flags a static
// supply current above what fault-free cells draw. In this model each memory
// element reports whether it draws anomalous current (iddq), and the sensor
// trips when any one does; the analog threshold is not modelled. The sensor
// result is given as a pair like the multiplexer checkers, so it can enter
// the same parity checker: e1,e2 = 0,0 when the current is normal and 1,0
// when it is anomalous. This output coding is this model's choice.
//
// Interface: combinational, N_ELEM current flags in, one check pair out.
module bics #(
  parameter int unsigned N_ELEM = 27
) (
  input  logic [N_ELEM-1:0] iddq,
  output logic              e1,
  output logic              e2
);

  always_comb begin
    e1 = |iddq;
    e2 = 1'b0;
  end

endmodule
