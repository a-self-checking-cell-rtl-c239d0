// Shared types and constants of the self-checking CLB.
//
// The multiplexers of the cell are pass-transistor circuits whose fault
// detection relies on intermediate voltages, so their output node is carried
// as a three-level value (vlevel_t) rather than a bit. Internal tree nodes of
// a multiplexer carry the set of drivers that reach them (drive_t): strong or
// degraded (one-transistor) paths to 0 and to 1.
//
// Single faults are injected through one fault_t descriptor that names a unit
// of the cell, a transistor or memory cell inside it, and the kind of fault.
// The unit codes, the transistor numbering and the fault kinds are choices of
// this model; the cell's geometry (4-input LUT, 2-bit MUX4 selects, 7 checked
// pairs) follows the design.
package sc_pkg;

  // Voltage class of a multiplexer output node against the two checker
  // thresholds VT1 < VT2: below VT1, between them, above VT2.
  typedef enum logic [1:0] {
    V_LOW  = 2'd0,
    V_MID  = 2'd1,
    V_HIGH = 2'd2
  } vlevel_t;

  // Drivers reaching a node of a transmission-gate tree.
  typedef struct packed {
    logic s0;  // full-swing path to a 0
    logic s1;  // full-swing path to a 1
    logic w0;  // degraded 0 (passed by a pMOS alone)
    logic w1;  // degraded 1 (passed by an nMOS alone)
  } drive_t;

  // Kinds of single fault.
  typedef enum logic [1:0] {
    FK_OPEN   = 2'd0,  // transistor stuck-open
    FK_CLOSED = 2'd1,  // transistor stuck-close (always conducting)
    FK_STUCK0 = 2'd2,  // memory element held at 0 by a stuck transistor
    FK_STUCK1 = 2'd3   // memory element held at 1 by a stuck transistor
  } fault_kind_t;

  // Units of the cell a fault can sit in.
  typedef enum logic [3:0] {
    U_MUX4_0 = 4'd0,   // input selector for I1
    U_MUX4_1 = 4'd1,   // input selector for I2
    U_MUX4_2 = 4'd2,   // input selector for I3
    U_MUX4_3 = 4'd3,   // input selector for I4
    U_MUX16  = 4'd4,   // LUT output multiplexer
    U_MUX2   = 4'd5,   // combinational / registered output select
    U_LUTMEM = 4'd6,   // 16x1 LUT SRAM
    U_CFGMEM = 4'd7,   // configuration SRAM
    U_DFF    = 4'd8    // D flip-flop
  } unit_t;

  localparam int unsigned FIDX_W = 8;

  typedef struct packed {
    logic              en;
    unit_t             unit;
    logic [FIDX_W-1:0] idx;
    fault_kind_t       kind;
  } fault_t;

  // Transistor numbering inside a multiplexer with n select bits:
  //   0 .. 2*NTG-1          transmission gates, 2*g = nMOS, 2*g+1 = pMOS of gate g
  //   2*NTG .. 2*NTG+n-1    select-line inverters
  //   2*NTG+n, 2*NTG+n+1    checker inverters driving e1, e2
  // with NTG = 2^(n+1) - 2 transmission gates.
  function automatic int unsigned mux_ntg(int unsigned n);
    return (2 ** (n + 1)) - 2;
  endfunction

  function automatic int unsigned mux_nsites(int unsigned n);
    return 2 * mux_ntg(n) + n + 2;
  endfunction

endpackage
