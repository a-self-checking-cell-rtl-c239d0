// Self-checking cell logic block (CLB) for an on-line testable FPGA.
//
// The cell is a K-input look-up table and a D flip-flop:
//   * K routing multiplexers (MUX4 for K = 4, RS = 2) each pick one of
//     2^RS lines of route_in as a LUT input I1..IK, steered by RS
//     configuration bits;
//   * a 2^K x 1 SRAM holds the LUT function and a 2^K-input multiplexer
//     (MUX16), addressed by I1..IK with I1 as the least significant select,
//     reads F(I1..IK) from it;
//   * the D flip-flop can store F; a 2-input multiplexer (MUX2) gives either
//     F (out_sel = 0) or the flip-flop (out_sel = 1) as clb_out.
// Every multiplexer is a self-checking pass-transistor multiplexer whose
// check pair flags an output voltage between the logic thresholds, so a
// stuck-open or stuck-close transistor is seen as soon as it disturbs a
// value. The memory elements (LUT SRAM, configuration SRAM, flip-flop) sit
// on a built-in current sensor that flags anomalous supply current. The
// K + 3 check pairs enter a two-rail parity checker; err = 00 or 11 means
// no fault, 01 or 10 a detected fault.
//
// Configuration: 2^K + K*RS + 2 SRAM bits, written one at a time through
// cfg_we/cfg_addr/cfg_din on the rising clk edge. Addresses 0 .. 2^K-1 are
// the LUT bits (address = value of I4..I1). Then come the configuration
// bits: RS select bits for each routing multiplexer k (k = 0 for I1),
// out_sel, and ff_init, the flip-flop's reset value. The count of bits and
// their use follow the document (10 configuration bits for K = 4); their
// order, the write port and the flip-flop reset are this design's choices.
//
// Timing: clb_out follows route_in combinationally when out_sel = 0; with
// out_sel = 1 it shows F sampled at the previous rising edge. rst_n is
// synchronous and active low and only loads the flip-flop. err is
// combinational from the current state of the cell.
//
// Fault injection: flt describes one transistor or memory-cell fault (see
// sc_pkg); with flt.en low the cell is fault-free. Unit codes follow
// sc_pkg::unit_t for K = 4: routing multiplexers 0..K-1, then MUX16, MUX2,
// LUT SRAM, configuration SRAM, flip-flop.
module sc_clb
  import sc_pkg::*;
#(
  parameter int unsigned K  = 4,   // LUT inputs
  parameter int unsigned RS = 2,   // select bits of each routing multiplexer
  localparam int unsigned LUT_BITS = 2 ** K,
  localparam int unsigned CFG_BITS = K * RS + 2,
  localparam int unsigned N_MEM    = LUT_BITS + CFG_BITS + 1,
  localparam int unsigned N_CHK    = K + 3,
  localparam int unsigned CAW      = $clog2(LUT_BITS + CFG_BITS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration port
  input  logic                       cfg_we,
  input  logic [CAW-1:0]             cfg_addr,
  input  logic                       cfg_din,
  // routing lines offered to each LUT input
  input  logic [K-1:0][2**RS-1:0]    route_in,
  // fault injection
  input  fault_t                     flt,
  // results
  output logic                       clb_out,
  output logic [1:0]                 err
);

  localparam int unsigned LAW = $clog2(LUT_BITS);
  localparam int unsigned GAW = (CFG_BITS > 1) ? $clog2(CFG_BITS) : 1;
  localparam int unsigned OUT_SEL = K * RS;
  localparam int unsigned FF_INIT = K * RS + 1;

  // fault enable per unit
  logic [K+4:0] f_on;
  always_comb begin
    for (int unsigned u = 0; u <= K + 4; u++)
      f_on[u] = flt.en && int'(flt.unit) == int'(u);
  end

  // ---------------- memory elements ----------------
  logic [LUT_BITS-1:0] lut_bits;
  logic [CFG_BITS-1:0] cfg_bits;
  logic [LUT_BITS-1:0] lut_iddq;
  logic [CFG_BITS-1:0] cfg_iddq;
  logic                ff_iddq;
  logic                lut_we, cfg_we_g;
  logic [GAW-1:0]      cfg_off;

  always_comb begin
    lut_we   = cfg_we && int'(cfg_addr) < int'(LUT_BITS);
    cfg_we_g = cfg_we && int'(cfg_addr) >= int'(LUT_BITS);
    cfg_off  = GAW'(cfg_addr - CAW'(LUT_BITS));
  end

  sc_mem #(.N_BITS(LUT_BITS)) u_lut_mem (
    .clk, .we(lut_we), .addr(cfg_addr[LAW-1:0]), .din(cfg_din), .q(lut_bits),
    .flt_en(f_on[K+2]), .flt_idx(flt.idx), .flt_kind(flt.kind), .iddq(lut_iddq)
  );

  sc_mem #(.N_BITS(CFG_BITS)) u_cfg_mem (
    .clk, .we(cfg_we_g), .addr(cfg_off), .din(cfg_din), .q(cfg_bits),
    .flt_en(f_on[K+3]), .flt_idx(flt.idx), .flt_kind(flt.kind), .iddq(cfg_iddq)
  );

  // ---------------- routing multiplexers ----------------
  logic [K-1:0] lut_in;
  logic [K-1:0] rt_e1, rt_e2;

  for (genvar k = 0; k < K; k++) begin : g_route
    sc_mux #(.N_SEL(RS)) u_mux (
      .sel(cfg_bits[RS*k +: RS]), .d(route_in[k]),
      .flt_en(f_on[k]), .flt_idx(flt.idx), .flt_kind(flt.kind),
      .vout(), .y(lut_in[k]), .e1(rt_e1[k]), .e2(rt_e2[k])
    );
  end

  // ---------------- LUT multiplexer ----------------
  logic f_lut, lut_e1, lut_e2;

  sc_mux #(.N_SEL(K)) u_mux16 (
    .sel(lut_in), .d(lut_bits),
    .flt_en(f_on[K]), .flt_idx(flt.idx), .flt_kind(flt.kind),
    .vout(), .y(f_lut), .e1(lut_e1), .e2(lut_e2)
  );

  // ---------------- flip-flop and output select ----------------
  logic ff_q, out_e1, out_e2;

  sc_dff u_dff (
    .clk, .rst_n, .init_val(cfg_bits[FF_INIT]), .d(f_lut), .q(ff_q),
    .flt_en(f_on[K+4]), .flt_kind(flt.kind), .iddq(ff_iddq)
  );

  sc_mux #(.N_SEL(1)) u_mux2 (
    .sel(cfg_bits[OUT_SEL]), .d({ff_q, f_lut}),
    .flt_en(f_on[K+1]), .flt_idx(flt.idx), .flt_kind(flt.kind),
    .vout(), .y(clb_out), .e1(out_e1), .e2(out_e2)
  );

  // ---------------- checking ----------------
  logic bics_e1, bics_e2;

  bics #(.N_ELEM(N_MEM)) u_bics (
    .iddq({ff_iddq, cfg_iddq, lut_iddq}), .e1(bics_e1), .e2(bics_e2)
  );

  err_ctrl #(.N_IN(N_CHK)) u_err (
    .e1({bics_e1, out_e1, lut_e1, rt_e1}),
    .e2({bics_e2, out_e2, lut_e2, rt_e2}),
    .z(err)
  );

endmodule
