// cs_clock_divider: scalable Bresenham fractional clock divider with a
// carry-save accumulator and a soft-threshold modulo event.
//
// Function: programmed with p = 2P and q = Q (q >= p), clk_out runs at
// f_out = (P/Q) * f_in without long-term phase drift.  Every input cycle the
// accumulator e advances by p, or by p-q when the modulo event is raised, so
// p events (p output edges) fall into every q input cycles.
//
// How: e is held as pseudo-sum e^s plus pseudo-carry e^c (cs_register).  The
// modulo event comes from the two MSBs of that pair alone (soft_threshold,
// option t), selects p or p-q (operand_mux), and a 3:2 carry-save adder
// (cs_adder) forms the next e.  No path crosses a carry chain, so the clock
// period does not grow with N; only the mux select fans out to N bits.  The
// event drives the output toggle flip-flop (toggle_out).
//
// Interface and timing:
//   cfg_load   one-cycle pulse: registers cfg_p, cfg_pmq (= p-q, two's
//              complement), cfg_t, and loads e with cfg_init_s/cfg_init_c and
//              clears clk_out in the same edge.  Values are given already
//              shifted to the N-bit field (see cfg_regs).
//   mod_evt    modulo event of the current e (combinational from registers);
//              clk_out inverts on the next rising edge.
//   e_s, e_c   accumulator state, for observation.
//   wrap_err   high in a cycle whose addition leaves the exact range: adding p
//              carried out of the field, or adding p-q did not.  It stays low
//              when the width suits the fraction (csdiv_pkg::min_width).
// The structure follows the carry-save divider design; the configuration
// interface, the loadable initial value, the reset state (everything zero,
// divider idle) and wrap_err are this implementation's choices.
module cs_clock_divider #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_load,
  input  logic [N-1:0] cfg_p,
  input  logic [N-1:0] cfg_pmq,
  input  logic         cfg_t,
  input  logic [N-1:0] cfg_init_s,
  input  logic [N-1:0] cfg_init_c,
  output logic         clk_out,
  output logic         mod_evt,
  output logic [N-1:0] e_s,
  output logic [N-1:0] e_c,
  output logic         wrap_err
);
  import csdiv_pkg::*;

  logic [N-1:0] p, pmq;
  thr_e         t;
  logic [N-1:0] addend, next_s, next_c;
  logic         cout;

  cfg_regs #(.N(N)) u_cfg (
    .clk, .rst_n, .load(cfg_load),
    .wr_p(cfg_p), .wr_pmq(cfg_pmq), .wr_t(thr_e'(cfg_t)),
    .p, .pmq, .t
  );

  soft_threshold #(.N(N)) u_thr (
    .e_s, .e_c, .t, .mod_evt
  );

  operand_mux #(.N(N)) u_mux (
    .mod_evt, .p, .pmq, .addend
  );

  cs_adder #(.N(N)) u_csa (
    .s_in(e_s), .c_in(e_c), .d(addend),
    .s_out(next_s), .c_out(next_c), .cout
  );

  cs_register #(.N(N)) u_e (
    .clk, .rst_n, .load(cfg_load),
    .init_s(cfg_init_s), .init_c(cfg_init_c),
    .next_s, .next_c, .e_s, .e_c
  );

  toggle_out u_out (
    .clk, .rst_n, .clear(cfg_load), .mod_evt, .clk_out
  );

  // p must not carry out of the field, p-q (a subtraction) must.
  always_comb wrap_err = mod_evt ? ~cout : cout;
endmodule
