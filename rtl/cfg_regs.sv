// cfg_regs: configuration registers of the programmable fractional divider.
//
// A hardwired divider has p and p-q as constants; the programmable block
// holds them in registers, together with the threshold option t.  All
// fields are written at once by a one-cycle load pulse and take effect on the
// next clock edge; the accumulator is loaded with its initial value in that
// same edge (see cs_clock_divider).  Software writes the fraction already
// scaled to the hardware width: p << (N-n) and (p-q) << (N-n) for an n-bit
// setting.  Asynchronous active-low reset clears all fields, which leaves the
// divider idle.
// Holding p and p-q in registers is the published way to make the divider
// programmable; the single-strobe write port is this implementation's choice.
module cfg_regs #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [N-1:0]     wr_p,
  input  logic [N-1:0]     wr_pmq,
  input  csdiv_pkg::thr_e  wr_t,
  output logic [N-1:0]     p,
  output logic [N-1:0]     pmq,
  output csdiv_pkg::thr_e  t
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p      <= '0;
      pmq    <= '0;
      t      <= csdiv_pkg::THR_ANY;
    end else if (load) begin
      p      <= wr_p;
      pmq    <= wr_pmq;
      t      <= wr_t;
    end
  end
endmodule
