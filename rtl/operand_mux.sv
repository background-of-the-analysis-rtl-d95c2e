// operand_mux: the wide p / (p-q) multiplexer of the carry-save divider.
//
// On a modulo event the accumulator has to step by p-q (a negative number in
// N-bit two's complement), otherwise by p.  The select line is the single
// heavily loaded signal of the divider: it fans out to all N bits.  Purely
// combinational, no latency.
// Buffering of the select line is left to synthesis.
module operand_mux #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic         mod_evt,  // modulo event: choose p-q
  input  logic [N-1:0] p,        // increment p (unsigned)
  input  logic [N-1:0] pmq,      // p-q in two's complement
  output logic [N-1:0] addend
);
  always_comb addend = mod_evt ? pmq : p;
endmodule
