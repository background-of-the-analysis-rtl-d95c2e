// cs_adder: N-bit carry-save (3:2) adder of the divider's accumulator.
//
// Adds the N-bit addend d to e = e_s + e_c, where e_s is the pseudo-sum and
// e_c the pseudo-carry.  Every bit position is an independent full adder:
// the new pseudo-sum bit is the parity of the three inputs and the majority
// is passed one place up as the new pseudo-carry.  No carry enters bit 0, so
// the LSB of the new pseudo-carry is always 0.  The majority out of the MSB
// leaves the N-bit field; it is reported on cout and dropped, which is the
// modulo-2^N reduction that turns the addition of the two's complement of
// q-p into a subtraction.  The delay is one full adder, whatever N is.
// The adder is the one of the published carry-save divider; bringing cout out
// (for the wrap check of cs_clock_divider) is this implementation's addition.
// c_out[0] is a constant 0 by construction.
module cs_adder #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic [N-1:0] s_in,   // pseudo-sum e^s
  input  logic [N-1:0] c_in,   // pseudo-carry e^c
  input  logic [N-1:0] d,      // addend (p or p-q)
  output logic [N-1:0] s_out,
  output logic [N-1:0] c_out,
  output logic         cout    // carry out of the MSB position (discarded)
);
  logic [N-1:0] maj;

  always_comb begin
    s_out = s_in ^ c_in ^ d;
    maj   = (s_in & c_in) | (s_in & d) | (c_in & d);
    c_out = {maj[N-2:0], 1'b0};
    cout  = maj[N-1];
  end
endmodule
