// soft_threshold: modulo-event detection of the carry-save divider.
//
// A firm comparison of e against a constant would need a carry chain.  The
// soft threshold looks only at the MSBs of the pseudo-sum and the
// pseudo-carry:
//   t = THR_ANY  (0): event if at least one of the two MSBs is set
//   t = THR_BOTH (1): event if both MSBs are set
// These are the two border cases that keep the carry-save additions exact:
// with both MSBs set, adding p would carry out of the field, so the event
// must fire; with neither set, adding p-q would not carry out, so it must not.
// Combinational, one gate level.
// Both rules come from the published design; the mapping of t = 0 / 1 to the
// one-MSB / two-MSB rule is read from the cyclic ranges given for each option.
module soft_threshold #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic [N-1:0]     e_s,
  input  logic [N-1:0]     e_c,
  input  csdiv_pkg::thr_e  t,
  output logic             mod_evt
);
  always_comb begin
    if (t == csdiv_pkg::THR_BOTH) mod_evt = e_s[N-1] & e_c[N-1];
    else                          mod_evt = e_s[N-1] | e_c[N-1];
  end
endmodule
