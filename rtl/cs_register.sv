// cs_register: the accumulator e of the divider, held in carry-save form.
//
// Two N-bit registers hold the pseudo-sum e^s and the pseudo-carry e^c; the
// value of e is their plain sum (no modulo), so the register is twice as wide
// as a binary accumulator.  Each rising clock edge takes the next value from
// the carry-save adder.  A load pulse (highest priority after reset) writes
// an initial value instead, which selects the cycle the divider enters when
// more than one exists.  Asynchronous active-low reset clears both halves,
// the idle state of this design (no modulo events while p = 0).
// The carry-save accumulator is the published structure; the load port and
// the reset value are this implementation's choices.
module cs_register #(
  parameter int unsigned N = csdiv_pkg::DEFAULT_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,     // write init_s / init_c
  input  logic [N-1:0] init_s,
  input  logic [N-1:0] init_c,
  input  logic [N-1:0] next_s,   // from the carry-save adder
  input  logic [N-1:0] next_c,
  output logic [N-1:0] e_s,
  output logic [N-1:0] e_c
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_s <= '0;
      e_c <= '0;
    end else if (load) begin
      e_s <= init_s;
      e_c <= init_c;
    end else begin
      e_s <= next_s;
      e_c <= next_c;
    end
  end
endmodule
