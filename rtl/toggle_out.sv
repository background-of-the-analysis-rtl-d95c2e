// toggle_out: output clock stage of the fractional divider.
//
// For clock division the accumulator runs with p = 2P so that it produces
// two modulo events, a rising and a falling edge, per output period; the
// output flip-flop therefore inverts on every modulo event.  clk_out changes
// on the rising input clock edge that follows the cycle in which mod_evt was
// high.  Asynchronous active-low reset and a synchronous clear (used when the
// divider is reconfigured) both drive clk_out low.
// The toggle stage follows from the two-edges-per-period rule of the
// Bresenham clock divider; the clear input is this implementation's choice.
module toggle_out (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic mod_evt,
  output logic clk_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       clk_out <= 1'b0;
    else if (clear)   clk_out <= 1'b0;
    else if (mod_evt) clk_out <= ~clk_out;
  end
endmodule
