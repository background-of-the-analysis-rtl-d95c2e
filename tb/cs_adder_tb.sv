// cs_adder_tb: self-checking test of the carry-save adder.
//
// Drives random pseudo-sum, pseudo-carry and addend words (plus an exhaustive
// pass over the corner values 0, 1, all-ones and the MSB alone) and checks,
// with plain integer arithmetic, that the outputs preserve the total:
//   s_out + c_out + cout * 2^N == s_in + c_in + d,
// that no carry enters bit 0 (c_out[0] == 0) and that each bit of s_out is
// the parity of the three input bits of the same place, i.e. that no carry
// travels along the word.
module cs_adder_tb;
  localparam int unsigned N = csdiv_pkg::DEFAULT_WIDTH;

  logic [N-1:0] s_in, c_in, d, s_out, c_out;
  logic         cout;
  int checks = 0, failures = 0;

  cs_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint unsigned lhs, rhs;
    #1;
    lhs = longint'(s_out) + longint'(c_out) + (longint'(cout) << N);
    rhs = longint'(s_in) + longint'(c_in) + longint'(d);
    checks++;
    if (lhs != rhs || c_out[0] !== 1'b0) begin
      failures++;
      $display("FAIL sum: s=%h c=%h d=%h -> s'=%h c'=%h co=%b", s_in, c_in, d, s_out, c_out, cout);
    end
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (int'(s_out[i]) != (int'(s_in[i]) + int'(c_in[i]) + int'(d[i])) % 2) begin
        failures++;
        $display("FAIL parity bit %0d", i);
      end
    end
  endtask

  initial begin
    logic [N-1:0] corner [4];
    corner[0] = '0; corner[1] = N'(1); corner[2] = '1; corner[3] = N'(1) << (N - 1);
    foreach (corner[a]) foreach (corner[b]) foreach (corner[c]) begin
      s_in = corner[a]; c_in = corner[b]; d = corner[c];
      check_one();
    end
    repeat (3000) begin
      s_in = N'($urandom); c_in = N'($urandom); d = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
