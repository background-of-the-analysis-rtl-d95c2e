// operand_mux_tb: self-checking test of the p / (p-q) addend multiplexer.
//
// Random p and p-q words; the output must equal p-q when the modulo event is
// high and p otherwise.
module operand_mux_tb;
  localparam int unsigned N = csdiv_pkg::DEFAULT_WIDTH;

  logic         mod_evt;
  logic [N-1:0] p, pmq, addend;
  int checks = 0, failures = 0;

  operand_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      p = N'($urandom); pmq = N'($urandom); mod_evt = 1'($urandom);
      #1;
      checks++;
      if (addend !== (mod_evt ? pmq : p)) begin
        failures++;
        $display("FAIL evt=%b p=%h pmq=%h addend=%h", mod_evt, p, pmq, addend);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
