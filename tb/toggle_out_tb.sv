// toggle_out_tb: self-checking test of the output clock flip-flop.
//
// Drives a random event pattern and keeps its own count of events: clk_out
// must equal the parity of the events seen since the last clear or reset,
// one clock edge later.
module toggle_out_tb;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, mod_evt = 1'b0, clk_out;
  int checks = 0, failures = 0;
  int unsigned nevt = 0;

  toggle_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (clk_out !== 1'b0) failures++;
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      mod_evt = 1'($urandom);
      clear   = ($urandom % 16) == 0;
      @(posedge clk); #1;
      if (clear) nevt = 0;
      else if (mod_evt) nevt++;
      checks++;
      if (clk_out !== nevt[0]) begin
        failures++;
        $display("FAIL clk_out=%b after %0d events", clk_out, nevt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
