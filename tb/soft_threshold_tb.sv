// soft_threshold_tb: self-checking test of the modulo-event detector.
//
// For both threshold options and all four combinations of the two MSBs, with
// random lower bits, compares mod_evt with the truth table
//   t=0 (THR_ANY):  event unless both MSBs are clear
//   t=1 (THR_BOTH): event only when both MSBs are set
// and checks that the lower bits never matter.
module soft_threshold_tb;
  import csdiv_pkg::*;
  localparam int unsigned N = csdiv_pkg::DEFAULT_WIDTH;

  logic [N-1:0] e_s, e_c;
  thr_e         t;
  logic         mod_evt;
  int checks = 0, failures = 0;

  // expected event, indexed by {t, msb_s, msb_c}
  localparam logic [7:0] TABLE = 8'b1000_1110;

  soft_threshold dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      repeat (50) begin
        t   = thr_e'(k[2]);
        e_s = {k[1], (N-1)'($urandom)};
        e_c = {k[0], (N-1)'($urandom)};
        #1;
        checks++;
        if (mod_evt !== TABLE[k]) begin
          failures++;
          $display("FAIL t=%0d s=%h c=%h evt=%b", t, e_s, e_c, mod_evt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
