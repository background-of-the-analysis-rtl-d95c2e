// cfg_regs_tb: self-checking test of the configuration registers.
//
// Checks the cleared reset state, that a load pulse captures p, p-q and t,
// and that the fields hold their values while load is low.
module cfg_regs_tb;
  import csdiv_pkg::*;
  localparam int unsigned N = csdiv_pkg::DEFAULT_WIDTH;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] wr_p, wr_pmq, p, pmq;
  thr_e         wr_t, t;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] p_exp = '0, pmq_exp = '0;
  thr_e         t_exp = THR_ANY;

  initial begin
    wr_p = '1; wr_pmq = '1; wr_t = THR_BOTH;
    #12;
    rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk);
      checks++;
      if (p !== p_exp || pmq !== pmq_exp || t !== t_exp) begin
        failures++;
        $display("FAIL p=%h pmq=%h t=%0d expected %h %h %0d", p, pmq, t, p_exp, pmq_exp, t_exp);
      end
      load   = ($urandom % 3) == 0;
      wr_p   = N'($urandom); wr_pmq = N'($urandom); wr_t = thr_e'($urandom % 2);
      if (load) begin
        p_exp = wr_p; pmq_exp = wr_pmq; t_exp = wr_t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
