// cs_register_tb: self-checking test of the carry-save accumulator register.
//
// Checks that reset clears both halves, that each clock edge takes next_s /
// next_c, that a load pulse takes init_s / init_c instead, and that a reset
// in the middle of operation clears the register again.
module cs_register_tb;
  localparam int unsigned N = csdiv_pkg::DEFAULT_WIDTH;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] init_s, init_c, next_s, next_c, e_s, e_c;
  int checks = 0, failures = 0;

  cs_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input logic [N-1:0] s, input logic [N-1:0] c, input string what);
    checks++;
    if (e_s !== s || e_c !== c) begin
      failures++;
      $display("FAIL %s: got %h/%h expected %h/%h", what, e_s, e_c, s, c);
    end
  endtask

  initial begin
    logic [N-1:0] es_exp, ec_exp;
    init_s = '1; init_c = '0; next_s = '1; next_c = '1;
    #12;
    expect_state('0, '0, "reset");
    rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk);
      load   = ($urandom % 4) == 0;
      init_s = N'($urandom); init_c = N'($urandom);
      next_s = N'($urandom); next_c = N'($urandom);
      es_exp = load ? init_s : next_s;
      ec_exp = load ? init_c : next_c;
      @(posedge clk); #1;
      expect_state(es_exp, ec_exp, load ? "load" : "advance");
    end
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    expect_state('0, '0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
