// cs_clock_divider_tb: end-to-end test of the carry-save fractional divider
// at its default width.
//
// The testbench programs the divider through its configuration port and
// checks every input cycle, with its own integer arithmetic rather than the
// carry-save logic:
//   * the modulo event follows the soft-threshold rule on the two MSBs,
//   * the value e = e_s + e_c grows by exactly p, or p-q on an event
//     (constants scaled by 2^(N-n) for an n-bit setting), so no addition
//     wraps and wrap_err stays low,
//   * clk_out inverts one edge after each event.
// It then finds the cycle the accumulator settles in by comparing the state
// every q cycles (states are compared by their digit pattern, so the two
// encodings of a 1-digit count as one), checks that every value on the cycle
// lies in the cyclic range of its threshold option
//   t=0: [2^(n-1)+p-q, 2(2^(n-1)-1)-1+p]    t=1: [2^n+p-q, 2^n+2^(n-1)-3+p],
// and measures the cycle's timing
// quality: the mean square distance of the event times from the ideal times
// i*q/p, with the best constant phase, must be at least that of the classic
// Bresenham divider, (1 - 1/p^2)/12, and equal to it where expected.
//
// Scenarios (p, q; n, t):
//   (4,7;4,1)   single cycle of period q through the state with digits 2011,
//               Bresenham quality, f_out = 2/7 f_in measured on clk_out
//   (2,3;4,1)   two different cycles, entered from two initial values
//   (2,5;4,0/1) one cycle of period 2q
//   (6,13;4,0/1) cycle of period q but worse than Bresenham
//   (3,4;2,1)   width too small: wrap_err must be raised
//   (2000,30303;16,0) full-width clock division P/Q = 1000/30303 run over
//               3q cycles: the event count obeys the drift-free balance
//               events*q = cycles*p - (e_end - e_start)
// Each mechanism (events, toggles, both threshold options, reconfiguration,
// several cycles, a period above q, a non-Bresenham cycle, wrap detection)
// is counted and must occur at least once.
module cs_clock_divider_tb;
  import csdiv_pkg::*;
  localparam int unsigned N = DEFAULT_WIDTH;

  logic         clk, rst_n = 1'b0, cfg_load = 1'b0, cfg_t = 1'b0;
  logic [N-1:0] cfg_p = '0, cfg_pmq = '0, cfg_init_s = '0, cfg_init_c = '0;
  logic         clk_out, mod_evt, wrap_err;
  logic [N-1:0] e_s, e_c;

  cs_clock_divider dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // current setting
  longint cur_p, cur_q;
  int     cur_k;
  thr_e   cur_t;
  bit     expect_exact;

  longint cyc;               // input cycles since the last configuration
  longint evt_time[$];       // cycles in which mod_evt was high
  longint rises;             // rising edges of clk_out

  // mechanism counters
  int n_evt, n_toggle, n_t0, n_t1, n_cfg, n_wrap, n_multi, n_long, n_bres, n_worse;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (p=%0d q=%0d k=%0d t=%0d cycle %0d)", what, cur_p, cur_q, cur_k,
               cur_t, cyc);
    end
  endfunction

  function automatic longint value_of(input logic [N-1:0] s, input logic [N-1:0] c);
    return longint'(s) + longint'(c);
  endfunction

  // state key: which digits are 1 and which are 2
  function automatic logic [2*N-1:0] key_of(input logic [N-1:0] s, input logic [N-1:0] c);
    return {s ^ c, s & c};
  endfunction

  task automatic configure(input longint p, input longint q, input int n, input thr_e t,
                           input logic [N-1:0] init_s, input logic [N-1:0] init_c,
                           input bit exact);
    @(negedge clk);
    cur_p = p; cur_q = q; cur_k = int'(N) - n; cur_t = t; expect_exact = exact;
    cfg_p      = N'(p) << cur_k;
    cfg_pmq    = N'(p - q) << cur_k;
    cfg_t      = logic'(t);
    cfg_init_s = init_s << cur_k;
    cfg_init_c = init_c << cur_k;
    cfg_load   = 1'b1;
    @(posedge clk); #1;
    cfg_load = 1'b0;
    n_cfg++;
    check(e_s == cfg_init_s && e_c == cfg_init_c && clk_out == 1'b0, "load");
    cyc = 0;
    rises = 0;
    evt_time.delete();
  endtask

  // one input cycle with all per-cycle checks
  task automatic step();
    logic [N-1:0] s0, c0;
    logic         evt0, out0, err0, rule;
    longint       v0, v1, inc;
    s0 = e_s; c0 = e_c; evt0 = mod_evt; out0 = clk_out; err0 = wrap_err;
    rule = (cur_t == THR_BOTH) ? (s0[N-1] && c0[N-1]) : (s0[N-1] || c0[N-1]);
    check(evt0 == rule, "soft-threshold rule");
    v0  = value_of(s0, c0);
    inc = (evt0 ? (cur_p - cur_q) : cur_p) <<< cur_k;
    @(posedge clk); #1;
    v1 = value_of(e_s, e_c);
    if (expect_exact) begin
      check(!err0, "wrap_err low");
      check(v1 == v0 + inc, "exact carry-save step");
    end else if (err0) begin
      n_wrap++;
      check(v1 - v0 - inc == (evt0 ? (longint'(1) << N) : -(longint'(1) << N)),
            "wrapped step differs by 2^N");
    end
    check(clk_out == (out0 ^ evt0), "clk_out toggles on event");
    if (evt0) begin
      evt_time.push_back(cyc);
      n_evt++;
      if (cur_t == THR_BOTH) n_t1++; else n_t0++;
    end
    if (clk_out != out0) n_toggle++;
    if (clk_out && !out0) rises++;
    cyc++;
  endtask

  // Run until the state seen every q cycles repeats.  Returns the period,
  // whether the cycle matches the Bresenham quality, and the digit keys of
  // all states on the cycle.
  task automatic find_cycle(output longint period, output bit bres,
                            output bit on_cycle[logic [2*N-1:0]]);
    int seen[logic [2*N-1:0]];
    int blk, j0, n;
    longint t0, t1, m, d, sd, sd2, lhs, rhs, lo, hi;
    logic [2*N-1:0] k;
    blk = 0;
    on_cycle.delete();
    forever begin
      k = key_of(e_s, e_c);
      if (seen.exists(k)) break;
      seen[k] = blk;
      repeat (int'(cur_q)) step();
      blk++;
    end
    j0     = seen[k];
    period = longint'(blk) * cur_q - longint'(j0) * cur_q;
    // walk the cycle once more to record its states; each value must lie in
    // the cyclic range E of the threshold option
    n = int'(N) - cur_k;
    if (cur_t == THR_BOTH) begin
      lo = (longint'(1) << n) + cur_p - cur_q;
      hi = ((longint'(1) << n) - 1) + ((longint'(1) << (n - 1)) - 1) - 1 + cur_p;
    end else begin
      lo = (longint'(1) << (n - 1)) + cur_p - cur_q;
      hi = 2 * ((longint'(1) << (n - 1)) - 1) - 1 + cur_p;
    end
    for (longint i = 0; i < period; i++) begin
      on_cycle[key_of(e_s, e_c)] = 1'b1;
      check(value_of(e_s, e_c) >= (lo <<< cur_k) && value_of(e_s, e_c) <= (hi <<< cur_k),
            "cycle stays in the cyclic range");
      step();
    end
    t0 = longint'(j0) * cur_q;
    t1 = longint'(blk) * cur_q;
    m = 0; sd = 0; sd2 = 0;
    foreach (evt_time[i]) begin
      if (evt_time[i] >= t0 && evt_time[i] < t1) begin
        d = cur_p * evt_time[i] - m * cur_q;   // p * (T_i - i*q/p)
        sd += d; sd2 += d * d; m++;
      end
    end
    check(period % cur_q == 0, "period is a multiple of q");
    check(m * cur_q == period * cur_p, "p events per q cycles on the cycle");
    // mean square error with best phase vs. (p^2-1)/(12 p^2)
    lhs  = 12 * (m * sd2 - sd * sd);
    rhs  = (cur_p * cur_p - 1) * m * m;
    check(lhs >= rhs, "no better than Bresenham");
    bres = (lhs == rhs);
    if (bres) n_bres++; else n_worse++;
    if (period > cur_q) n_long++;
  endtask

  initial begin
    longint per, per2, ev0, v0, v1;
    bit     bres;
    bit     cyc_a[logic [2*N-1:0]];
    bit     cyc_b[logic [2*N-1:0]];
    logic [2*N-1:0] k2011;

    {n_evt, n_toggle, n_t0, n_t1, n_cfg, n_wrap, n_multi, n_long, n_bres, n_worse} = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(e_s == '0 && e_c == '0 && clk_out == 1'b0 && !mod_evt, "reset state idle");

    // (4,7;4,1) from e = 2^n - 1
    configure(4, 7, 4, THR_BOTH, 16'hF, 16'h0, 1'b1);
    find_cycle(per, bres, cyc_a);
    check(per == 7, "(4,7;4,1) period q");
    check(bres, "(4,7;4,1) Bresenham quality");
    k2011 = key_of(16'b1011 << 12, 16'b1000 << 12);
    check(cyc_a.exists(k2011), "(4,7;4,1) cycle passes through 2011");
    rises = 0;
    repeat (700) step();
    check(rises == 200, "clk_out runs at 2/7 of the input clock");

    // (2,3;4,1): two primitive cycles, through 1210 and 2101
    configure(2, 3, 4, THR_BOTH, 16'b1110, 16'b0100, 1'b1);
    find_cycle(per, bres, cyc_a);
    configure(2, 3, 4, THR_BOTH, 16'b1101, 16'b1000, 1'b1);
    find_cycle(per2, bres, cyc_b);
    check(per == 3 && per2 == 3, "(2,3;4,1) both cycles primitive");
    check(cyc_a.exists(key_of(16'b1110 << 12, 16'b0100 << 12)), "(2,3;4,1) cycle through 1210");
    check(cyc_b.exists(key_of(16'b1101 << 12, 16'b1000 << 12)), "(2,3;4,1) cycle through 2101");
    check(!cyc_a.exists(key_of(16'b1101 << 12, 16'b1000 << 12)), "(2,3;4,1) cycles differ");
    if (!cyc_a.exists(key_of(16'b1101 << 12, 16'b1000 << 12))) n_multi++;

    // (2,5;4,*): period 2q
    configure(2, 5, 4, THR_ANY, 16'hF, 16'h0, 1'b1);
    find_cycle(per, bres, cyc_a);
    check(per == 10, "(2,5;4,0) period 2q");
    configure(2, 5, 4, THR_BOTH, 16'hF, 16'h0, 1'b1);
    find_cycle(per, bres, cyc_a);
    check(per == 10, "(2,5;4,1) period 2q");

    // 6/13 at the minimum width 4: primitive cycle, not Bresenham quality
    configure(6, 13, 4, THR_ANY, 16'hF, 16'h0, 1'b1);
    find_cycle(per, bres, cyc_a);
    check(per == 13 && !bres, "(6,13;4,0) primitive, below Bresenham");
    configure(6, 13, 4, THR_BOTH, 16'hF, 16'h0, 1'b1);
    find_cycle(per, bres, cyc_a);
    check(per == 13 && !bres, "(6,13;4,1) primitive, below Bresenham");

    // width too small for p = 3 with t = 1: additions must wrap
    configure(3, 4, 2, THR_BOTH, 16'h3, 16'h0, 1'b0);
    repeat (20) step();

    // full-width clock division: P/Q = 1000/30303, p = 2000, q = 30303
    check(min_width(2000, 30303, THR_ANY) == N, "min_width(2000/30303) is 16");
    configure(2000, 30303, int'(N), THR_ANY, '1, '0, 1'b1);
    repeat (2 * 30303) step();
    ev0 = longint'(evt_time.size());
    v0  = value_of(e_s, e_c);
    repeat (3 * 30303) step();
    v1  = value_of(e_s, e_c);
    check((longint'(evt_time.size()) - ev0) * 30303 == 3 * 30303 * 2000 - (v1 - v0),
          "drift-free event balance");
    check(longint'(evt_time.size()) - ev0 >= 3 * 2000 - 5 &&
          longint'(evt_time.size()) - ev0 <= 3 * 2000 + 5,
          "3000 output periods in 3q input cycles");

    $display("mechanisms: events=%0d toggles=%0d t0=%0d t1=%0d loads=%0d wraps=%0d",
             n_evt, n_toggle, n_t0, n_t1, n_cfg, n_wrap);
    $display("            multi-cycle=%0d long-period=%0d bresenham=%0d worse=%0d",
             n_multi, n_long, n_bres, n_worse);
    check(n_evt > 0,    "mechanism: modulo events");
    check(n_toggle > 0, "mechanism: output toggles");
    check(n_t0 > 0,     "mechanism: threshold option 0");
    check(n_t1 > 0,     "mechanism: threshold option 1");
    check(n_cfg > 1,    "mechanism: reconfiguration");
    check(n_wrap > 0,   "mechanism: wrap detection");
    check(n_multi > 0,  "mechanism: coexisting cycles");
    check(n_long > 0,   "mechanism: period above q");
    check(n_bres > 0,   "mechanism: Bresenham-quality cycle");
    check(n_worse > 0,  "mechanism: cycle below Bresenham quality");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
