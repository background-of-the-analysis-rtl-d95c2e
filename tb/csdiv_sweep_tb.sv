// csdiv_sweep_tb: the divider run over all reduced fractions p/q of small q,
// in the four settings n in {n_min, n_min+1} x t in {0, 1}.
//
// For each fraction and setting the divider (default width N, constants and
// initial values shifted left by N-n) is started from every carry-save state
// of the residue class of 2^n - 1 (one representative per digit pattern), and
// run until the state seen every q cycles repeats or reaches a state already
// known to lead into a found cycle.  Every input cycle is checked with integer
// arithmetic (threshold rule, exact step by p or p-q, no wrap, output
// toggle).  Every cycle found is checked for period (a multiple of q), event
// count (p per q cycles) and timing quality (never better than the classic
// Bresenham divider; equality recorded).
//
// Expected behaviour that is checked:
//   * at n_min every fraction has exactly one cycle, of period q;
//   * (2,3;4,1) has two cycles; (2,5;4,t) has one cycle of period 2q;
//   * 6/13 reaches Bresenham quality in none of the four settings;
//   * 6/17 reaches it with n_min+1 but not with n_min;
//   * most fractions reach it in at least one setting;
//   * none of the four settings is at least as good as another one for every
//     fraction;
//   * n_min is usually at least as good as n_min+1 (best over t), and 6/17 is
//     the first fraction, in order of q, where n_min+1 is better.
module csdiv_sweep_tb;
  import csdiv_pkg::*;
  localparam int unsigned N    = DEFAULT_WIDTH;
  localparam longint      QMAX = 128;

  logic         clk, rst_n = 1'b0, cfg_load = 1'b0, cfg_t = 1'b0;
  logic [N-1:0] cfg_p = '0, cfg_pmq = '0, cfg_init_s = '0, cfg_init_c = '0;
  logic         clk_out, mod_evt, wrap_err;
  logic [N-1:0] e_s, e_c;

  cs_clock_divider dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  longint cur_p, cur_q;
  int     cur_k;
  thr_e   cur_t;
  longint cyc;
  longint evt_time[$];

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (p=%0d q=%0d n=%0d t=%0d)", what, cur_p, cur_q, int'(N) - cur_k, cur_t);
    end
  endfunction

  function automatic logic [2*N-1:0] key_of(input logic [N-1:0] s, input logic [N-1:0] c);
    return {s ^ c, s & c};
  endfunction

  function automatic longint gcd(input longint a, input longint b);
    while (b != 0) begin
      longint r = a % b;
      a = b; b = r;
    end
    return a;
  endfunction

  task automatic configure(input logic [N-1:0] init_s, input logic [N-1:0] init_c);
    @(negedge clk);
    cfg_p      = N'(cur_p) << cur_k;
    cfg_pmq    = N'(cur_p - cur_q) << cur_k;
    cfg_t      = logic'(cur_t);
    cfg_init_s = init_s << cur_k;
    cfg_init_c = init_c << cur_k;
    cfg_load   = 1'b1;
    @(posedge clk); #1;
    cfg_load = 1'b0;
    cyc = 0;
    evt_time.delete();
  endtask

  // one input cycle; the checks are merged into one count per cycle
  task automatic step();
    logic [N-1:0] s0, c0;
    logic         evt0, out0, err0, rule;
    longint       v0, inc;
    s0 = e_s; c0 = e_c; evt0 = mod_evt; out0 = clk_out; err0 = wrap_err;
    rule = (cur_t == THR_BOTH) ? (s0[N-1] && c0[N-1]) : (s0[N-1] || c0[N-1]);
    v0  = longint'(s0) + longint'(c0);
    inc = (evt0 ? (cur_p - cur_q) : cur_p) <<< cur_k;
    @(posedge clk); #1;
    check(evt0 == rule && !err0 && longint'(e_s) + longint'(e_c) == v0 + inc &&
          clk_out == (out0 ^ evt0), "per-cycle behaviour");
    if (evt0) evt_time.push_back(cyc);
    cyc++;
  endtask

  // all cycles of the current setting
  task automatic explore(output int ncyc, output longint max_period, output bit any_bres,
                         output real best_err);
    int     solved[logic [2*N-1:0]];
    int     seen[logic [2*N-1:0]];
    int     n, blk, j0, ndig;
    longint top, idx, x, val, period, t0, t1, m, d, sd, sd2;
    logic [N-1:0] s, c;
    logic [2*N-1:0] k;
    n = int'(N) - cur_k;
    ncyc = 0; max_period = 0; any_bres = 1'b0; best_err = 1.0e9;
    ndig = n;
    top = 2;
    for (int i = 1; i < ndig; i++) top *= 3;
    for (idx = 0; idx < top; idx++) begin
      // digit 0 in {0,1}, digits 1..n-1 in {0,1,2}
      s = '0; c = '0; x = idx / 2;
      s[0] = logic'(idx % 2);
      for (int i = 1; i < n; i++) begin
        s[i] = (x % 3) != 0;
        c[i] = (x % 3) == 2;
        x /= 3;
      end
      val = longint'(s) + longint'(c);
      if (val % cur_q != ((longint'(1) << n) - 1) % cur_q) continue;
      if (solved.exists(key_of(s << cur_k, c << cur_k))) continue;
      configure(s, c);
      seen.delete();
      blk = 0;
      forever begin
        k = key_of(e_s, e_c);
        if (solved.exists(k) || seen.exists(k)) break;
        seen[k] = blk;
        repeat (int'(cur_q)) step();
        blk++;
      end
      if (!solved.exists(k)) begin
        // a new cycle: measure it
        j0     = seen[k];
        period = longint'(blk) * cur_q - longint'(j0) * cur_q;
        t0 = longint'(j0) * cur_q;
        t1 = longint'(blk) * cur_q;
        m = 0; sd = 0; sd2 = 0;
        foreach (evt_time[i]) begin
          if (evt_time[i] >= t0 && evt_time[i] < t1) begin
            d = cur_p * evt_time[i] - m * cur_q;
            sd += d; sd2 += d * d; m++;
          end
        end
        check(period % cur_q == 0, "period is a multiple of q");
        check(m * cur_q == period * cur_p, "p events per q cycles");
        check(12 * (m * sd2 - sd * sd) >= (cur_p * cur_p - 1) * m * m,
              "no better than Bresenham");
        if (12 * (m * sd2 - sd * sd) == (cur_p * cur_p - 1) * m * m) any_bres = 1'b1;
        // mean square error in input cycles, best phase
        if (real'(m * sd2 - sd * sd) / (real'(m) * real'(m) * real'(cur_p) * real'(cur_p)) < best_err)
          best_err = real'(m * sd2 - sd * sd) / (real'(m) * real'(m) * real'(cur_p) * real'(cur_p));
        if (period > max_period) max_period = period;
        ncyc++;
      end
      foreach (seen[kk]) solved[kk] = 1;
    end
  endtask

  initial begin
    int     ncyc, nmin, nfrac, nbres;
    longint maxp;
    bit     bres, bres_min, bres_wide;
    real    err, err_set[4], best_min, best_wide;
    bit     better[4][4];            // setting a strictly better than b somewhere
    int     n_min_ok, first_exc_q, first_exc_p;
    bit     seen_2_3, seen_2_5, seen_6_13, seen_6_17;
    nfrac = 0; nbres = 0; n_min_ok = 0; first_exc_q = 0; first_exc_p = 0;
    better = '{default: '{default: 1'b0}};
    {seen_2_3, seen_2_5, seen_6_13, seen_6_17} = '0;
    #12 rst_n = 1'b1;
    for (longint q = 2; q <= QMAX; q++) begin
      for (longint p = 1; p < q; p++) begin
        if (gcd(p, q) != 1) continue;
        nfrac++;
        bres_min = 1'b0; bres_wide = 1'b0;
        for (int ti = 0; ti < 2; ti++) begin
          for (int w = 0; w < 2; w++) begin
            cur_p = p; cur_q = q; cur_t = thr_e'(ti);
            nmin  = int'(min_width(p, q, cur_t));
            cur_k = int'(N) - (nmin + w);
            explore(ncyc, maxp, bres, err);
            err_set[2 * ti + w] = err;
            if (w == 0) begin
              check(ncyc == 1 && maxp == q, "n_min: unique primitive cycle");
              bres_min |= bres;
            end else begin
              bres_wide |= bres;
            end
            if (p == 2 && q == 3 && nmin + w == 4 && ti == 1) begin
              check(ncyc == 2, "(2,3;4,1) has two cycles");
              seen_2_3 = 1'b1;
            end
            if (p == 2 && q == 5 && nmin + w == 4) begin
              check(ncyc == 1 && maxp == 10, "(2,5;4,t) one cycle of period 2q");
              seen_2_5 = 1'b1;
            end
          end
        end
        if (bres_min || bres_wide) nbres++;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++)
            if (err_set[a] < err_set[b] * (1.0 - 1.0e-9)) better[a][b] = 1'b1;
        best_min  = (err_set[0] < err_set[2]) ? err_set[0] : err_set[2];
        best_wide = (err_set[1] < err_set[3]) ? err_set[1] : err_set[3];
        if (best_min <= best_wide * (1.0 + 1.0e-9)) n_min_ok++;
        else if (first_exc_q == 0) begin
          first_exc_q = int'(q); first_exc_p = int'(p);
        end
        if (p == 6 && q == 13) begin
          check(!bres_min && !bres_wide, "6/13 never reaches Bresenham quality");
          seen_6_13 = 1'b1;
        end
        if (p == 6 && q == 17) begin
          check(!bres_min && bres_wide, "6/17 reaches Bresenham quality only at n_min+1");
          seen_6_17 = 1'b1;
        end
      end
    end
    check(seen_2_3 && seen_2_5 && seen_6_13 && (QMAX < 17 || seen_6_17), "special cases visited");
    check(2 * nbres > nfrac, "most fractions reach Bresenham quality");
    // settings (n_min,t=0), (n_min+1,t=0), (n_min,t=1), (n_min+1,t=1):
    // none is at least as good as another for every fraction
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        if (a != b) check(better[a][b], $sformatf("setting %0d beats setting %0d somewhere", a, b));
    check(2 * n_min_ok > nfrac, "n_min usually at least as good as n_min+1");
    check(first_exc_q == 17 && first_exc_p == 6, "6/17 is the first fraction where n_min+1 wins");
    $display("n_min at least as good as n_min+1 for %0d fractions; first exception %0d/%0d",
             n_min_ok, first_exc_p, first_exc_q);
    $display("%0d reduced fractions with q <= %0d, %0d reach Bresenham quality in some setting",
             nfrac, QMAX, nbres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
