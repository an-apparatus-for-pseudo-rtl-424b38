// tb_lfsr_sr - self-checking testbench of the LFSR/SR pattern source.
//
// The default (10,4) LFSR/SR of the worked example is run in three phases.
//  1. Functional mode: random data loaded into all ten registers must appear
//     unchanged.
//  2. Test mode from the seed [0 0 0 1] for 20 steps: every register that the
//     sequence has reached must hold b_{k+j-6}, with b the sequence of the
//     recurrence b_{m+4} = b_m + b_{m+3} computed here, and every tap must
//     show its register. The steps at which CLB1 sees [1 1 1] and CLB2 sees
//     [0 1 0] are collected over one period and compared twice: with the
//     steps stated for the example (8, 12 and 5, 7) and with a prediction
//     made here by the discrete logarithm method: solve beta*C = delta by
//     enumeration, map each solution and the seed with sigma (beta*A), take
//     logarithms to the base a from a table built by repeated multiplication,
//     and add the tap's distance from the LFSR (Equation 6). Over that
//     period every 3-bit pattern must appear at each configuration, each
//     non-zero one twice and [0 0 0] once, as linear independence of the
//     columns of C implies.
//  3. Reseeding with [0 1 1 1]: within 7 steps (0 .. 6) both patterns appear.
module tb_lfsr_sr;

  import pdt_pkg::*;

  localparam int unsigned N  = EX_N;
  localparam int unsigned NL = EX_n;
  localparam int unsigned PERIOD = (1 << NL) - 1;

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic                    test_mode, seed_load, step, scan_out;
  logic [N-1:0]            func_d, stages;
  logic [NL-1:0]           seed;
  logic [EX_S-1:0][EX_L-1:0] tap_q;

  lfsr_sr u_dut (
    .clk (clk), .rst_n (rst_n), .test_mode (test_mode), .func_d (func_d),
    .seed_load (seed_load), .seed (seed), .step (step),
    .stages (stages), .tap_q (tap_q), .scan_out (scan_out)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [NL-1:0] printed(input logic [NL-1:0] p);
    return {<<{p}};
  endfunction

  // --- the discrete logarithm method, written independently of the RTL -----
  function automatic logic [NL-1:0] mula(input logic [NL-1:0] v);
    logic [NL:0] t = {v, 1'b0};
    if (t[NL]) t = t ^ {1'b1, EX_POLY};
    return t[NL-1:0];
  endfunction

  function automatic logic [NL-1:0] sigma(input logic [NL-1:0] beta);
    logic [NL:0]   cc = {1'b1, EX_POLY};
    logic [NL-1:0] y  = '0;
    for (int r = 0; r < NL; r++)
      if (beta[r])
        for (int c = 0; c < NL; c++)
          if (r + c + 1 <= NL) y[c] = y[c] ^ cc[r + c + 1];
    return y;
  endfunction

  // gamma(i) = x^i mod p(x), as a coefficient vector.
  function automatic logic [NL-1:0] gamma(input int i);
    logic [NL-1:0] g = 1;
    for (int k = 0; k < i; k++) g = mula(g);
    return g;
  endfunction

  int log_tab [logic [NL-1:0]];

  function automatic int mod_p(input int v);
    int p = int'(PERIOD);
    return ((v % p) + p) % p;
  endfunction

  // Steps v in [d, d + PERIOD) at which configuration s outputs delta.
  function automatic void predict(input int s, input logic [EX_L-1:0] delta,
                                  input logic [NL-1:0] beta0, ref int pos[$]);
    int d = N - NL - EX_TAP_BASE[s];
    pos.delete();
    for (int bv = 1; bv <= PERIOD; bv++) begin
      logic [EX_L-1:0] out;
      for (int j = 0; j < EX_L; j++)
        out[j] = ^(NL'(bv) & gamma(EX_TAP_OFS[s][j]));
      if (out == delta)
        pos.push_back(d + mod_p(log_tab[sigma(NL'(bv))] - log_tab[sigma(beta0)]));
    end
    pos.sort();
  endfunction

  function automatic bit same(input int a[$], input int b[$]);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic string qstr(input int q[$]);
    string r = "";
    foreach (q[i]) r = {r, $sformatf(" %0d", q[i])};
    return r;
  endfunction

  localparam logic [EX_L-1:0] DELTA1 = 3'b111;   // [1 1 1] for CLB1
  localparam logic [EX_L-1:0] DELTA2 = 3'b010;   // [0 1 0] for CLB2 (b_0 in bit 0)

  initial begin
    bit            b [0:127];
    logic [NL-1:0] beta0, g;
    int            hit1[$], hit2[$], pred1[$], pred2[$];
    int            first1, first2;
    int            hist [EX_S][1 << EX_L];

    rst_n = 1'b0; test_mode = 0; seed_load = 0; step = 0;
    func_d = '0; seed = '0;
    foreach (hist[s, p]) hist[s][p] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Logarithm table: log(a^k) = k, k = 1 .. PERIOD.
    g = 1;
    for (int k = 1; k <= PERIOD; k++) begin
      g = mula(g);
      log_tab[g] = k;
    end
    check(log_tab.num() == PERIOD, "p(x) is not primitive");

    // 1. Functional mode.
    for (int i = 0; i < 8; i++) begin
      func_d = N'($urandom);
      @(posedge clk); #1;
      check(stages == func_d, $sformatf("functional load %b", func_d));
    end

    // 2. Test mode from [0 0 0 1].
    beta0 = printed(4'b0001);
    test_mode = 1'b1; seed_load = 1'b1; seed = beta0;
    @(posedge clk); #1;
    seed_load = 1'b0;
    for (int i = 0; i < NL; i++) b[i] = beta0[i];
    for (int m = 0; m + NL < 128; m++) b[m + NL] = b[m] ^ b[m + 3];

    for (int k = 0; k < 25; k++) begin
      for (int j = 0; j < N; j++)
        if (k + j >= N - NL)
          check(stages[j] == b[k + j - (N - NL)],
                $sformatf("step %0d REG%0d = %b", k, j, stages[j]));
      for (int s = 0; s < EX_S; s++)
        for (int j = 0; j < EX_L; j++)
          check(tap_q[s][j] == stages[EX_TAP_BASE[s] + EX_TAP_OFS[s][j]],
                $sformatf("step %0d tap %0d.%0d", k, s, j));
      check(scan_out == stages[0], "scan_out is REG0");
      // A configuration delivers real patterns once the sequence reaches it.
      for (int s = 0; s < EX_S; s++)
        if (k >= int'(N - NL - EX_TAP_BASE[s]) && k < int'(N - NL - EX_TAP_BASE[s] + PERIOD))
          hist[s][tap_q[s]]++;
      if (k >= N - NL - EX_TAP_BASE[0] && k < N - NL - EX_TAP_BASE[0] + PERIOD &&
          tap_q[0] == DELTA1) hit1.push_back(k);
      if (k >= N - NL - EX_TAP_BASE[1] && k < N - NL - EX_TAP_BASE[1] + PERIOD &&
          tap_q[1] == DELTA2) hit2.push_back(k);
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
    end
    // Theorem 2: independent columns -> every pattern; over one period each
    // non-zero pattern comes from 2^(n-l) states, the zero pattern from one
    // fewer (the all-zero state never occurs).
    for (int s = 0; s < EX_S; s++)
      for (int p = 0; p < (1 << EX_L); p++)
        check(hist[s][p] == (1 << (NL - EX_L)) - (p == 0 ? 1 : 0),
              $sformatf("configuration %0d: pattern %b seen %0d times in a period", s, p[EX_L-1:0], hist[s][p]));
    predict(0, DELTA1, beta0, pred1);
    predict(1, DELTA2, beta0, pred2);
    $display("CLB1 [1 1 1] at steps%s (predicted%s)", qstr(hit1), qstr(pred1));
    $display("CLB2 [0 1 0] at steps%s (predicted%s)", qstr(hit2), qstr(pred2));
    check(hit1.size() == 2 && hit1[0] == 8 && hit1[1] == 12,
          "CLB1 pattern steps differ from 8, 12");
    check(hit2.size() == 2 && hit2[0] == 5 && hit2[1] == 7,
          "CLB2 pattern steps differ from 5, 7");
    check(same(hit1, pred1), "CLB1 pattern steps differ from the prediction");
    check(same(hit2, pred2), "CLB2 pattern steps differ from the prediction");

    // Holding: no step, no change.
    begin
      logic [N-1:0] held;
      held = stages;
      repeat (3) @(posedge clk);
      #1 check(stages == held, "LFSR/SR holds while step is low");
    end

    // 3. Reseed with [0 1 1 1]: both patterns within steps 0 .. 6.
    seed_load = 1'b1; seed = printed(4'b0111);
    @(posedge clk); #1;
    seed_load = 1'b0;
    first1 = -1; first2 = -1;
    for (int k = 0; k < 7; k++) begin
      if (k >= N - NL - EX_TAP_BASE[0] && tap_q[0] == DELTA1 && first1 < 0) first1 = k;
      if (k >= N - NL - EX_TAP_BASE[1] && tap_q[1] == DELTA2 && first2 < 0) first2 = k;
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
    end
    predict(0, DELTA1, printed(4'b0111), pred1);
    predict(1, DELTA2, printed(4'b0111), pred2);
    $display("seed [0 1 1 1]: CLB1 first at %0d (predicted%s), CLB2 first at %0d (predicted%s)",
             first1, qstr(pred1), first2, qstr(pred2));
    check(first1 == pred1[0] && first1 >= 0 && first1 <= 6, "CLB1 pattern not within 7 steps");
    check(first2 == pred2[0] && first2 >= 0 && first2 <= 6, "CLB2 pattern not within 7 steps");

    // Back to functional mode.
    test_mode = 1'b0; func_d = N'($urandom);
    @(posedge clk); #1;
    check(stages == func_d, "functional load after test mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
