// tb_pdt_top - end-to-end testbench of the pseudo-deterministic test
// apparatus, with every parameter at its default.
//
// It plays one complete pseudo-deterministic test of the worked example:
//  1. the ten registers run in functional mode (random data loads);
//  2. the accompanying SDC is stepped from the root a through all 15
//     non-zero field elements, and the discrete logarithm table is read off
//     the hardware (log = step count); it must match the published table;
//  3. using that table, the steps at which CLB1 must see [1 1 1] and CLB2
//     [0 1 0] are predicted from the seed [0 0 0 1] (solve beta*C = delta,
//     map with sigma(beta) = beta*A, subtract logarithms modulo 15, add the
//     tap's distance from the driving LFSR);
//  4. the LFSR/SR is switched to test mode, seeded and stepped through a full
//     period; the CLB input buses must show the patterns at exactly the
//     predicted steps (8, 12 and 5, 7), and the register contents must follow
//     the recurrence of p(x) = 1 + x^3 + x^4;
//  5. it is reseeded with [0 1 1 1], after which a 7-step sequence covers both
//     patterns, and returned to functional mode.
// Each mechanism (functional load, mode switch, seed load, shift step, SDC
// step, CLB1 hit, CLB2 hit) is counted; one that never happens is a failure.
module tb_pdt_top;

  import pdt_pkg::*;

  localparam int unsigned PERIOD = (1 << EX_n) - 1;

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic            test_mode, seed_load, step, scan_out;
  logic [EX_N-1:0] func_d, regs;
  logic [EX_n-1:0] seed;
  logic [EX_L-1:0] clb1_in, clb2_in;
  logic            sdc_load, sdc_step;
  logic [EX_n-1:0] sdc_load_d, sdc_state;

  pdt_top u_top (
    .clk (clk), .rst_n (rst_n),
    .test_mode (test_mode), .func_d (func_d), .seed_load (seed_load),
    .seed (seed), .step (step), .regs (regs),
    .clb1_in (clb1_in), .clb2_in (clb2_in), .scan_out (scan_out),
    .sdc_load (sdc_load), .sdc_load_d (sdc_load_d), .sdc_step (sdc_step),
    .sdc_state (sdc_state)
  );

  // Mechanism counters.
  int n_func_load = 0, n_mode_switch = 0, n_seed_load = 0, n_shift = 0;
  int n_sdc_step = 0, n_hit1 = 0, n_hit2 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [EX_n-1:0] printed(input logic [EX_n-1:0] p);
    return {<<{p}};
  endfunction

  // Discrete logarithm table read off the hardware SDC.
  int log_hw [logic [EX_n-1:0]];

  function automatic logic [EX_n-1:0] sigma(input logic [EX_n-1:0] beta);
    logic [EX_n:0]   cc = {1'b1, EX_POLY};
    logic [EX_n-1:0] y  = '0;
    for (int r = 0; r < EX_n; r++)
      if (beta[r])
        for (int c = 0; c < EX_n; c++)
          if (r + c + 1 <= EX_n) y[c] = y[c] ^ cc[r + c + 1];
    return y;
  endfunction

  // x^i mod p(x), by long division on integers.
  function automatic logic [EX_n-1:0] gamma(input int i);
    logic [EX_n:0] r = 1;
    for (int k = 0; k < i; k++) begin
      r = r << 1;
      if (r[EX_n]) r = r ^ {1'b1, EX_POLY};
    end
    return r[EX_n-1:0];
  endfunction

  function automatic bit is_expected(input int s, input int v, input logic [EX_L-1:0] delta,
                                     input logic [EX_n-1:0] beta0);
    int d = int'(EX_N - EX_n - EX_TAP_BASE[s]);
    int p = int'(PERIOD);
    for (int bv = 1; bv <= PERIOD; bv++) begin
      logic [EX_L-1:0] out;
      for (int j = 0; j < EX_L; j++)
        out[j] = ^(EX_n'(bv) & gamma(EX_TAP_OFS[s][j]));
      if (out == delta &&
          v == d + (((log_hw[sigma(EX_n'(bv))] - log_hw[sigma(beta0)]) % p) + p) % p)
        return 1'b1;
    end
    return 1'b0;
  endfunction

  localparam logic [EX_L-1:0] DELTA1 = 3'b111;
  localparam logic [EX_L-1:0] DELTA2 = 3'b010;

  task automatic do_step();
    step = 1'b1;
    @(posedge clk); #1;
    step = 1'b0;
    n_shift++;
  endtask

  initial begin
    logic [EX_n-1:0] beta0;
    logic [EX_n-1:0] pub [1:15];
    bit              b [0:63];
    int              d1, d2;
    int              first1, first2;

    rst_n = 1'b0; test_mode = 0; seed_load = 0; step = 0; func_d = '0; seed = '0;
    sdc_load = 0; sdc_step = 0; sdc_load_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Functional mode.
    for (int i = 0; i < 5; i++) begin
      func_d = EX_N'($urandom);
      @(posedge clk); #1;
      n_func_load++;
      check(regs == func_d, "functional load");
    end

    // 2. Discrete logarithm table from the SDC.
    pub[1]  = printed(4'b0100); pub[2]  = printed(4'b0010); pub[3]  = printed(4'b0001);
    pub[4]  = printed(4'b1001); pub[5]  = printed(4'b1101); pub[6]  = printed(4'b1111);
    pub[7]  = printed(4'b1110); pub[8]  = printed(4'b0111); pub[9]  = printed(4'b1010);
    pub[10] = printed(4'b0101); pub[11] = printed(4'b1011); pub[12] = printed(4'b1100);
    pub[13] = printed(4'b0110); pub[14] = printed(4'b0011); pub[15] = printed(4'b1000);
    for (int k = 1; k <= 15; k++) begin
      check(sdc_state == pub[k], $sformatf("SDC a^%0d = %b", k, sdc_state));
      log_hw[sdc_state] = k;
      sdc_step = 1'b1;
      @(posedge clk); #1;
      sdc_step = 1'b0;
      n_sdc_step++;
    end
    check(sdc_state == pub[1], "SDC returns to a after 15 steps");
    check(log_hw.num() == 15, "SDC did not visit all 15 non-zero elements");

    // 4. Test mode, seed [0 0 0 1], one full period of patterns.
    beta0 = printed(4'b0001);
    test_mode = 1'b1; n_mode_switch++;
    seed_load = 1'b1; seed = beta0;
    @(posedge clk); #1;
    seed_load = 1'b0; n_seed_load++;
    for (int i = 0; i < EX_n; i++) b[i] = beta0[i];
    for (int m = 0; m + EX_n < 64; m++) b[m + EX_n] = b[m] ^ b[m + 3];
    d1 = int'(EX_N - EX_n - EX_TAP_BASE[0]);
    d2 = int'(EX_N - EX_n - EX_TAP_BASE[1]);
    for (int k = 0; k < d2 + int'(PERIOD); k++) begin
      for (int j = 0; j < int'(EX_N); j++)
        if (k + j >= int'(EX_N - EX_n))
          check(regs[j] == b[k + j - int'(EX_N - EX_n)], $sformatf("step %0d REG%0d", k, j));
      if (k >= d1 && k < d1 + int'(PERIOD)) begin
        check((clb1_in == DELTA1) == is_expected(0, k, DELTA1, beta0),
              $sformatf("CLB1 at step %0d: %b", k, clb1_in));
        if (clb1_in == DELTA1) begin
          n_hit1++;
          check(k == 8 || k == 12, $sformatf("CLB1 hit at step %0d", k));
        end
      end
      if (k >= d2 && k < d2 + int'(PERIOD)) begin
        check((clb2_in == DELTA2) == is_expected(1, k, DELTA2, beta0),
              $sformatf("CLB2 at step %0d: %b", k, clb2_in));
        if (clb2_in == DELTA2) begin
          n_hit2++;
          check(k == 5 || k == 7, $sformatf("CLB2 hit at step %0d", k));
        end
      end
      check(scan_out == regs[0], "scan_out");
      do_step();
    end
    check(n_hit1 == 2, $sformatf("CLB1 saw its pattern %0d times in a period", n_hit1));
    check(n_hit2 == 2, $sformatf("CLB2 saw its pattern %0d times in a period", n_hit2));

    // 5. Reseed with [0 1 1 1]: both patterns within steps 0 .. 6.
    seed_load = 1'b1; seed = printed(4'b0111);
    @(posedge clk); #1;
    seed_load = 1'b0; n_seed_load++;
    first1 = -1; first2 = -1;
    for (int k = 0; k < 7; k++) begin
      if (k >= d1 && clb1_in == DELTA1 && first1 < 0) first1 = k;
      if (k >= d2 && clb2_in == DELTA2 && first2 < 0) first2 = k;
      do_step();
    end
    check(first1 >= 0 && is_expected(0, first1, DELTA1, printed(4'b0111)),
          $sformatf("reseeded CLB1 first hit %0d", first1));
    check(first2 >= 0 && is_expected(1, first2, DELTA2, printed(4'b0111)),
          $sformatf("reseeded CLB2 first hit %0d", first2));

    test_mode = 1'b0; n_mode_switch++;
    func_d = EX_N'($urandom);
    @(posedge clk); #1;
    n_func_load++;
    check(regs == func_d, "functional load after the test");

    $display("mechanisms: functional loads %0d, mode switches %0d, seed loads %0d, shifts %0d, SDC steps %0d, CLB1 hits %0d, CLB2 hits %0d",
             n_func_load, n_mode_switch, n_seed_load, n_shift, n_sdc_step, n_hit1, n_hit2);
    check(n_func_load > 0,   "functional load never happened");
    check(n_mode_switch > 0, "mode switch never happened");
    check(n_seed_load > 0,   "seed load never happened");
    check(n_shift > 0,       "shift never happened");
    check(n_sdc_step > 0,    "SDC step never happened");
    check(n_hit1 > 0,        "CLB1 pattern never applied");
    check(n_hit2 > 0,        "CLB2 pattern never applied");

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
