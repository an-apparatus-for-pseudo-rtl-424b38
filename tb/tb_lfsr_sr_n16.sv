// tb_lfsr_sr_n16 - the LFSR/SR at a size in the range the method is meant
// for: a 40-stage chain whose driving LFSR has 16 stages
// (p(x) = 1 + x^11 + x^13 + x^14 + x^16, period 65535) and two tapping
// configurations of 14 taps each, i.e. two CLBs with 14 inputs, two fewer
// than the LFSR has stages.
//
// For each configuration the testbench checks the linear independence of
// the columns of C (Theorem 2), picks a random 14-bit target pattern,
// predicts every step of one period at which it appears (2^(16-14) = 4
// solutions of beta*C = delta, each placed with sigma and discrete
// logarithms, Equation 6), then runs the LFSR/SR for a full period and
// compares the steps seen on the taps with the prediction. The contents of
// all registers are also compared against the recurrence of p(x).
module tb_lfsr_sr_n16;

  localparam int unsigned N  = 40;
  localparam int unsigned NL = 16;
  localparam int unsigned S  = 2;
  localparam int unsigned L  = 14;
  localparam int          PERIOD = (1 << NL) - 1;
  localparam logic [NL-1:0] POLY = 16'b0110_1000_0000_0001;
  localparam int unsigned TAP_BASE [S]    = '{3, 0};
  localparam int unsigned TAP_OFS  [S][L] = '{
    '{0, 1, 3, 5, 8, 11, 13, 17, 20, 22, 25, 29, 31, 34},
    '{0, 2, 4, 7, 9, 12, 15, 18, 21, 24, 27, 30, 33, 39}};

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic                 test_mode, seed_load, step, scan_out;
  logic [N-1:0]         func_d, stages;
  logic [NL-1:0]        seed;
  logic [S-1:0][L-1:0]  tap_q;

  lfsr_sr #(
    .N_TOTAL (N), .N_LFSR (NL), .COEFF (POLY), .RESET_SEED (16'h8000),
    .S (S), .L (L), .TAP_BASE (TAP_BASE), .TAP_OFS (TAP_OFS)
  ) u_dut (
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

  function automatic logic [NL-1:0] mula(input logic [NL-1:0] v);
    logic [NL:0] t = {v, 1'b0};
    if (t[NL]) t = t ^ {1'b1, POLY};
    return t[NL-1:0];
  endfunction

  function automatic logic [NL-1:0] sigma(input logic [NL-1:0] beta);
    logic [NL:0]   cc = {1'b1, POLY};
    logic [NL-1:0] y  = '0;
    for (int r = 0; r < NL; r++)
      if (beta[r])
        for (int c = 0; c < NL; c++)
          if (r + c + 1 <= NL) y[c] = y[c] ^ cc[r + c + 1];
    return y;
  endfunction

  function automatic logic [NL-1:0] gamma(input int i);
    logic [NL-1:0] g = 1;
    for (int k = 0; k < i; k++) g = mula(g);
    return g;
  endfunction

  // Rank over GF(2) of a set of vectors (Gaussian elimination).
  function automatic int rank(input logic [NL-1:0] v [L]);
    logic [NL-1:0] w [L];
    int r = 0;
    w = v;
    for (int bit_i = 0; bit_i < NL && r < L; bit_i++) begin
      int piv = -1;
      for (int i = r; i < L; i++) if (w[i][bit_i] && piv < 0) piv = i;
      if (piv >= 0) begin
        logic [NL-1:0] t = w[piv];
        w[piv] = w[r]; w[r] = t;
        for (int i = 0; i < L; i++) if (i != r && w[i][bit_i]) w[i] = w[i] ^ w[r];
        r++;
      end
    end
    return r;
  endfunction

  int log_tab [int];
  logic [NL-1:0] gam [S][L];


  initial begin
    logic [NL-1:0] g, beta0;
    logic [L-1:0]  delta [S];
    int            pred [S][$];
    int            hits [S][$];
    bit            b [0:PERIOD+2*N];
    int            reg_err;

    reg_err = 0;
    rst_n = 1'b0; test_mode = 0; seed_load = 0; step = 0; func_d = '0; seed = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    g = 1;
    for (int k = 1; k <= PERIOD; k++) begin
      g = mula(g);
      log_tab[int'(g)] = k;
    end
    check(log_tab.num() == PERIOD, "p(x) is not primitive");

    for (int s = 0; s < S; s++) begin
      for (int j = 0; j < L; j++) gam[s][j] = gamma(TAP_OFS[s][j]);
      check(rank(gam[s]) == L, $sformatf("configuration %0d: columns of C dependent", s));
      delta[s] = L'($urandom);
    end

    beta0 = NL'($urandom) | 16'h0001;
    // Equation 6 for every solution beta of beta*C = delta.
    for (int s = 0; s < S; s++) begin
      automatic int d  = int'(N - NL - TAP_BASE[s]);
      automatic int l0 = log_tab[int'(sigma(beta0))];
      for (int bv = 1; bv <= PERIOD; bv++) begin
        logic [L-1:0] out;
        for (int j = 0; j < L; j++) out[j] = ^(NL'(bv) & gam[s][j]);
        if (out == delta[s])
          pred[s].push_back(d + (((log_tab[int'(sigma(NL'(bv)))] - l0) % PERIOD) + PERIOD) % PERIOD);
      end
      pred[s].sort();
      check(pred[s].size() == (1 << (NL - L)),
            $sformatf("configuration %0d: %0d solutions of beta*C = delta", s, pred[s].size()));
    end

    test_mode = 1'b1; seed_load = 1'b1; seed = beta0;
    @(posedge clk); #1;
    seed_load = 1'b0;
    // Reference sequence: b_{m+n} = sum c_i b_{m+i}.
    for (int i = 0; i < int'(NL); i++) b[i] = beta0[i];
    for (int m = 0; m + int'(NL) <= PERIOD + 2 * int'(N); m++) begin
      bit f;
      f = 0;
      for (int i = 0; i < int'(NL); i++) if (POLY[i]) f ^= b[m + i];
      b[m + int'(NL)] = f;
    end

    step = 1'b1;
    for (int k = 0; k < int'(N - NL) + PERIOD; k++) begin
      for (int j = 0; j < int'(N); j++)
        if (k + j >= int'(N - NL) && stages[j] != b[k + j - int'(N - NL)]) reg_err++;
      for (int s = 0; s < S; s++) begin
        automatic int d = int'(N - NL - TAP_BASE[s]);
        if (k >= d && k < d + PERIOD && tap_q[s] == delta[s]) hits[s].push_back(k);
      end
      @(posedge clk); #1;
    end
    step = 1'b0;
    check(reg_err == 0, $sformatf("%0d register values off the recurrence", reg_err));

    for (int s = 0; s < S; s++) begin
      automatic bit same = (hits[s].size() == pred[s].size());
      if (same) foreach (hits[s][i]) if (hits[s][i] != pred[s][i]) same = 0;
      $display("configuration %0d: pattern %h seen %0d times, first at step %0d",
               s, delta[s], hits[s].size(), hits[s].size() > 0 ? hits[s][0] : -1);
      check(same, $sformatf("configuration %0d: pattern steps differ from the prediction", s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
