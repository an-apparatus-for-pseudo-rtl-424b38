// tb_std_lfsr - self-checking testbench of the standard form LFSR.
//
// 1. Default instance (n = 4, p(x) = 1 + x^3 + x^4, reset to [0 0 0 1]):
//    the state at step k must be [b_k .. b_{k+3}] of the sequence given by
//    the linear recurrence b_{k+4} = b_k + b_{k+3}, which the testbench
//    computes itself, and the serial output must be b_k.
// 2. The linear map sigma(beta) = beta*A, with A built from the feedback
//    coefficients, must turn each LFSR step into a multiplication by the
//    root a in GF(2^4) (a step of the accompanying modular LFSR), and A for
//    this polynomial must equal the matrix printed for the example.
// 3. A 16-stage instance with p(x) = 1 + x^11 + x^13 + x^14 + x^16 must have
//    period 2^16 - 1. Loading and holding are checked as well.
module tb_std_lfsr;

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  localparam logic [3:0] P4 = 4'b1001;          // c_0 .. c_3

  logic       load4, step4, sout4;
  logic [3:0] load_d4, state4;

  std_lfsr u_lfsr4 (
    .clk (clk), .rst_n (rst_n), .load (load4), .load_d (load_d4),
    .step (step4), .state (state4), .sout (sout4)
  );

  localparam logic [15:0] P16 = 16'b0110_1000_0000_0001;  // c_0, c_11, c_13, c_14
  logic        load16, step16, sout16;
  logic [15:0] load_d16, state16;

  std_lfsr #(.N_STAGES (16), .COEFF (P16), .RESET_SEED (16'h0001)) u_lfsr16 (
    .clk (clk), .rst_n (rst_n), .load (load16), .load_d (load_d16),
    .step (step16), .state (state16), .sout (sout16)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // A[r][c] = c_{r+c+1}, with c_n = 1 and c_m = 0 for m > n (Equation 1).
  function automatic logic [3:0] a_row(input int r);
    logic [4:0] cc = {1'b1, P4};
    logic [3:0] row = '0;
    for (int c = 0; c < 4; c++)
      row[c] = (r + c + 1 <= 4) ? cc[r + c + 1] : 1'b0;
    return row;
  endfunction

  // Row vector times A.
  function automatic logic [3:0] sigma(input logic [3:0] beta);
    logic [3:0] y = '0;
    for (int r = 0; r < 4; r++)
      if (beta[r]) y = y ^ a_row(r);
    return y;
  endfunction

  // Multiply by a in GF(2^4) = GF(2)[x]/(1 + x^3 + x^4).
  function automatic logic [3:0] mula(input logic [3:0] v);
    logic [4:0] t = {v, 1'b0};
    if (t[4]) t = t ^ {1'b1, P4};
    return t[3:0];
  endfunction

  function automatic logic [3:0] printed(input logic [3:0] p);
    return {<<{p}};
  endfunction

  initial begin
    bit         b [0:63];
    logic [3:0] prev;
    logic [15:0] start;
    int          period;

    rst_n = 1'b0; load4 = 0; step4 = 0; load_d4 = '0;
    load16 = 0; step16 = 0; load_d16 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Printed A of the example.
    check(a_row(0) == printed(4'b0011) && a_row(1) == printed(4'b0110) &&
          a_row(2) == printed(4'b1100) && a_row(3) == printed(4'b1000),
          "matrix A differs from the example");

    // Reference sequence from the recurrence.
    b[0] = 0; b[1] = 0; b[2] = 0; b[3] = 1;
    for (int k = 0; k + 4 < 64; k++) b[k + 4] = b[k] ^ b[k + 3];

    step4 = 1'b1;
    for (int k = 0; k < 40; k++) begin
      check(state4 == {b[k + 3], b[k + 2], b[k + 1], b[k]},
            $sformatf("step %0d: state %b", k, state4));
      check(sout4 == b[k], $sformatf("step %0d: serial output", k));
      prev = state4;
      @(posedge clk); #1;
      check(sigma(state4) == mula(sigma(prev)),
            $sformatf("step %0d: sigma does not follow the SDC", k));
    end
    step4 = 1'b0;
    prev  = state4;
    @(posedge clk); #1;
    check(state4 == prev, "LFSR holds while step is low");

    // Load has priority over step.
    load4 = 1'b1; step4 = 1'b1; load_d4 = printed(4'b0111);
    @(posedge clk); #1;
    load4 = 1'b0; step4 = 1'b0;
    check(state4 == printed(4'b0111), "LFSR loads a seed");

    // Period of the 16-stage LFSR.
    start = 16'hACE1;
    load16 = 1'b1; load_d16 = start;
    @(posedge clk); #1;
    load16 = 1'b0;
    check(state16 == start, "16-stage LFSR loads");
    step16 = 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (state16 != start && period < 70000);
    step16 = 1'b0;
    check(period == 65535, $sformatf("16-stage period %0d, expected 65535", period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
