// tb_sdc - self-checking testbench of the Shift Division Circuit.
//
// 1. Default instance (n = 4, p(x) = 1 + x^3 + x^4, reset to the root a):
//    the state after k steps must equal a^k as listed in the published
//    discrete logarithm table of the example (k = 1 .. 15, then a again).
// 2. An 8-stage instance with p(x) = 1 + x^2 + x^3 + x^4 + x^8 is compared,
//    step by step, with polynomial arithmetic (multiply by x, reduce by p),
//    must return to its start after exactly 2^8 - 1 steps, and must load.
// A step with `step` low must hold the state.
module tb_sdc;

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // --- instance 1: the example's SDC ----------------------------------------
  logic       load4, step4;
  logic [3:0] load_d4, state4;

  sdc u_sdc4 (
    .clk (clk), .rst_n (rst_n), .load (load4), .load_d (load_d4),
    .step (step4), .state (state4)
  );

  // --- instance 2: 8 stages -------------------------------------------------
  localparam logic [7:0] P8 = 8'b0001_1101;    // c_0 .. c_7 of x^8+x^4+x^3+x^2+1
  logic       load8, step8;
  logic [7:0] load_d8, state8;

  sdc #(.N_STAGES (8), .COEFF (P8), .RESET_STATE (8'h01)) u_sdc8 (
    .clk (clk), .rst_n (rst_n), .load (load8), .load_d (load_d8),
    .step (step8), .state (state8)
  );

  // The table prints vectors as [b0 b1 b2 b3]; bit i of a state is b_i.
  function automatic logic [3:0] printed(input logic [3:0] p);
    return {<<{p}};
  endfunction

  // a^k for k = 1 .. 15, as printed in the logarithm table.
  logic [3:0] pow_tab [1:15];
  initial begin
    pow_tab[1]  = printed(4'b0100); pow_tab[2]  = printed(4'b0010);
    pow_tab[3]  = printed(4'b0001); pow_tab[4]  = printed(4'b1001);
    pow_tab[5]  = printed(4'b1101); pow_tab[6]  = printed(4'b1111);
    pow_tab[7]  = printed(4'b1110); pow_tab[8]  = printed(4'b0111);
    pow_tab[9]  = printed(4'b1010); pow_tab[10] = printed(4'b0101);
    pow_tab[11] = printed(4'b1011); pow_tab[12] = printed(4'b1100);
    pow_tab[13] = printed(4'b0110); pow_tab[14] = printed(4'b0011);
    pow_tab[15] = printed(4'b1000);
  end

  // Multiply by x modulo x^8 + x^4 + x^3 + x^2 + 1.
  function automatic logic [7:0] mulx8(input logic [7:0] v);
    logic [8:0] t = {v, 1'b0};
    if (t[8]) t = t ^ 9'h11D;
    return t[7:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [7:0] model, start;
    int         period;
    rst_n = 1'b0; load4 = 0; step4 = 0; load_d4 = '0;
    load8 = 0; step8 = 0; load_d8 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Powers of a.
    check(state4 == pow_tab[1], "SDC starts at a");
    for (int k = 2; k <= 16; k++) begin
      step4 = 1'b1;
      @(posedge clk); #1;
      check(state4 == pow_tab[(k - 1) % 15 + 1],
            $sformatf("a^%0d: got %b expected %b", k, state4, pow_tab[(k - 1) % 15 + 1]));
    end
    step4 = 1'b0;
    @(posedge clk); #1;
    check(state4 == pow_tab[1], "SDC holds while step is low");
    load4 = 1'b1; load_d4 = pow_tab[7];
    @(posedge clk); #1;
    load4 = 1'b0;
    check(state4 == pow_tab[7], "SDC loads");
    step4 = 1'b1;
    @(posedge clk); #1;
    step4 = 1'b0;
    check(state4 == pow_tab[8], "SDC steps from a loaded state");

    // 2. Eight stages against polynomial arithmetic, and the period.
    start = 8'h5A;
    load8 = 1'b1; load_d8 = start;
    @(posedge clk); #1;
    load8 = 1'b0;
    check(state8 == start, "8-stage SDC loads");
    model  = start;
    period = 0;
    step8  = 1'b1;
    do begin
      @(posedge clk); #1;
      model = mulx8(model);
      period++;
      if (state8 != model) begin
        check(1'b0, $sformatf("8-stage step %0d: got %h expected %h", period, state8, model));
        break;
      end
    end while (state8 != start && period < 300);
    step8 = 1'b0;
    check(period == 255, $sformatf("8-stage period %0d, expected 255", period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
