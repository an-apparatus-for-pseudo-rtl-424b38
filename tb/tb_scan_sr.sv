// tb_scan_sr - self-checking testbench of the scan-chain shift register.
//
// Random bits are shifted in with random idle cycles; every stage is compared
// with a model that keeps the last LEN shifted-in bits (stage LEN-1 newest,
// stage 0 oldest, which is also the serial output). A parallel load and its
// priority over shifting are checked too.
module tb_scan_sr;

  localparam int unsigned LEN = 6;

  logic clk = 1'b0;
  logic rst_n;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic           load, step, sin, sout;
  logic [LEN-1:0] load_d, q;

  scan_sr u_dut (
    .clk (clk), .rst_n (rst_n), .load (load), .load_d (load_d),
    .step (step), .sin (sin), .q (q), .sout (sout)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [LEN-1:0] model;
    int             shifts = 0;
    rst_n = 1'b0; load = 0; step = 0; sin = 0; load_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q == '0, "reset clears the chain");
    model = '0;

    for (int i = 0; i < 200; i++) begin
      step = ($urandom_range(0, 3) != 0);
      sin  = 1'($urandom);
      @(posedge clk); #1;
      if (step) begin
        model = {sin, model[LEN-1:1]};
        shifts++;
      end
      check(q == model, $sformatf("cycle %0d: q %b expected %b", i, q, model));
      check(sout == model[0], $sformatf("cycle %0d: serial output", i));
    end
    check(shifts > 100, "too few shifts exercised");

    load = 1'b1; step = 1'b1; load_d = LEN'($urandom);
    @(posedge clk); #1;
    load = 1'b0; step = 1'b0;
    check(q == load_d, "parallel load wins over shifting");

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
