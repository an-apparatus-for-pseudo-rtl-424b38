// pdt_top - the pseudo-deterministic test apparatus of the worked example.
//
// Ten one-bit registers REG0 .. REG9 of a design are chained into a (10,4)
// LFSR/SR: REG6 .. REG9 form the driving standard form LFSR with
// p(x) = 1 + x^3 + x^4, REG0 .. REG5 the scan chain in front of it. Two
// tapping configurations feed the two combinational blocks under test:
//   CLB1 inputs <- REG2, REG4, REG8   (tau(1) = [0 2 6] at register 2)
//   CLB2 inputs <- REG1, REG7, REG8   (tau(2) = [0 6 7] at register 1)
// The CLBs themselves are not part of this RTL: their input buses are the
// outputs clb1_in / clb2_in. Started from the seed [0 0 0 1], CLB1 sees the
// pattern [1 1 1] at steps 8 and 12 and CLB2 sees [0 1 0] at steps 5 and 7.
//
// Beside it sits the accompanying Shift Division Circuit with the same
// polynomial, started from the root a = [0 1 0 0]; stepping it lists the
// powers of a, i.e. the discrete logarithm table used to predict those
// steps. It has its own control ports and shares only the clock and reset.
//
// Timing: everything acts on the rising clock edge, one action per cycle.
// Controls of the LFSR/SR: test_mode (0 = functional load of func_d),
// seed_load, step; controls of the SDC: sdc_load, sdc_step.
// All sizes and tap positions follow the example; the control ports are
// choices of this design.
module pdt_top
  import pdt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // LFSR/SR
  input  logic             test_mode,
  input  logic [EX_N-1:0]  func_d,
  input  logic             seed_load,
  input  logic [EX_n-1:0]  seed,
  input  logic             step,
  output logic [EX_N-1:0]  regs,
  output logic [EX_L-1:0]  clb1_in,
  output logic [EX_L-1:0]  clb2_in,
  output logic             scan_out,
  // Accompanying SDC
  input  logic             sdc_load,
  input  logic [EX_n-1:0]  sdc_load_d,
  input  logic             sdc_step,
  output logic [EX_n-1:0]  sdc_state
);

  logic [EX_S-1:0][EX_L-1:0] taps;

  lfsr_sr #(
    .N_TOTAL    (EX_N),
    .N_LFSR     (EX_n),
    .COEFF      (EX_POLY),
    .RESET_SEED (EX_SEED),
    .S          (EX_S),
    .L          (EX_L),
    .TAP_BASE   (EX_TAP_BASE),
    .TAP_OFS    (EX_TAP_OFS)
  ) u_lfsr_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .func_d    (func_d),
    .seed_load (seed_load),
    .seed      (seed),
    .step      (step),
    .stages    (regs),
    .tap_q     (taps),
    .scan_out  (scan_out)
  );

  assign clb1_in = taps[0];
  assign clb2_in = taps[1];

  sdc #(
    .N_STAGES    (EX_n),
    .COEFF       (EX_POLY),
    .RESET_STATE (EX_ALPHA)
  ) u_sdc (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (sdc_load),
    .load_d (sdc_load_d),
    .step   (sdc_step),
    .state  (sdc_state)
  );

endmodule
