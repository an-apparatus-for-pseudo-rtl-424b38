// lfsr_sr - LFSR/SR pattern source for pseudo-deterministic BIST.
//
// N_TOTAL one-bit registers REG0 .. REG(N_TOTAL-1) are chained into one shift
// register that moves toward REG0. The last N_LFSR registers form a standard
// form LFSR with feedback polynomial COEFF; its stage 0 feeds the
// (N_TOTAL-N_LFSR)-stage scan chain in front of it. If b_0, b_1, ... is the
// LFSR's output sequence and the LFSR state at step k is
// [b_k .. b_{k+n-1}], then REG j holds b_{k+j-(N-n)} at step k (once the
// sequence has reached it). A tapping configuration tau = [i_0 .. i_{l-1}]
// placed at base register r therefore delivers the l-bit pattern
// [b_{k+i_0} .. b_{k+i_{l-1}}] with k = step - (N-n-r), which is what lets the
// step at which a given pattern appears be predicted from the seed.
//
// Interface and timing (rising clock edge, one action per cycle):
//   test_mode = 0 : every register loads its functional input func_d, so the
//                   chain behaves as the design's ordinary registers;
//   test_mode = 1 : seed_load writes `seed` into the driving LFSR (the scan
//                   chain holds), else `step` advances the whole LFSR/SR by one.
// `stages` shows all registers (bit j = REG j), `scan_out` is REG0, the far
// end of the chain; tap_q[s][j] is tap j of
// configuration s, i.e. REG(TAP_BASE[s] + TAP_OFS[s][j]), combinationally.
//
// The chain, the LFSR at its head and the tap positions follow the
// apparatus; the functional/test multiplexing, the seed port and the reset
// values are choices of this design.
module lfsr_sr #(
  parameter int unsigned              N_TOTAL    = pdt_pkg::EX_N,
  parameter int unsigned              N_LFSR     = pdt_pkg::EX_n,
  parameter logic [N_LFSR-1:0]        COEFF      = pdt_pkg::EX_POLY,
  parameter logic [N_LFSR-1:0]        RESET_SEED = pdt_pkg::EX_SEED,
  parameter int unsigned              S          = pdt_pkg::EX_S,
  parameter int unsigned              L          = pdt_pkg::EX_L,
  parameter int unsigned              TAP_BASE [S]    = pdt_pkg::EX_TAP_BASE,
  parameter int unsigned              TAP_OFS  [S][L] = pdt_pkg::EX_TAP_OFS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        test_mode,
  input  logic [N_TOTAL-1:0]          func_d,
  input  logic                        seed_load,
  input  logic [N_LFSR-1:0]           seed,
  input  logic                        step,
  output logic [N_TOTAL-1:0]          stages,
  output logic [S-1:0][L-1:0]         tap_q,
  output logic                        scan_out
);

  localparam int unsigned SR_LEN = N_TOTAL - N_LFSR;

  // Highest register any tap lands on; every tap must lie on the chain.
  function automatic int unsigned max_tap();
    int unsigned m = 0;
    for (int s = 0; s < S; s++)
      for (int j = 0; j < L; j++)
        if (TAP_BASE[s] + TAP_OFS[s][j] > m) m = TAP_BASE[s] + TAP_OFS[s][j];
    return m;
  endfunction

  localparam int unsigned MAX_TAP = max_tap();

  if (MAX_TAP >= N_TOTAL) begin : g_bad_tap
    $error("lfsr_sr: a tap lies beyond the end of the chain");
  end

  logic [N_LFSR-1:0] lfsr_state;
  logic              lfsr_sout;
  logic [SR_LEN-1:0] sr_q;
  logic              lfsr_load;
  logic [N_LFSR-1:0] lfsr_load_d;
  logic              chain_step;

  always_comb begin
    lfsr_load   = !test_mode || seed_load;
    lfsr_load_d = test_mode ? seed : func_d[N_TOTAL-1 -: N_LFSR];
    chain_step  = test_mode && !seed_load && step;
  end

  std_lfsr #(
    .N_STAGES   (N_LFSR),
    .COEFF      (COEFF),
    .RESET_SEED (RESET_SEED)
  ) u_lfsr (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (lfsr_load),
    .load_d (lfsr_load_d),
    .step   (chain_step),
    .state  (lfsr_state),
    .sout   (lfsr_sout)
  );

  scan_sr #(
    .LEN (SR_LEN)
  ) u_sr (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (!test_mode),
    .load_d (func_d[SR_LEN-1:0]),
    .step   (chain_step),
    .sin    (lfsr_sout),
    .q      (sr_q),
    .sout   (scan_out)
  );

  assign stages = {lfsr_state, sr_q};

  always_comb begin
    for (int s = 0; s < S; s++)
      for (int j = 0; j < L; j++)
        tap_q[s][j] = stages[TAP_BASE[s] + TAP_OFS[s][j]];
  end

  // An all-zero LFSR state never leaves zero: a seed must be non-zero.
  a_seed_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                   test_mode && seed_load |-> seed != '0)
    else $error("lfsr_sr: all-zero seed loaded into the driving LFSR");

endmodule
