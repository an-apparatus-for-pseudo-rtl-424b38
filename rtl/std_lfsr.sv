// std_lfsr - n-stage standard form (external-XOR) LFSR.
//
// The stages b_0 .. b_{n-1} shift one place toward stage 0 on every step; the
// new value of stage n-1 is the modulo-2 sum of c_i * b_i over all stages.
// One step therefore maps the state row vector beta to beta*T, with T the
// companion matrix whose last column holds c_0 .. c_{n-1}. Stage 0 is the
// serial output; in an LFSR/SR it drives the tail of the scan chain.
//
// Interface: `load` writes `load_d` into all stages (a seed, or functional
// data when the stages serve as ordinary registers); otherwise `step`
// advances the LFSR by one state. Both act on the rising clock edge, one
// state per cycle; `load` wins over `step`. The structure follows the
// standard form LFSR of the apparatus; the load port, the active-low
// synchronous reset and its reset value (the example's start state
// [0 ... 0 1]) are choices of this design.
module std_lfsr #(
  parameter int unsigned            N_STAGES   = pdt_pkg::EX_n,
  parameter logic [N_STAGES-1:0]    COEFF      = pdt_pkg::EX_POLY,
  parameter logic [N_STAGES-1:0]    RESET_SEED = pdt_pkg::EX_SEED
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N_STAGES-1:0]   load_d,
  input  logic                  step,
  output logic [N_STAGES-1:0]   state,
  output logic                  sout
);

  logic feedback;

  // Modulo-2 sum of the tapped stages.
  always_comb feedback = ^(state & COEFF);

  always_ff @(posedge clk) begin
    if (!rst_n)     state <= RESET_SEED;
    else if (load)  state <= load_d;
    else if (step)  state <= {feedback, state[N_STAGES-1:1]};
  end

  assign sout = state[0];

endmodule
