// sdc - Shift Division Circuit: n-stage modular form (internal-XOR) LFSR.
//
// Stage b_{n-1} is fed back: stage 0 takes c_0 * b_{n-1}, and each stage
// j > 0 takes b_{j-1} + c_j * b_{n-1}. Reading the state as the field
// element b_0 + b_1 a + ... + b_{n-1} a^{n-1} of GF(2^n), with a a root of
// p(x), every step multiplies it by a. Started from a, the circuit runs
// through a, a^2, a^3, ..., which is how a discrete logarithm table is
// obtained for small n (step count = logarithm).
//
// Interface: `load` writes `load_d`; otherwise `step` advances one state on
// the rising clock edge. The structure follows the SDC of the apparatus;
// the load port, the synchronous reset and its value (the root a) are
// choices of this design.
module sdc #(
  parameter int unsigned          N_STAGES    = pdt_pkg::EX_n,
  parameter logic [N_STAGES-1:0]  COEFF       = pdt_pkg::EX_POLY,
  parameter logic [N_STAGES-1:0]  RESET_STATE = pdt_pkg::EX_ALPHA
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N_STAGES-1:0]   load_d,
  input  logic                  step,
  output logic [N_STAGES-1:0]   state
);

  logic [N_STAGES-1:0] next_state;

  // Multiply by a: shift toward the high stage, add c*b_{n-1}.
  always_comb begin
    next_state = {state[N_STAGES-2:0], 1'b0} ^ (COEFF & {N_STAGES{state[N_STAGES-1]}});
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     state <= RESET_STATE;
    else if (load)  state <= load_d;
    else if (step)  state <= next_state;
  end

endmodule
