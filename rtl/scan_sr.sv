// scan_sr - the (N-n)-stage shift register (scan chain) of an LFSR/SR.
//
// Stages q_0 .. q_{LEN-1}; on every step each stage takes the value of the
// next higher stage and stage LEN-1 takes the serial input `sin`, which in
// the LFSR/SR is stage 0 of the driving LFSR. Stage 0 is the far end of the
// chain (`sout`).
//
// Interface: `load` writes `load_d` into all stages (the registers' own
// functional data when the chain is not in test mode); otherwise `step`
// shifts by one place. Both act on the rising clock edge; `load` wins. The
// shift direction follows the apparatus; the load port and the synchronous
// reset to zero are choices of this design.
module scan_sr #(
  parameter int unsigned LEN = pdt_pkg::EX_N - pdt_pkg::EX_n
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [LEN-1:0] load_d,
  input  logic           step,
  input  logic           sin,
  output logic [LEN-1:0] q,
  output logic           sout
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_d;
    else if (step)  q <= {sin, q[LEN-1:1]};
  end

  assign sout = q[0];

endmodule
