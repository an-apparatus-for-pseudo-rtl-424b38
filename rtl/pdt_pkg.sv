// pdt_pkg - shared constants of the pseudo-deterministic test apparatus.
//
// Polynomials are written as a coefficient vector c with bit i = c_i, for
// p(x) = c_0 + c_1 x + ... + c_{n-1} x^{n-1} + x^n (the leading x^n term is
// implied). State vectors follow the same convention: bit i = b_i, so the
// vector printed as [b_0 b_1 ... b_{n-1}] is written with b_0 in bit 0.
//
// The default configuration is the worked example of the apparatus: a
// 10-stage LFSR/SR whose 4-stage driving LFSR has p(x) = 1 + x^3 + x^4, with
// two tapping configurations feeding CLB1 (registers 2+0, 2+2, 2+6) and CLB2
// (registers 1+0, 1+6, 1+7). All of these numbers come from that example.
package pdt_pkg;

  // Length of the whole LFSR/SR (N) and of its driving LFSR (n).
  localparam int unsigned EX_N = 10;
  localparam int unsigned EX_n = 4;

  // p(x) = 1 + x^3 + x^4  ->  c_0 = 1, c_1 = 0, c_2 = 0, c_3 = 1.
  localparam logic [EX_n-1:0] EX_POLY = 4'b1001;

  // Tapping configurations: S configurations of L taps each. A tap sits on
  // register TAP_BASE[s] + TAP_OFS[s][j]; TAP_OFS is the configuration tau.
  localparam int unsigned EX_S = 2;
  localparam int unsigned EX_L = 3;
  localparam int unsigned EX_TAP_BASE [EX_S]       = '{2, 1};
  localparam int unsigned EX_TAP_OFS  [EX_S][EX_L] = '{'{0, 2, 6}, '{0, 6, 7}};

  // Start state of the driving LFSR used in the example: [0 0 0 1].
  localparam logic [EX_n-1:0] EX_SEED = 4'b1000;

  // Start state of the accompanying SDC in the example: the root
  // alpha = [0 1 0 0].
  localparam logic [EX_n-1:0] EX_ALPHA = 4'b0010;

endpackage
