// ntt_coef: spectral coefficients of the Mersenne NTT convolver.
//
// g = L^-1 * T h (mod 2^P - 1), where T is the direct transform of length L
// (radix 2, L = P; or radix -2, L = 2P when NEG = 1). Folding the 1/L of the
// inverse transform into g lets the convolver use the plain inverse transform
// (for P = 5 the factor is 25, since 5*25 = 125 = 1 mod 31; for L = 10 it is
// 28, since 10*28 = 280 = 1 mod 31). Combinational: an ntt_transform followed
// by a row of mersenne_mult with the constant L^-1. Interface: h[L] kernel
// residues in, g[L] coefficients out, normalised so that zero is 0. The
// folding of 1/L into the coefficients is this design's choice.
module ntt_coef
  import mersenne_pkg::*;
#(
  parameter int unsigned P   = 5,
  parameter bit          NEG = 1'b0,   // 1: radix -2, length 2P
  localparam int unsigned L  = NEG ? 2 * P : P
) (
  input  logic [P-1:0] h [L],
  output logic [P-1:0] g [L]
);

  localparam logic [P-1:0] LINV = P'(minv(L, P));

  logic [P-1:0] th [L];
  logic [P-1:0] gr [L];

  ntt_transform #(.P(P), .INVERSE(1'b0), .NEG(NEG)) u_fwd (.in_w(h), .out_w(th));

  for (genvar k = 0; k < L; k++) begin : g_mul
    mersenne_mult #(.P(P)) u_mul (.a(th[k]), .b(LINV), .p(gr[k]));
    assign g[k] = P'(mnorm(mword_t'(gr[k]), P));
  end

endmodule
