// ntt_transform: direct or inverse Mersenne number-theoretic transform.
//
// Computes out[k] = sum_j r^(+/- j*k mod L) * in[j] modulo 2^P - 1 over the
// Mersenne modulus 2^P - 1, either with radix r = 2 and length L = P
// (NEG = 0), or with radix r = -2 and length L = 2P (NEG = 1; (-2)^P = -1, so
// -2 has order 2P). Every product by a power of two is a circular rotation,
// and a negation is a bitwise complement in one's-complement arithmetic, so
// the "multiplications" are pure wiring: (-2)^e x is x rotated by e mod P,
// complemented when e is odd. Each output is a column of carry-save full-adder rows (one row per
// input word, carry vector rotated for the end-around carry) closed by one
// end-around-carry propagate adder. INVERSE = 1 uses the exponents -j*k, i.e.
// the inverse transform without its 1/L factor (that factor is folded into
// the spectral coefficients, see ntt_coef).
//
// Interface: in[L] and out[L] are P-bit residues. Purely combinational; the
// convolver registers its output. Outputs may be 2^P - 1 (negative zero).
// The structure (rotations in the routing, carry-save rows, end-around carry)
// and the two transforms (radix 2, length p; radix -2, length 2p) follow the
// Mersenne transform design; closing each column with a single
// word-level end-around adder instead of half-adder stages is this design's
// choice.
module ntt_transform
  import mersenne_pkg::*;
#(
  parameter int unsigned P       = 5,  // Mersenne exponent = transform length = word length
  parameter bit          INVERSE = 1'b0,
  parameter bit          NEG     = 1'b0, // 1: radix -2, length 2P
  localparam int unsigned L      = NEG ? 2 * P : P
) (
  input  logic [P-1:0] in_w  [L],
  output logic [P-1:0] out_w [L]
);

  localparam mword_t MASK = mword_t'((longint'(1) << P) - 1);

  always_comb begin
    for (int unsigned k = 0; k < L; k++) begin
      mcs_t acc;
      mword_t term;
      int unsigned e;
      acc = '0;
      for (int unsigned j = 0; j < L; j++) begin
        e = (j * k) % L;
        if (INVERSE && e != 0) e = L - e;
        term = mrotl(mword_t'(in_w[j]), e % P, P);
        if (e % 2 == 1 && NEG) term = ~term & MASK;
        acc = mcsa(acc, term, P);
      end
      out_w[k] = P'(madd(acc.s, acc.c, P));
    end
  end

endmodule
