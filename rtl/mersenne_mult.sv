// mersenne_mult: multiplier modulo 2^P - 1 (spectral multiplier of the NTT array).
//
// Product a*b mod 2^P - 1 = sum_i a[i] * (b rotated left by i). Each bit of a
// gates one rotated copy of b into a carry-save full-adder row with end-around
// carry (P rows), and an end-around-carry adder resolves the sum/carry pair.
// Interface: a, b and p are P-bit residues; p may be 2^P - 1 (zero).
// Purely combinational. The array of gated rows with rotated operands is the
// organisation of the document's spectral multipliers; the final word-level
// adder is this design's choice.
module mersenne_mult
  import mersenne_pkg::*;
#(
  parameter int unsigned P = 5
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic [P-1:0] p
);

  always_comb begin
    mcs_t acc;
    acc = '0;
    for (int unsigned i = 0; i < P; i++) begin
      acc = mcsa(acc, a[i] ? mrotl(mword_t'(b), i, P) : '0, P);
    end
    p = P'(madd(acc.s, acc.c, P));
  end

endmodule
