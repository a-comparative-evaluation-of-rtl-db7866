// mersenne_pkg: arithmetic modulo a Mersenne number 2^P - 1 (one's complement).
//
// A residue is a P-bit word; both 0 and 2^P - 1 (all ones, "negative zero")
// stand for zero. A product by 2^i is a circular left rotation by i bits.
// Additions are done in carry-save form: a full-adder row whose carry vector
// is rotated left by one bit, so the carry out of the MSB re-enters at the
// LSB (end-around carry). A final carry-propagate add with end-around carry
// turns the sum/carry pair into one word. Functions take the word length as an
// argument bound (MAXP) so that one package serves every P up to 32.
package mersenne_pkg;

  localparam int unsigned MAXP = 32;
  typedef logic [MAXP-1:0] mword_t;

  // Rotate the low p bits of a left by sh positions (0 <= sh < p).
  function automatic mword_t mrotl(mword_t a, int unsigned sh, int unsigned p);
    mword_t mask;
    mword_t r;
    mask = (p >= MAXP) ? '1 : ((mword_t'(1) << p) - 1);
    a    = a & mask;
    if (sh == 0) r = a;
    else         r = ((a << sh) | (a >> (p - sh))) & mask;
    return r;
  endfunction

  // Redundant (carry-save) form of a residue: value = s + c mod 2^p - 1.
  typedef struct packed {
    mword_t s;
    mword_t c;
  } mcs_t;

  // One carry-save full-adder row with end-around carry: adds a into the
  // redundant pair. The carry vector is rotated left by one bit.
  function automatic mcs_t mcsa(mcs_t acc, mword_t a, int unsigned p);
    mcs_t r;
    r.s = acc.s ^ acc.c ^ a;
    r.c = mrotl((acc.s & acc.c) | (acc.s & a) | (acc.c & a), 1, p);
    return r;
  endfunction

  // End-around-carry addition of two p-bit words (one carry fold suffices).
  function automatic mword_t madd(mword_t a, mword_t b, int unsigned p);
    mword_t mask;
    logic [MAXP:0] s;
    mask = (p >= MAXP) ? '1 : ((mword_t'(1) << p) - 1);
    s    = {1'b0, a & mask} + {1'b0, b & mask};
    s    = {1'b0, s[MAXP-1:0] & mask} + (MAXP+1)'(s >> p);
    return s[MAXP-1:0] & mask;
  endfunction

  // Map the all-ones representation of zero to 0.
  function automatic mword_t mnorm(mword_t a, int unsigned p);
    mword_t mask;
    mask = (p >= MAXP) ? '1 : ((mword_t'(1) << p) - 1);
    return ((a & mask) == mask) ? '0 : (a & mask);
  endfunction

  // Multiplicative inverse of v modulo 2^p - 1 (v coprime with the modulus).
  function automatic mword_t minv(int unsigned v, int unsigned p);
    longint unsigned m;
    longint unsigned k;
    m = (longint'(1) << p) - 1;
    for (k = 1; k < m; k++) begin
      if (((k * v) % m) == 1) return mword_t'(k);
    end
    return '0;
  endfunction

endpackage
