// rt_pkg: constants of the order-4 rectangular transform (RT) cyclic convolver.
//
// A length-4 cyclic convolution y = H x is computed as y = B diag(d) A x with
// M = 5 spectral products. A (5x4) is the pre-addition (direct transform), B
// (4x5) the post-addition (inverse transform), and the spectral coefficients
// come from the kernel as d = G h. All entries of A and B are -1, 0 or +1, so
// both transforms need only adders and subtractors. G has quarter entries; the
// hardware keeps 4*G (integer) and divides the final result by 4, which is
// exact because y is an integer. The matrices A and B are those printed for
// the order 4*5 transform; G is the factorisation that makes B diag(Gh) A equal
// the circulant H (rows 3..5 of G are fixed by A and B).
package rt_pkg;

  localparam int unsigned RT_N = 4;  // convolution order
  localparam int unsigned RT_M = 5;  // transform dimension (spectral products)

  // Matrix entries are stored row by row as 3-bit two's complement fields in
  // packed vectors (entry [i][j] at field i*COLS + j) and read with the
  // constant functions below.
  typedef logic signed [2:0] coef_t;

  // Pre-addition matrix A, indexed [spectral index][input index]
  localparam logic [RT_M*RT_N*3-1:0] RT_A_BITS = {
    coef_t'( 0), coef_t'( 1), coef_t'( 0), coef_t'(-1),   // row 4: 0  1  0 -1
    coef_t'( 1), coef_t'( 0), coef_t'(-1), coef_t'( 0),   // row 3: 1  0 -1  0
    coef_t'( 1), coef_t'( 1), coef_t'(-1), coef_t'(-1),   // row 2: 1  1 -1 -1
    coef_t'( 1), coef_t'(-1), coef_t'( 1), coef_t'(-1),   // row 1: 1 -1  1 -1
    coef_t'( 1), coef_t'( 1), coef_t'( 1), coef_t'( 1)    // row 0: 1  1  1  1
  };

  // Post-addition matrix B, indexed [output index][spectral index]
  localparam logic [RT_N*RT_M*3-1:0] RT_B_BITS = {
    coef_t'( 1), coef_t'(-1), coef_t'(-1), coef_t'(-1), coef_t'( 0),  // row 3
    coef_t'( 1), coef_t'( 1), coef_t'(-1), coef_t'( 0), coef_t'( 1),  // row 2
    coef_t'( 1), coef_t'(-1), coef_t'( 1), coef_t'( 1), coef_t'( 0),  // row 1
    coef_t'( 1), coef_t'( 1), coef_t'( 1), coef_t'( 0), coef_t'(-1)   // row 0
  };

  // 4*G: spectral coefficients scaled by 4, indexed [spectral index][tap]
  localparam logic [RT_M*RT_N*3-1:0] RT_G4_BITS = {
    coef_t'( 2), coef_t'( 2), coef_t'(-2), coef_t'(-2),   // row 4
    coef_t'(-2), coef_t'( 2), coef_t'( 2), coef_t'(-2),   // row 3
    coef_t'( 2), coef_t'( 0), coef_t'(-2), coef_t'( 0),   // row 2
    coef_t'( 1), coef_t'(-1), coef_t'( 1), coef_t'(-1),   // row 1
    coef_t'( 1), coef_t'( 1), coef_t'( 1), coef_t'( 1)    // row 0
  };

  // The fields of one row are listed most significant first (column 0 at
  // the top of the row's fields), so column j of row i sits at field
  // i*COLS + (COLS-1-j).
  function automatic int rt_field(logic [RT_M*RT_M*3-1:0] bits, int i, int j, int cols);
    coef_t c;
    c = coef_t'(bits[(i*cols + (cols-1-j))*3 +: 3]);
    return int'(c);
  endfunction

  function automatic int rt_a(int m, int j);
    return rt_field((RT_M*RT_M*3)'(RT_A_BITS), m, j, RT_N);
  endfunction

  function automatic int rt_b(int k, int m);
    return rt_field((RT_M*RT_M*3)'(RT_B_BITS), k, m, RT_M);
  endfunction

  function automatic int rt_g4(int m, int j);
    return rt_field((RT_M*RT_M*3)'(RT_G4_BITS), m, j, RT_N);
  endfunction

  // log2 of the scale factor removed at the output
  localparam int unsigned RT_SCALE_SHIFT = 2;

endpackage
