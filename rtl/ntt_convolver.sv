// ntt_convolver: cyclic convolver using the Mersenne number-theoretic
// transform (fully parallel, pipelined).
//
// y = T^-1 ( g .* (T x) ) mod 2^P - 1, with T the radix-2 transform of length
// L = P (default P = 5, modulus 31) or, with NEG = 1, the radix -2 transform of
// length L = 2P, and g = L^-1 T h from ntt_coef. The three
// phases are the direct transform array, a row of P spectral multipliers and
// the inverse transform array, each built from carry-save end-around-carry
// full-adder rows. All arithmetic is exact one's-complement arithmetic on
// P-bit words: results are the cyclic convolution reduced mod 2^P - 1, so the
// field must be chosen large enough for the true results not to wrap.
//
// Interface: in_valid with x[L] starts a convolution every cycle; g[L] are
// held constant. out_valid with y[L] (normalised, 0 .. 2^P - 2) follows
// LATENCY = 3 cycles later: one register after each phase. Throughput is one
// convolution per clock. The three-phase organisation and the arithmetic follow
// the document; the register placement (one per phase instead of bit-level
// pipelining) and the synchronous active-high reset are this design's choice.
module ntt_convolver
  import mersenne_pkg::*;
#(
  parameter int unsigned P   = 5,
  parameter bit          NEG = 1'b0,   // 1: radix -2, length 2P
  localparam int unsigned L  = NEG ? 2 * P : P
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [P-1:0] x [L],
  input  logic [P-1:0] g [L],
  output logic         out_valid,
  output logic [P-1:0] y [L]
);

  localparam int unsigned LATENCY = 3;

  logic [P-1:0] v_c [L];
  logic [P-1:0] v_q [L];
  logic [P-1:0] u_c [L];
  logic [P-1:0] u_q [L];
  logic [P-1:0] y_c [L];
  logic [LATENCY-1:0] vld;

  // phase 1: direct transform
  ntt_transform #(.P(P), .INVERSE(1'b0), .NEG(NEG)) u_fwd (.in_w(x), .out_w(v_c));

  // phase 2: spectral products
  for (genvar k = 0; k < L; k++) begin : g_spec
    mersenne_mult #(.P(P)) u_mul (.a(v_q[k]), .b(g[k]), .p(u_c[k]));
  end

  // phase 3: inverse transform (1/L already in g)
  ntt_transform #(.P(P), .INVERSE(1'b1), .NEG(NEG)) u_inv (.in_w(u_q), .out_w(y_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      vld <= '0;
      for (int k = 0; k < L; k++) begin
        v_q[k] <= '0;
        u_q[k] <= '0;
        y[k]   <= '0;
      end
    end else begin
      vld <= {vld[LATENCY-2:0], in_valid};
      for (int k = 0; k < L; k++) begin
        v_q[k] <= v_c[k];
        u_q[k] <= u_c[k];
        y[k]   <= P'(mnorm(mword_t'(y_c[k]), P));
      end
    end
  end

  assign out_valid = vld[LATENCY-1];

endmodule
