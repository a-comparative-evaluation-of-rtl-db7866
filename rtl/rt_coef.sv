// rt_coef: spectral coefficients of the order-4 rectangular transform.
//
// d4[m] = sum_j G4[m][j] * h[j], i.e. 4 times the spectral coefficients d = G h
// of the RT convolver; the factor 4 is removed at the convolver output. G4 has
// entries 0, +-1 and +-2 only, so this is a small add/shift network.
// Combinational. Interface: h[RT_N] W-bit two's complement taps in, d4[RT_M]
// (W+4)-bit coefficients out. The coefficients are computed once per kernel;
// the document treats them as precomputed constants.
module rt_coef
  import rt_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = W + 4
) (
  input  logic signed [W-1:0]  h  [RT_N],
  output logic signed [DW-1:0] d4 [RT_M]
);

  always_comb begin
    for (int m = 0; m < RT_M; m++) begin
      logic signed [DW-1:0] acc;
      acc = '0;
      for (int j = 0; j < RT_N; j++) begin
        case (rt_g4(m, j))
          1:       acc = acc + DW'(h[j]);
          -1:      acc = acc - DW'(h[j]);
          2:       acc = acc + (DW'(h[j]) <<< 1);
          -2:      acc = acc - (DW'(h[j]) <<< 1);
          default: acc = acc;
        endcase
      end
      d4[m] = acc;
    end
  end

endmodule
