// rt_post_array: post-addition (inverse transform) mesh of the RT parallel convolver.
//
// A systolic array of RT_N rows by RT_M columns computing s = B p with the
// {-1, 0, +1} matrix B of rt_pkg. The spectral products p[m] travel down
// column m; row k accumulates output k from left to right. Each cell adds,
// subtracts or passes its vertical input into the horizontal sum and latches
// both outputs. The inputs are expected skewed: p[m] one cycle after p[m-1],
// exactly as the pre-addition array and the multiplier row produce them.
//
// Timing: if p[m] is presented in cycle t + m, s[k] is on the registered
// output in cycle t + k + RT_M, i.e. row k leaves the array k cycles after
// row 0 (output skew; the convolver removes it). No extra register on the
// vertical path leaves the last row.
// The cell placement and latches are read from the document's RT array
// figure; the word-level cells are this design's choice.
module rt_post_array
  import rt_pkg::*;
#(
  parameter int unsigned PW = 22,      // product word width (two's complement)
  parameter int unsigned SW = PW + 2   // sum word width
) (
  input  logic                clk,
  input  logic signed [PW-1:0] p [RT_M],
  output logic signed [SW-1:0] s [RT_N]
);

  logic signed [PW-1:0] po [RT_N-1][RT_M];  // no register below the last row
  logic signed [SW-1:0] so [RT_N][RT_M];

  for (genvar k = 0; k < RT_N; k++) begin : g_row
    for (genvar m = 0; m < RT_M; m++) begin : g_col
      localparam int COEF = rt_b(k, m);
      logic signed [PW-1:0] pin;
      logic signed [SW-1:0] sin;
      assign pin = (k == 0) ? p[m] : po[(k == 0) ? 0 : k-1][m];
      assign sin = (m == 0) ? '0 : so[k][(m == 0) ? 0 : m-1];
      if (k < RT_N - 1) begin : g_pass
        always_ff @(posedge clk) po[k][m] <= pin;
      end
      always_ff @(posedge clk) begin
        if (COEF > 0)      so[k][m] <= sin + SW'(pin);
        else if (COEF < 0) so[k][m] <= sin - SW'(pin);
        else               so[k][m] <= sin;
      end
    end
    assign s[k] = so[k][RT_M-1];
  end

endmodule
