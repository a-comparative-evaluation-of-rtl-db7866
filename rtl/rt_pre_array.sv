// rt_pre_array: pre-addition (direct transform) mesh of the RT parallel convolver.
//
// A systolic array of RT_N rows by RT_M columns computing u = A x with the
// {-1, 0, +1} matrix A of rt_pkg. Row r carries input x[RT_N-1-r] to the right;
// column m accumulates the partial sum downwards. Each cell adds, subtracts or
// simply passes (a "dummy" delay cell for a zero coefficient) and latches both
// its x and its sum output, so every cell has one register on each output.
// Row r's input is delayed by r registers (input skew) so that the x words
// meet the sums travelling down the columns.
//
// Timing: x presented in cycle t (with no register before row 0) gives u[m] on
// the registered outputs in cycle t + RT_N + m, i.e. the columns leave the
// array skewed by one cycle each. A new vector may enter every cycle.
// The cell types, their placement, the latches between cells and the input
// skew are read from the document's RT array figure; the word-level
// (bit-parallel) cells are this design's choice.
module rt_pre_array
  import rt_pkg::*;
#(
  parameter int unsigned W  = 8,       // input word width (two's complement)
  parameter int unsigned UW = W + 2    // output word width (sum of RT_N words)
) (
  input  logic                clk,
  input  logic signed [W-1:0]  x [RT_N],
  output logic signed [UW-1:0] u [RT_M]
);

  // skew registers: row r gets r delays
  logic signed [W-1:0]  skew [RT_N][RT_N];
  logic signed [W-1:0]  xo   [RT_N][RT_M];
  logic signed [UW-1:0] so   [RT_N][RT_M];

  for (genvar r = 0; r < RT_N; r++) begin : g_row
    logic signed [W-1:0] row_in;
    if (r == 0) begin : g_noskew
      assign row_in = x[RT_N-1];
    end else begin : g_skew
      always_ff @(posedge clk) begin
        skew[r][0] <= x[RT_N-1-r];
        for (int i = 1; i < r; i++) skew[r][i] <= skew[r][i-1];
      end
      assign row_in = skew[r][r-1];
    end

    for (genvar m = 0; m < RT_M; m++) begin : g_col
      localparam int COEF = rt_a(m, RT_N-1-r);
      logic signed [W-1:0]  xin;
      logic signed [UW-1:0] sin;
      assign xin = (m == 0) ? row_in : xo[r][(m == 0) ? 0 : m-1];
      assign sin = (r == 0) ? '0 : so[(r == 0) ? 0 : r-1][m];
      always_ff @(posedge clk) begin
        xo[r][m] <= xin;
        if (COEF > 0)      so[r][m] <= sin + UW'(xin);
        else if (COEF < 0) so[r][m] <= sin - UW'(xin);
        else               so[r][m] <= sin;
      end
    end
  end

  for (genvar m = 0; m < RT_M; m++) begin : g_out
    assign u[m] = so[RT_N-1][m];
  end

endmodule
