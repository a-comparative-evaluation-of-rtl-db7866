// direct_parallel: fully parallel direct cyclic convolver (N x N mesh).
//
// y(k) = sum_i h(i) * x((k - i) mod N). Cell (i, c) holds tap h(i) and adds
// h(i) * x to the partial sum that runs down column c; column c produces
// y(N-1-c). Row 0 receives x(N-1-c) in column c; each cell passes its x
// diagonally to the row below, one column to the left, with the leftmost
// column wrapping around to the rightmost one, which realises the cyclic
// index. Every cell latches its x and its sum output, so rows work one cycle
// apart on the same input vector and no input skew is needed.
//
// Interface: in_valid with x[N] accepted every cycle; h[N] held constant.
// out_valid with y[N] follows LATENCY = N cycles later; one convolution per
// clock. Two's complement: x and h are W bits, y is 2W + clog2(N) bits.
// The cell array, its tap placement and the diagonal cyclic routing follow
// the document's direct convolver figure; the register in every cell (word
// level, bit-parallel) and the reset of the valid pipeline are this design's
// choices.
module direct_parallel #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  parameter int unsigned YW = 2 * W + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0]  x [N],
  input  logic signed [W-1:0]  h [N],
  output logic                out_valid,
  output logic signed [YW-1:0] y [N]
);

  logic signed [W-1:0]  xo [N-1][N];   // x leaving rows 0 .. N-2
  logic signed [YW-1:0] yo [N][N];
  logic [N-1:0]         vld;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic signed [W-1:0]  xin;
      logic signed [YW-1:0] yin;
      if (i == 0) begin : g_top
        assign xin = x[N-1-c];
        assign yin = '0;
      end else begin : g_inner
        assign xin = xo[i-1][(c+1) % N];
        assign yin = yo[i-1][c];
      end
      always_ff @(posedge clk) yo[i][c] <= yin + YW'(h[i]) * YW'(xin);
      if (i < N - 1) begin : g_xpass
        always_ff @(posedge clk) xo[i][c] <= xin;
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign y[k] = yo[N-1][N-1-k];
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[N-2:0], in_valid};
  end
  assign out_valid = vld[N-1];

endmodule
