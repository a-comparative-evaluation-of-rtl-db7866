// overlap_save: block-parallel linear convolver (overlap-save sections).
//
// Computes the linear convolution y(n) = sum_i h(i) x(n-i) of a continuous
// stream with an NT-tap kernel, PB samples per clock. Each block of PB new
// samples is completed by the last NT-1 samples of the previous block (the
// overlap), and only the PB valid outputs of the order NT+PB-1 cyclic
// convolution are formed, by an NT x PB direct cell array. Cell (r, c) holds
// h(r); column c accumulates y(PB-1-c) of the block down the rows. x words
// move diagonally (down one row, one column left), the rightmost column of
// row r receiving the overlap sample x(-r) from the history registers.
// Registers sit between rows, on the sums and on the x paths; the last row
// is combinational.
//
// Interface: in_valid with x[PB] (x[0] oldest, x[PB-1] newest) accepted every
// cycle; h[NT] held constant. out_valid with y[PB] (y[k] is output k of the
// block) follows LATENCY = NT-1 cycles later. The history starts at zero
// after reset and advances only on in_valid. Requires PB >= NT-1.
// The array, the overlap registers and the row registers follow the
// document's overlap-save figure (NT = 3 taps, PB = 4 samples per block);
// the word-level cells and the reset are this design's choices.
module overlap_save #(
  parameter int unsigned NT = 3,    // kernel taps
  parameter int unsigned PB = 4,    // block length (outputs per clock)
  parameter int unsigned W  = 8,
  parameter int unsigned YW = 2 * W + $clog2(NT)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0]  x [PB],
  input  logic signed [W-1:0]  h [NT],
  output logic                out_valid,
  output logic signed [YW-1:0] y [PB]
);

  localparam int unsigned LATENCY = NT - 1;

  logic signed [W-1:0]  hist [1:NT-1];          // x(-1) .. x(-(NT-1))
  logic signed [W-1:0]  hd   [1:NT-1][NT-1];    // overlap samples delayed per row
  logic signed [W-1:0]  xo   [NT-1][1:PB-1];    // x leaving rows 0 .. NT-2
  logic signed [YW-1:0] yo   [NT-1][PB];        // sums leaving rows 0 .. NT-2
  logic signed [YW-1:0] ylast [PB];
  logic [LATENCY-1:0]   vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NT; i++) hist[i] <= '0;
    end else if (in_valid) begin
      for (int i = 1; i < NT; i++) hist[i] <= x[PB-i];
    end
  end

  // overlap sample x(-r) reaches row r after r register stages
  for (genvar r = 1; r < NT; r++) begin : g_hist
    always_ff @(posedge clk) begin
      hd[r][0] <= hist[r];
      for (int i = 1; i < r; i++) hd[r][i] <= hd[r][i-1];
    end
  end

  for (genvar r = 0; r < NT; r++) begin : g_row
    for (genvar c = 0; c < PB; c++) begin : g_col
      logic signed [W-1:0]  xin;
      logic signed [YW-1:0] yin;
      logic signed [YW-1:0] ysum;
      if (r == 0) begin : g_top
        assign xin = x[PB-1-c];
        assign yin = '0;
      end else begin : g_inner
        if (c < PB - 1) begin : g_diag
          assign xin = xo[r-1][c+1];
        end else begin : g_ovl
          assign xin = hd[r][r-1];
        end
        assign yin = yo[r-1][c];
      end
      assign ysum = yin + YW'(h[r]) * YW'(xin);
      if (r < NT - 1) begin : g_reg
        always_ff @(posedge clk) yo[r][c] <= ysum;
        if (c > 0) begin : g_xpass   // column 0 passes x to no one
          always_ff @(posedge clk) xo[r][c] <= xin;
        end
      end else begin : g_last
        assign ylast[c] = ysum;
      end
    end
  end

  for (genvar k = 0; k < PB; k++) begin : g_out
    assign y[k] = ylast[PB-1-k];
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= shift_in(vld, in_valid);
  end

  function automatic logic [LATENCY-1:0] shift_in(logic [LATENCY-1:0] v, logic b);
    return (v << 1) | LATENCY'(b);
  endfunction

  assign out_valid = vld[LATENCY-1];

endmodule
