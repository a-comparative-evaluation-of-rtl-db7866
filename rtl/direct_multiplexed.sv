// direct_multiplexed: direct cyclic convolver with N multiply-add cells that
// produces one output per iteration.
//
// Cell k holds input x(k); the taps circulate in a ring of N coefficient
// registers. In iteration t cell k holds h((t - k) mod N), and the chain of
// cells forms y(t) = sum_k h((t-k) mod N) x(k), passing the partial sum from
// cell to cell. The ring is loaded as h(0), h(N-1), ..., h(1) and rotates by
// one position per iteration, the last register feeding the first.
//
// Interface: a start pulse (ignored while busy) latches x[N] and loads the
// ring from h[N]. The N following cycles are the N iterations; each one
// registers y(t) on y_out with y_valid high and y_idx = t, so y(0) .. y(N-1)
// appear on N consecutive cycles starting one cycle after start. busy is
// high during the iterations. Two's complement: W-bit x and h, 2W + clog2(N)
// bit output. Synchronous active-high reset.
// The cell chain and circulating coefficient ring follow the document's
// figure; the unpipelined chain (one iteration per clock, no input time
// skew) and the handshake are this design's choices.
module direct_multiplexed #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  parameter int unsigned YW = 2 * W + $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic signed [W-1:0]     x [N],
  input  logic signed [W-1:0]     h [N],
  output logic                   busy,
  output logic                   y_valid,
  output logic [$clog2(N)-1:0]   y_idx,
  output logic signed [YW-1:0]    y_out
);

  logic signed [W-1:0]  xr   [N];
  logic signed [W-1:0]  ring [N];
  logic [$clog2(N)-1:0] t;
  logic signed [YW-1:0] chain;

  // chain of multiply-add cells: yout = yin + h.x
  always_comb begin
    chain = '0;
    for (int k = 0; k < N; k++) chain = chain + YW'(ring[k]) * YW'(xr[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      y_valid <= 1'b0;
      y_idx   <= '0;
      y_out   <= '0;
      t       <= '0;
      for (int k = 0; k < N; k++) begin
        xr[k]   <= '0;
        ring[k] <= '0;
      end
    end else begin
      y_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= '0;
          for (int k = 0; k < N; k++) begin
            xr[k]   <= x[k];
            ring[k] <= h[(N - k) % N];
          end
        end
      end else begin
        y_out   <= chain;
        y_idx   <= t;
        y_valid <= 1'b1;
        ring[0] <= ring[N-1];
        for (int k = 1; k < N; k++) ring[k] <= ring[k-1];
        if (int'(t) == N - 1) busy <= 1'b0;
        else                  t <= t + 1'b1;
      end
    end
  end

endmodule
