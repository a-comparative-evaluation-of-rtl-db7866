// rt_multiplexed: order-4 RT cyclic convolver with a single multiplier.
//
// One iteration per spectral index m = 0 .. RT_M-1: a chain of RT_N
// add/subtract/pass cells forms u = sum_j a(m,j) x(j) (coefficients -1, 0, +1
// of row m of A), the one multiplier forms p = d4(m) * u, and RT_N
// accumulator cells update acc(k) += b(k,m) * p with column m of B. After
// RT_M iterations the accumulators hold 4*y; the outputs are divided by 4.
//
// Interface: a start pulse (ignored while busy) latches x[4] and clears the
// accumulators; busy is high for exactly RT_M = 5 cycles, one iteration each;
// done pulses in the following cycle with y[4] valid, and y holds until the
// next result. d4[5] (from rt_coef) must be stable while busy. Synchronous
// active-high reset. The cell chain, the single multiplier and the
// accumulator cells y(t) = y(t-1) + b.x follow the document's multiplexed RT
// figure; iterating one spectral index per clock with an unpipelined
// combinational chain, and the handshake, are this design's choices.
module rt_multiplexed
  import rt_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = W + 4,
  parameter int unsigned YW = 2 * W + 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0]  x  [RT_N],
  input  logic signed [DW-1:0] d4 [RT_M],
  output logic                busy,
  output logic                done,
  output logic signed [YW-1:0] y  [RT_N]
);

  localparam int unsigned UW = W + 2;
  localparam int unsigned PW = UW + DW;
  localparam int unsigned SW = PW + 2;

  logic signed [W-1:0]  xr  [RT_N];
  logic signed [SW-1:0] acc [RT_N];
  logic [$clog2(RT_M)-1:0] it;
  logic signed [UW-1:0] u;
  logic signed [PW-1:0] p;

  // pre-addition chain and the single spectral multiplier
  always_comb begin
    u = '0;
    for (int j = 0; j < RT_N; j++) begin
      if (rt_a(int'(it), j) > 0)      u = u + UW'(xr[j]);
      else if (rt_a(int'(it), j) < 0) u = u - UW'(xr[j]);
    end
    p = PW'(u) * PW'(d4[it]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      it   <= '0;
      for (int k = 0; k < RT_N; k++) begin
        acc[k] <= '0;
        y[k]   <= '0;
        xr[k]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          for (int k = 0; k < RT_N; k++) begin
            xr[k]  <= x[k];
            acc[k] <= '0;
          end
        end
      end else begin
        // post-addition accumulator cells
        for (int k = 0; k < RT_N; k++) begin
          logic signed [SW-1:0] nxt;
          nxt = acc[k];
          if (rt_b(k, int'(it)) > 0)      nxt = nxt + SW'(p);
          else if (rt_b(k, int'(it)) < 0) nxt = nxt - SW'(p);
          acc[k] <= nxt;
          if (int'(it) == RT_M - 1) y[k] <= YW'(nxt >>> RT_SCALE_SHIFT);
        end
        if (int'(it) == RT_M - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          it <= it + 1'b1;
        end
      end
    end
  end

endmodule
