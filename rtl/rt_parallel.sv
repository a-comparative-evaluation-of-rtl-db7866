// rt_parallel: fully parallel order-4 cyclic convolver using the 4*5
// rectangular transform (RT).
//
// y = (1/4) B diag(d4) A x. A pre-addition mesh (rt_pre_array) forms the
// RT_M = 5 transform values, a row of 5 multipliers forms the spectral
// products with the coefficients d4 (from rt_coef), and a post-addition mesh
// (rt_post_array) forms the 4 outputs. The outputs leave that mesh skewed;
// row k is delayed by RT_N-1-k extra registers so all four outputs appear
// together, then divided by 4 (arithmetic shift right by 2, exact because the
// true result is an integer) in a final output register.
//
// Interface: in_valid with x[4] accepted every cycle; d4[5] held constant.
// out_valid with y[4] follows LATENCY = 2*RT_N + RT_M + 1 = 14 cycles later.
// Throughput one convolution per cycle. Two's complement words: x and taps
// W bits, y 2W+2 bits (never overflows). No reset on the datapath; the valid
// pipeline is reset synchronously (active high).
// The three-phase mesh structure follows the document; word widths, the
// placement of the 1/4 scaling at the output and the reset are this design's
// choices.
module rt_parallel
  import rt_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = W + 4,          // width of the d4 coefficients
  parameter int unsigned YW = 2 * W + 2       // output width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0]  x  [RT_N],
  input  logic signed [DW-1:0] d4 [RT_M],
  output logic                out_valid,
  output logic signed [YW-1:0] y  [RT_N]
);

  localparam int unsigned UW      = W + 2;
  localparam int unsigned PW      = UW + DW;
  localparam int unsigned SW      = PW + 2;
  localparam int unsigned LATENCY = 2 * RT_N + RT_M + 1;

  logic signed [UW-1:0] u [RT_M];
  logic signed [PW-1:0] p [RT_M];
  logic signed [SW-1:0] s [RT_N];
  logic [LATENCY-1:0]   vld;

  rt_pre_array #(.W(W), .UW(UW)) u_pre (.clk(clk), .x(x), .u(u));

  // row of spectral multipliers, one register each
  for (genvar m = 0; m < RT_M; m++) begin : g_mul
    always_ff @(posedge clk) p[m] <= PW'(u[m]) * PW'(d4[m]);
  end

  rt_post_array #(.PW(PW), .SW(SW)) u_post (.clk(clk), .p(p), .s(s));

  // deskew: row k waits RT_N-1-k cycles, then scale and register
  for (genvar k = 0; k < RT_N; k++) begin : g_deskew
    localparam int unsigned D = RT_N - 1 - k;
    logic signed [SW-1:0] dl;
    if (D == 0) begin : g_none
      assign dl = s[k];
    end else begin : g_dly
      logic signed [SW-1:0] q [D];
      always_ff @(posedge clk) begin
        q[0] <= s[k];
        for (int i = 1; i < int'(D); i++) q[i] <= q[i-1];
      end
      assign dl = q[D-1];
    end
    always_ff @(posedge clk) y[k] <= YW'(dl >>> RT_SCALE_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
