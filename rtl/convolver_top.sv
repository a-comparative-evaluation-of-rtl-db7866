// convolver_top: the direct and transform convolver architectures side by side.
//
// Nine independent convolvers share only the clock and reset:
//   ntt_*  length-5 cyclic convolution over GF(31) with the Mersenne
//          number-theoretic transform of radix 2 (ntt_coef + ntt_convolver),
//          one per clock;
//   ntt2_* length-10 cyclic convolution over GF(31) with the Mersenne
//          transform of radix -2 and length 2p, one per clock;
//   rtp_*  order-4 cyclic convolution with the 4*5 rectangular transform,
//          fully parallel mesh (rt_coef + rt_parallel), one per clock;
//   dp_*   order-4 cyclic convolution, direct N x N mesh (direct_parallel);
//   rts_*  order-4 RT convolution on bit-serial cells, one result per
//          2W+4 clocks (rt_bitserial, sharing the rt_coef coefficients);
//   ds_*   order-4 direct cyclic convolution on bit-serial cells, one result
//          per 2W+3 clocks (direct_bitserial);
//   rtm_*  order-4 RT convolution with one multiplier, 5 cycles per result
//          (rt_multiplexed, sharing the rt_coef coefficients);
//   dm_*   order-4 direct convolution with 4 cells, one output per cycle
//          (direct_multiplexed);
//   os_*   linear convolution of a stream with a 3-tap kernel, 4 samples per
//          clock, by overlap-save sections (overlap_save).
// The three RT convolvers take the time-domain kernel rt_h and derives its spectral
// coefficients; the NTT convolvers take ntt_h / ntt2_h and derive
// g = L^-1 T h (L = 5 or 10).
// Port timing is that of each sub-module. Reset is synchronous, active high.
module convolver_top
  import rt_pkg::*;
#(
  parameter int unsigned NTT_P = 5,   // Mersenne exponent, modulus 2^5 - 1 = 31
  parameter int unsigned W     = 8,   // data and tap width of the integer convolvers
  parameter int unsigned DN    = 4,   // order of the direct cyclic convolvers
  parameter int unsigned OS_NT = 3,   // overlap-save kernel taps
  parameter int unsigned OS_PB = 4    // overlap-save block length
) (
  input  logic clk,
  input  logic rst,

  // Mersenne NTT convolver
  input  logic                 ntt_in_valid,
  input  logic [NTT_P-1:0]     ntt_x [NTT_P],
  input  logic [NTT_P-1:0]     ntt_h [NTT_P],
  output logic                 ntt_out_valid,
  output logic [NTT_P-1:0]     ntt_y [NTT_P],

  // Mersenne NTT convolver, radix -2, length 2*NTT_P
  input  logic                 ntt2_in_valid,
  input  logic [NTT_P-1:0]     ntt2_x [2*NTT_P],
  input  logic [NTT_P-1:0]     ntt2_h [2*NTT_P],
  output logic                 ntt2_out_valid,
  output logic [NTT_P-1:0]     ntt2_y [2*NTT_P],

  // rectangular transform kernel (shared by both RT convolvers)
  input  logic signed [W-1:0]  rt_h [RT_N],

  // RT parallel convolver
  input  logic                 rtp_in_valid,
  input  logic signed [W-1:0]  rtp_x [RT_N],
  output logic                 rtp_out_valid,
  output logic signed [2*W+1:0] rtp_y [RT_N],

  // RT bit-serial convolver
  input  logic                 rts_in_valid,
  output logic                 rts_in_ready,
  input  logic signed [W-1:0]  rts_x [RT_N],
  output logic                 rts_out_valid,
  output logic signed [2*W+1:0] rts_y [RT_N],

  // direct parallel convolver
  input  logic                 dp_in_valid,
  input  logic signed [W-1:0]  dp_x [DN],
  input  logic signed [W-1:0]  dp_h [DN],
  output logic                 dp_out_valid,
  output logic signed [2*W+$clog2(DN)-1:0] dp_y [DN],

  // direct bit-serial convolver
  input  logic                 ds_in_valid,
  output logic                 ds_in_ready,
  input  logic signed [W-1:0]  ds_x [DN],
  input  logic signed [W-1:0]  ds_h [DN],
  output logic                 ds_out_valid,
  output logic signed [2*W+$clog2(DN)-1:0] ds_y [DN],

  // RT multiplexed convolver
  input  logic                 rtm_start,
  input  logic signed [W-1:0]  rtm_x [RT_N],
  output logic                 rtm_busy,
  output logic                 rtm_done,
  output logic signed [2*W+1:0] rtm_y [RT_N],

  // direct multiplexed convolver
  input  logic                 dm_start,
  input  logic signed [W-1:0]  dm_x [DN],
  input  logic signed [W-1:0]  dm_h [DN],
  output logic                 dm_busy,
  output logic                 dm_y_valid,
  output logic [$clog2(DN)-1:0] dm_y_idx,
  output logic signed [2*W+$clog2(DN)-1:0] dm_y,

  // overlap-save linear convolver
  input  logic                 os_in_valid,
  input  logic signed [W-1:0]  os_x [OS_PB],
  input  logic signed [W-1:0]  os_h [OS_NT],
  output logic                 os_out_valid,
  output logic signed [2*W+$clog2(OS_NT)-1:0] os_y [OS_PB]
);

  logic [NTT_P-1:0]      ntt_g [NTT_P];
  logic [NTT_P-1:0]      ntt2_g [2*NTT_P];
  logic signed [W+3:0]   rt_d4 [RT_M];

  ntt_coef #(.P(NTT_P)) u_ntt_coef (.h(ntt_h), .g(ntt_g));

  ntt_convolver #(.P(NTT_P)) u_ntt (
    .clk(clk), .rst(rst), .in_valid(ntt_in_valid), .x(ntt_x), .g(ntt_g),
    .out_valid(ntt_out_valid), .y(ntt_y)
  );

  ntt_coef #(.P(NTT_P), .NEG(1'b1)) u_ntt2_coef (.h(ntt2_h), .g(ntt2_g));

  ntt_convolver #(.P(NTT_P), .NEG(1'b1)) u_ntt2 (
    .clk(clk), .rst(rst), .in_valid(ntt2_in_valid), .x(ntt2_x), .g(ntt2_g),
    .out_valid(ntt2_out_valid), .y(ntt2_y)
  );

  rt_coef #(.W(W), .DW(W + 4)) u_rt_coef (.h(rt_h), .d4(rt_d4));

  rt_parallel #(.W(W), .DW(W + 4), .YW(2 * W + 2)) u_rtp (
    .clk(clk), .rst(rst), .in_valid(rtp_in_valid), .x(rtp_x), .d4(rt_d4),
    .out_valid(rtp_out_valid), .y(rtp_y)
  );

  rt_bitserial #(.W(W), .DW(W + 4), .NB(2 * W + 4), .YW(2 * W + 2)) u_rts (
    .clk(clk), .rst(rst), .in_valid(rts_in_valid), .in_ready(rts_in_ready), .x(rts_x),
    .d4(rt_d4), .out_valid(rts_out_valid), .y(rts_y)
  );

  direct_parallel #(.N(DN), .W(W)) u_dp (
    .clk(clk), .rst(rst), .in_valid(dp_in_valid), .x(dp_x), .h(dp_h),
    .out_valid(dp_out_valid), .y(dp_y)
  );

  direct_bitserial #(.N(DN), .W(W)) u_ds (
    .clk(clk), .rst(rst), .in_valid(ds_in_valid), .in_ready(ds_in_ready), .x(ds_x), .h(ds_h),
    .out_valid(ds_out_valid), .y(ds_y)
  );

  rt_multiplexed #(.W(W), .DW(W + 4), .YW(2 * W + 2)) u_rtm (
    .clk(clk), .rst(rst), .start(rtm_start), .x(rtm_x), .d4(rt_d4),
    .busy(rtm_busy), .done(rtm_done), .y(rtm_y)
  );

  direct_multiplexed #(.N(DN), .W(W)) u_dm (
    .clk(clk), .rst(rst), .start(dm_start), .x(dm_x), .h(dm_h),
    .busy(dm_busy), .y_valid(dm_y_valid), .y_idx(dm_y_idx), .y_out(dm_y)
  );

  overlap_save #(.NT(OS_NT), .PB(OS_PB), .W(W)) u_os (
    .clk(clk), .rst(rst), .in_valid(os_in_valid), .x(os_x), .h(os_h),
    .out_valid(os_out_valid), .y(os_y)
  );

endmodule
