// rt_bitserial: bit-serial order-4 RT cyclic convolver (4*5 rectangular
// transform mapped on bit-serial cells).
//
// Same mesh as rt_parallel, but every word travels as an NB-bit serial
// stream, LSB first, with a flag marking the LSB that travels alongside:
//  - input serialiser: the four x words are sign-extended to NB bits and
//    shifted out; row r of the pre-addition plane gets r extra flag/bit
//    registers (input skew);
//  - pre-addition plane: 4 x 5 bs_addsub_cell (add, subtract or dummy delay
//    cell following A), x bits moving right, sum bits moving down;
//  - 5 bs_sp_mult serial-parallel multipliers with the parallel coefficients
//    d4 (sign-extended to NB bits);
//  - post-addition plane: 4 x 5 bs_addsub_cell following B, product bits
//    moving down, sum bits moving right;
//  - per output row a deserialiser; the four words are collected (row k
//    finishes k cycles after row 0), divided by 4 and presented together.
// All arithmetic is modulo 2^NB, which is exact as long as 4*y fits in NB
// bits: NB = 2W + 4 covers every W-bit input and tap.
//
// Interface: in_valid with x[4] is accepted when in_ready is high, i.e. at
// most one vector every NB cycles (the bit-serial period); d4[5] held
// constant. out_valid pulses with y[4] LATENCY = NB + 15 cycles after the
// accepted input. Synchronous active-high reset of the serialiser,
// deserialisers and valid flags.
// The cell types (serial adders with in-place carry, dummy delay cells for
// zero coefficients, serial-parallel multipliers), the latched cell inputs
// and the mesh follow the document; the LSB flag, the serialiser and
// deserialiser and the word frame NB are this design's choices.
module rt_bitserial
  import rt_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = W + 4,
  parameter int unsigned NB = 2 * W + 4,   // serial word frame (bits)
  parameter int unsigned YW = 2 * W + 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0]  x  [RT_N],
  input  logic signed [DW-1:0] d4 [RT_M],
  output logic                out_valid,
  output logic signed [YW-1:0] y  [RT_N]
);

  // ---------------- input serialiser ----------------
  logic [NB-1:0]         sreg [RT_N];
  logic [$clog2(NB)-1:0] bitcnt;
  logic                  active;
  logic                  ser_lsb;

  assign in_ready = !active || (int'(bitcnt) == int'(NB) - 1);
  assign ser_lsb  = active && (bitcnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      bitcnt <= '0;
      for (int j = 0; j < RT_N; j++) sreg[j] <= '0;
    end else if (in_valid && in_ready) begin
      active <= 1'b1;
      bitcnt <= '0;
      for (int j = 0; j < RT_N; j++) sreg[j] <= NB'(x[j]);
    end else if (active) begin
      for (int j = 0; j < RT_N; j++) sreg[j] <= sreg[j] >> 1;
      bitcnt <= bitcnt + 1'b1;
      if (int'(bitcnt) == int'(NB) - 1) active <= 1'b0;
    end
  end

  // ---------------- pre-addition plane ----------------
  logic pa_x [RT_N][RT_M];   // x bit leaving cell (r, m) to the right
  logic pa_l [RT_N][RT_M];   // LSB flag leaving cell (r, m) to the right
  logic pa_s [RT_N][RT_M];   // sum bit leaving cell (r, m) downwards

  for (genvar r = 0; r < RT_N; r++) begin : g_pre_row
    logic row_x;
    logic row_l;
    if (r == 0) begin : g_noskew
      assign row_x = active & sreg[RT_N-1][0];
      assign row_l = ser_lsb;
    end else begin : g_skew
      logic [r-1:0] kx;
      logic [r-1:0] kl;
      always_ff @(posedge clk) begin
        if (rst) begin
          kx <= '0;
          kl <= '0;
        end else begin
          kx[0] <= active & sreg[RT_N-1-r][0];
          kl[0] <= ser_lsb;
          for (int i = 1; i < r; i++) begin
            kx[i] <= kx[i-1];
            kl[i] <= kl[i-1];
          end
        end
      end
      assign row_x = kx[r-1];
      assign row_l = kl[r-1];
    end

    for (genvar m = 0; m < RT_M; m++) begin : g_pre_col
      logic xin;
      logic lin;
      logic sin;
      if (m == 0) begin : g_first
        assign xin = row_x;
        assign lin = row_l;
      end else begin : g_next
        assign xin = pa_x[r][m-1];
        assign lin = pa_l[r][m-1];
      end
      if (r == 0) begin : g_top
        assign sin = 1'b0;
      end else begin : g_below
        assign sin = pa_s[r-1][m];
      end
      bs_addsub_cell #(.COEF(rt_a(m, RT_N-1-r))) u_cell (
        .clk(clk), .lsb_in(lin), .a_in(xin), .s_in(sin),
        .a_out(pa_x[r][m]), .s_out(pa_s[r][m]), .lsb_out(pa_l[r][m])
      );
    end
  end

  // ---------------- serial-parallel spectral multipliers ----------------
  logic mp [RT_M];
  logic ml [RT_M];

  for (genvar m = 0; m < RT_M; m++) begin : g_mul
    bs_sp_mult #(.NB(NB)) u_mul (
      .clk(clk), .lsb(pa_l[RT_N-1][m]), .a(pa_s[RT_N-1][m]), .d(NB'(d4[m])),
      .p(mp[m]), .lsb_out(ml[m])
    );
  end

  // ---------------- post-addition plane ----------------
  logic po_p [RT_N][RT_M];   // product bit leaving cell (k, m) downwards
  logic po_l [RT_N][RT_M];   // LSB flag leaving cell (k, m) downwards
  logic po_s [RT_N][RT_M];   // sum bit leaving cell (k, m) to the right

  for (genvar k = 0; k < RT_N; k++) begin : g_post_row
    for (genvar m = 0; m < RT_M; m++) begin : g_post_col
      logic pin;
      logic lin;
      logic sin;
      if (k == 0) begin : g_top
        assign pin = mp[m];
        assign lin = ml[m];
      end else begin : g_below
        assign pin = po_p[k-1][m];
        assign lin = po_l[k-1][m];
      end
      if (m == 0) begin : g_first
        assign sin = 1'b0;
      end else begin : g_next
        assign sin = po_s[k][m-1];
      end
      bs_addsub_cell #(.COEF(rt_b(k, m))) u_cell (
        .clk(clk), .lsb_in(lin), .a_in(pin), .s_in(sin),
        .a_out(po_p[k][m]), .s_out(po_s[k][m]), .lsb_out(po_l[k][m])
      );
    end
  end

  // ---------------- deserialisers and output alignment ----------------
  logic [NB-1:0]       dsh   [RT_N];
  logic [NB-1:0]       hold  [RT_N];
  logic [$clog2(NB):0] dcnt  [RT_N];
  logic [RT_N-1:0]     dlsb;
  logic                last_done;

  // the LSB flag that accompanies output row k is the one that entered the
  // last cell of the row with its sum input; it leaves that cell together
  // with the sum bit
  for (genvar k = 0; k < RT_N; k++) begin : g_flag
    assign dlsb[k] = po_l[k][RT_M-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_done <= 1'b0;
      out_valid <= 1'b0;
      for (int k = 0; k < RT_N; k++) begin
        dcnt[k] <= ($clog2(NB)+1)'(NB);
        dsh[k]  <= '0;
        hold[k] <= '0;
        y[k]    <= '0;
      end
    end else begin
      last_done <= 1'b0;
      out_valid <= last_done;
      for (int k = 0; k < RT_N; k++) begin
        logic [$clog2(NB):0] cur;
        logic [NB-1:0]       word;
        cur  = dlsb[k] ? '0 : dcnt[k];
        word = {po_s[k][RT_M-1], dsh[k][NB-1:1]};
        dsh[k] <= word;
        if (int'(cur) < int'(NB)) dcnt[k] <= cur + 1'b1;
        if (int'(cur) == int'(NB) - 1) begin
          hold[k] <= word;
          if (k == RT_N - 1) last_done <= 1'b1;
        end
      end
      if (last_done) begin
        for (int k = 0; k < RT_N; k++) y[k] <= YW'($signed(hold[k]) >>> RT_SCALE_SHIFT);
      end
    end
  end

endmodule
