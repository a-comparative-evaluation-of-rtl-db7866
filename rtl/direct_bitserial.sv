// direct_bitserial: bit-serial direct cyclic convolver (N x N mesh of
// serial-parallel multiply-add cells).
//
// The mesh of direct_parallel with every word sent as an NB-bit serial
// stream, LSB first, and an LSB flag travelling with the x bits. Cell (i, c)
// holds the parallel tap h(i): a bs_sp_mult forms h(i) * x serially and a
// bs_addsub_cell adds that product stream into the partial-sum stream coming
// down column c. The x bits and flag are latched and passed diagonally to
// the row below, one column to the left, with the leftmost column wrapping to
// the rightmost one (cyclic index). Since the multiplier delays the product
// by one cycle and the adder latches its sum, each row works one cycle after
// the row above on aligned streams, and all columns finish together.
// Column c produces y(N-1-c); a deserialiser per column collects the words.
// All arithmetic is modulo 2^NB, exact because |y| < 2^(NB-1) for
// NB = 2W + clog2(N) + 1 (the default).
//
// Interface: in_valid with x[N] is accepted when in_ready is high, at most
// one vector every NB cycles; h[N] held constant. out_valid pulses with y[N]
// LATENCY = NB + N + 3 cycles after the accepted input. Synchronous
// active-high reset of the serialiser, deserialisers and valid flag.
// The mesh and the N*N*n bit-level cells follow the document's direct
// structure evaluated on bit-serial cells; the framing, serialiser and
// deserialisers are this design's choices.
module direct_bitserial #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  parameter int unsigned NB = 2 * W + $clog2(N) + 1,   // serial word frame (bits)
  parameter int unsigned YW = 2 * W + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0]  x [N],
  input  logic signed [W-1:0]  h [N],
  output logic                out_valid,
  output logic signed [YW-1:0] y [N]
);

  // ---------------- input serialiser ----------------
  logic [NB-1:0]         sreg [N];
  logic [$clog2(NB)-1:0] bitcnt;
  logic                  active;
  logic                  ser_lsb;

  assign in_ready = !active || (int'(bitcnt) == int'(NB) - 1);
  assign ser_lsb  = active && (bitcnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      bitcnt <= '0;
      for (int j = 0; j < int'(N); j++) sreg[j] <= '0;
    end else if (in_valid && in_ready) begin
      active <= 1'b1;
      bitcnt <= '0;
      for (int j = 0; j < int'(N); j++) sreg[j] <= NB'(x[j]);
    end else if (active) begin
      for (int j = 0; j < int'(N); j++) sreg[j] <= sreg[j] >> 1;
      bitcnt <= bitcnt + 1'b1;
      if (int'(bitcnt) == int'(NB) - 1) active <= 1'b0;
    end
  end

  // ---------------- cell mesh ----------------
  logic xb [N][N];   // x bit leaving cell (i, c) diagonally
  logic xl [N][N];   // LSB flag leaving cell (i, c) diagonally
  logic yb [N][N];   // sum bit leaving cell (i, c) downwards
  logic yl [N][N];   // LSB flag aligned with yb

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic xin;
      logic lin;
      logic yin;
      logic pb;
      logic pl;
      logic unused_a;
      if (i == 0) begin : g_top
        assign xin = active & sreg[N-1-c][0];
        assign lin = ser_lsb;
        assign yin = 1'b0;
      end else begin : g_inner
        assign xin = xb[i-1][(c+1) % N];
        assign lin = xl[i-1][(c+1) % N];
        assign yin = yb[i-1][c];
      end
      always_ff @(posedge clk) begin
        xb[i][c] <= xin;
        xl[i][c] <= lin;
      end
      bs_sp_mult #(.NB(NB)) u_mul (
        .clk(clk), .lsb(lin), .a(xin), .d(NB'(h[i])), .p(pb), .lsb_out(pl)
      );
      bs_addsub_cell #(.COEF(1)) u_add (
        .clk(clk), .lsb_in(pl), .a_in(pb), .s_in(yin),
        .a_out(unused_a), .s_out(yb[i][c]), .lsb_out(yl[i][c])
      );
    end
  end

  // ---------------- deserialisers ----------------
  logic [NB-1:0]       dsh [N];
  logic [$clog2(NB):0] dcnt;
  logic                done;

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt      <= ($clog2(NB)+1)'(NB);
      done      <= 1'b0;
      out_valid <= 1'b0;
      for (int c = 0; c < int'(N); c++) begin
        dsh[c] <= '0;
        y[c]   <= '0;
      end
    end else begin
      logic [$clog2(NB):0] cur;
      cur = yl[N-1][0] ? '0 : dcnt;
      if (int'(cur) < int'(NB)) dcnt <= cur + 1'b1;
      done      <= (int'(cur) == int'(NB) - 1);
      out_valid <= done;
      for (int c = 0; c < int'(N); c++) begin
        dsh[c] <= {yb[N-1][c], dsh[c][NB-1:1]};
      end
      if (done) begin
        for (int c = 0; c < int'(N); c++) y[N-1-c] <= YW'($signed(dsh[c]));
      end
    end
  end

endmodule
