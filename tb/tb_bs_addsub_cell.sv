// tb_bs_addsub_cell: checks the bit-serial add, subtract and delay cells.
//
// Pairs of random 16-bit words are fed LSB first, back to back, into three
// cells (COEF = +1, -1, 0). One cycle later the sum-bit streams must form
// s + a, s - a and s modulo 2^16, and a_out and lsb_out must be the inputs
// delayed by one cycle.
module tb_bs_addsub_cell;
  localparam int NB = 16;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic lsb = 0, a = 0, s = 0;
  logic ap, sp, lp, am, sm, lm, a0, s0, l0;

  bs_addsub_cell #(.COEF(1))  u_add (.clk(clk), .lsb_in(lsb), .a_in(a), .s_in(s), .a_out(ap), .s_out(sp), .lsb_out(lp));
  bs_addsub_cell #(.COEF(-1)) u_sub (.clk(clk), .lsb_in(lsb), .a_in(a), .s_in(s), .a_out(am), .s_out(sm), .lsb_out(lm));
  bs_addsub_cell #(.COEF(0))  u_dly (.clk(clk), .lsb_in(lsb), .a_in(a), .s_in(s), .a_out(a0), .s_out(s0), .lsb_out(l0));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int WORDS = 2000;
    logic [NB-1:0] av [WORDS];
    logic [NB-1:0] sv [WORDS];
    logic [NB-1:0] gp, gm, g0;
    logic pa, pl;
    for (int w = 0; w < WORDS; w++) begin
      av[w] = (w % 9 == 0) ? 16'hffff : 16'($urandom);
      sv[w] = (w % 11 == 0) ? 16'h8000 : 16'($urandom);
    end
    pa = 0;
    pl = 0;
    for (int c = 0; c <= NB * WORDS; c++) begin
      @(negedge clk);
      if (c > 0) begin
        int i;
        i = (c - 1) % NB;
        gp[i] = sp;
        gm[i] = sm;
        g0[i] = s0;
        checks++;
        if (ap !== pa || am !== pa || a0 !== pa || lp !== pl || lm !== pl || l0 !== pl) begin
          failures++;
          $display("pass-through mismatch at cycle %0d", c);
        end
        if (i == NB - 1) begin
          int w;
          w = (c - 1) / NB;
          checks += 3;
          if (gp != sv[w] + av[w]) begin
            failures++;
            $display("add %h + %h got %h", sv[w], av[w], gp);
          end
          if (gm != sv[w] - av[w]) begin
            failures++;
            $display("sub %h - %h got %h", sv[w], av[w], gm);
          end
          if (g0 != sv[w]) failures++;
        end
      end
      if (c < NB * WORDS) begin
        lsb = (c % NB == 0);
        a   = av[c / NB][c % NB];
        s   = sv[c / NB][c % NB];
      end else begin
        lsb = 0;
        a   = 0;
        s   = 0;
      end
      pa = a;
      pl = lsb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
