// tb_bs_sp_mult: checks the serial-parallel multiplier.
//
// Random NB-bit words a (extremes included) are fed LSB first, back to back
// and with random idle gaps, against random parallel coefficients d. The
// bits on p, one cycle behind the operand bits, must form a*d mod 2^NB for
// NB = 20 and NB = 7.
module tb_bs_sp_mult;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic lsb20 = 0, a20 = 0, p20, l20;
  logic [19:0] d20;
  logic lsb7 = 0, a7 = 0, p7, l7;
  logic [6:0] d7;

  bs_sp_mult #(.NB(20)) u20 (.clk(clk), .lsb(lsb20), .a(a20), .d(d20), .p(p20), .lsb_out(l20));
  bs_sp_mult #(.NB(7))  u7  (.clk(clk), .lsb(lsb7),  .a(a7),  .d(d7),  .p(p7),  .lsb_out(l7));

  task automatic run20(int words);
    for (int w = 0; w < words; w++) begin
      logic [19:0] av;
      logic [19:0] got;
      logic [39:0] prod;
      av  = (w % 7 == 0) ? 20'h80000 : (w % 7 == 1) ? 20'hfffff : 20'($urandom);
      d20 = (w % 5 == 0) ? 20'h80000 : 20'($urandom);
      prod = 40'(av) * 40'(d20);
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        if (i > 0) got[i-1] = p20;
        lsb20 = (i == 0);
        a20   = av[i];
      end
      @(negedge clk);
      got[19] = p20;
      // the first output bit of the next word overlaps this cycle: feed a gap
      lsb20 = 0;
      a20   = 0;
      checks++;
      if (got != prod[19:0]) begin
        failures++;
        $display("NB20 a=%h d=%h got %h exp %h", av, d20, got, prod[19:0]);
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  task automatic run7(int words);
    // back-to-back words: bit i of word w enters in cycle 7w + i
    logic [6:0] av [];
    logic [6:0] dv [];
    logic [6:0] got;
    av = new[words];
    dv = new[words];
    for (int w = 0; w < words; w++) begin
      av[w] = 7'($urandom);
      dv[w] = 7'($urandom);
    end
    d7 = dv[0];
    for (int c = 0; c <= 7 * words; c++) begin
      @(negedge clk);
      if (c > 0) begin
        got[(c - 1) % 7] = p7;
        if ((c - 1) % 7 == 6) begin
          int w;
          logic [13:0] prod;
          w = (c - 1) / 7;
          prod = 14'(av[w]) * 14'(dv[w]);
          checks++;
          if (got != prod[6:0]) begin
            failures++;
            $display("NB7 a=%h d=%h got %h exp %h", av[w], dv[w], got, prod[6:0]);
          end
        end
      end
      if (c < 7 * words) begin
        lsb7 = (c % 7 == 0);
        a7   = av[c / 7][c % 7];
        if (c % 7 == 0) d7 = dv[c / 7];
      end else begin
        lsb7 = 0;
        a7   = 0;
      end
    end
  endtask

  initial begin
    d20 = '0;
    d7 = '0;
    run20(1500);
    run7(1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
