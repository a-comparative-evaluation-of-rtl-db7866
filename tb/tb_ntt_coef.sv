// tb_ntt_coef: checks the NTT spectral coefficients g = 25 * T h mod 31.
//
// Random kernels (and the all-zero and all-ones kernels) are applied; each
// g(k) must equal 25 * sum_j 2^(jk mod 5) h(j) mod 31, computed here with
// integer arithmetic, and must be normalised (never 31). A second instance
// with the radix -2, length-10 transform is checked against
// g(k) = 28 * sum_j (-2)^(jk mod 10) h(j) mod 31 (28 = 10^-1 mod 31).
module tb_ntt_coef;
  int checks = 0;
  int failures = 0;

  logic [4:0] h [5];
  logic [4:0] g [5];

  logic [4:0] hn [10];
  logic [4:0] gn [10];

  ntt_coef #(.P(5)) dut (.h(h), .g(g));
  ntt_coef #(.P(5), .NEG(1'b1)) dut_n (.h(hn), .g(gn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < 5; j++) h[j] = (t == 0) ? 5'h1f : (t == 1) ? 5'h0 : 5'($urandom);
      for (int j = 0; j < 10; j++) hn[j] = (t == 0) ? 5'h1f : (t == 1) ? 5'h0 : 5'($urandom);
      #1;
      for (int k = 0; k < 5; k++) begin
        int acc; acc = 0;
        for (int j = 0; j < 5; j++) acc = (acc + (int'(h[j]) % 31) * (1 << ((j * k) % 5))) % 31;
        acc = (acc * 25) % 31;
        checks++;
        if (int'(g[k]) != acc) begin
          failures++;
          $display("k=%0d g=%0d exp=%0d", k, g[k], acc);
        end
      end
      for (int k = 0; k < 10; k++) begin
        int acc;
        acc = 0;
        for (int j = 0; j < 10; j++) begin
          int e;
          int w;
          e = (j * k) % 10;
          w = (1 << (e % 5)) % 31;
          if (e % 2 == 1) w = 31 - w;
          acc = (acc + (int'(hn[j]) % 31) * w) % 31;
        end
        acc = (acc * 28) % 31;
        checks++;
        if (int'(gn[k]) != acc) begin
          failures++;
          $display("radix -2 k=%0d g=%0d exp=%0d", k, gn[k], acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
