// tb_mersenne_mult: exhaustive check of the modulo-31 multiplier.
//
// Every pair (a, b) of 5-bit words, including the all-ones code of zero, is
// applied; p modulo 31 must equal a*b modulo 31. A random sample of P = 7
// (modulo 127) operands is checked the same way.
module tb_mersenne_mult;
  int checks = 0;
  int failures = 0;

  logic [4:0] a5, b5, p5;
  logic [6:0] a7, b7, p7;

  mersenne_mult #(.P(5)) u_m5 (.a(a5), .b(b5), .p(p5));
  mersenne_mult #(.P(7)) u_m7 (.a(a7), .b(b7), .p(p7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i);
        b5 = 5'(j);
        #1;
        checks++;
        if (int'(p5) % 31 != (i * j) % 31) begin
          failures++;
          $display("a=%0d b=%0d p=%0d", i, j, p5);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      #1;
      checks++;
      if (int'(p7) % 127 != (int'(a7) * int'(b7)) % 127) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
