// tb_ntt_transform: checks the direct and inverse Mersenne transforms.
//
// For P = 5 (modulus 31) and P = 7 (modulus 127) random input vectors are
// applied to a direct and an inverse instance; each output, reduced modulo
// 2^P - 1, is compared with sum_j 2^(+/-jk mod P) x(j) computed here with
// ordinary integer arithmetic. The radix -2 transform of length 10 over
// modulus 31 is checked the same way against sum_j (-2)^(+/-jk mod 10) x(j).
// All-ones inputs (negative zero) are included.
module tb_ntt_transform;
  int checks = 0;
  int failures = 0;

  logic [4:0] x5 [5];
  logic [4:0] f5 [5];
  logic [4:0] i5 [5];
  logic [6:0] x7 [7];
  logic [6:0] f7 [7];
  logic [6:0] i7 [7];
  logic [4:0] xn [10];
  logic [4:0] fn [10];
  logic [4:0] in [10];

  ntt_transform #(.P(5), .INVERSE(1'b0)) u_f5 (.in_w(x5), .out_w(f5));
  ntt_transform #(.P(5), .INVERSE(1'b1)) u_i5 (.in_w(x5), .out_w(i5));
  ntt_transform #(.P(7), .INVERSE(1'b0)) u_f7 (.in_w(x7), .out_w(f7));
  ntt_transform #(.P(7), .INVERSE(1'b1)) u_i7 (.in_w(x7), .out_w(i7));
  ntt_transform #(.P(5), .INVERSE(1'b0), .NEG(1'b1)) u_fn (.in_w(xn), .out_w(fn));
  ntt_transform #(.P(5), .INVERSE(1'b1), .NEG(1'b1)) u_in (.in_w(xn), .out_w(in));

  // sum_j (-2)^(+/-jk mod 10) x(j) mod 31
  function automatic longint ref_n(int k, bit inv, longint xs[]);
    longint acc;
    acc = 0;
    for (int j = 0; j < 10; j++) begin
      int e;
      longint w;
      e = (j * k) % 10;
      if (inv) e = (10 - e) % 10;
      w = (longint'(1) << e) % 31;
      if (e % 2 == 1) w = 31 - w;
      acc = (acc + (xs[j] % 31) * w) % 31;
    end
    return acc;
  endfunction

  function automatic longint ref_t(int p, int k, bit inv, longint xs[]);
    longint m = (longint'(1) << p) - 1;
    longint acc = 0;
    for (int j = 0; j < p; j++) begin
      int e = (j * k) % p;
      if (inv) e = (p - e) % p;
      acc = (acc + (xs[j] % m) * (longint'(1) << e)) % m;
    end
    return acc;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs5[];
    longint xs7[];
    longint xsn[];
    xs5 = new[5];
    xs7 = new[7];
    xsn = new[10];
    for (int t = 0; t < 400; t++) begin
      for (int j = 0; j < 5; j++) begin
        x5[j] = (t < 2) ? ((t == 0) ? 5'h1f : 5'h0) : 5'($urandom);
        xs5[j] = x5[j];
      end
      for (int j = 0; j < 7; j++) begin
        x7[j] = (t < 2) ? ((t == 0) ? 7'h7f : 7'h0) : 7'($urandom);
        xs7[j] = x7[j];
      end
      for (int j = 0; j < 10; j++) begin
        xn[j] = (t < 2) ? ((t == 0) ? 5'h1f : 5'h0) : 5'($urandom);
        xsn[j] = xn[j];
      end
      #1;
      for (int k = 0; k < 5; k++) begin
        checks += 2;
        if (longint'(f5[k]) % 31 != ref_t(5, k, 0, xs5)) begin
          failures++;
          $display("P5 fwd k=%0d got %0d exp %0d", k, f5[k], ref_t(5, k, 0, xs5));
        end
        if (longint'(i5[k]) % 31 != ref_t(5, k, 1, xs5)) begin
          failures++;
          $display("P5 inv k=%0d got %0d exp %0d", k, i5[k], ref_t(5, k, 1, xs5));
        end
      end
      for (int k = 0; k < 7; k++) begin
        checks += 2;
        if (longint'(f7[k]) % 127 != ref_t(7, k, 0, xs7)) failures++;
        if (longint'(i7[k]) % 127 != ref_t(7, k, 1, xs7)) failures++;
      end
      for (int k = 0; k < 10; k++) begin
        checks += 2;
        if (longint'(fn[k]) % 31 != ref_n(k, 0, xsn)) begin
          failures++;
          $display("radix -2 fwd k=%0d got %0d exp %0d", k, fn[k], ref_n(k, 0, xsn));
        end
        if (longint'(in[k]) % 31 != ref_n(k, 1, xsn)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
