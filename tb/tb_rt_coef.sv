// tb_rt_coef: checks the RT spectral coefficients.
//
// For random kernels h (extremes included) the outputs must equal 4*G h with
// G written out here. As an independent check of the factorisation, the
// testbench also verifies that (1/4) B diag(d4) A x equals the cyclic
// convolution of h and a random x, using the design's d4.
module tb_rt_coef;
  int checks = 0;
  int failures = 0;
  logic signed [7:0]  h  [4];
  logic signed [11:0] d4 [5];
  int A [5][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{1,1,-1,-1}, '{1,0,-1,0}, '{0,1,0,-1}};
  int B [4][5] = '{'{1,1,1,0,-1}, '{1,-1,1,1,0}, '{1,1,-1,0,1}, '{1,-1,-1,-1,0}};
  int G4 [5][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{2,0,-2,0}, '{-2,2,2,-2}, '{2,2,-2,-2}};

  rt_coef #(.W(8), .DW(12)) dut (.h(h), .d4(d4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hv [4];
    int xv [4];
    for (int t = 0; t < 1000; t++) begin
      for (int j = 0; j < 4; j++) begin
        hv[j] = (t == 0) ? -128 : (t == 1) ? 127 : $signed(8'($urandom));
        xv[j] = $signed(8'($urandom));
        h[j]  = 8'(hv[j]);
      end
      #1;
      for (int m = 0; m < 5; m++) begin
        int e;
        e = 0;
        for (int j = 0; j < 4; j++) e += G4[m][j] * hv[j];
        checks++;
        if (int'(d4[m]) != e) begin
          failures++;
          $display("d4[%0d]=%0d exp %0d", m, d4[m], e);
        end
      end
      for (int k = 0; k < 4; k++) begin
        int yd;
        int yt;
        yd = 0;
        yt = 0;
        for (int i = 0; i < 4; i++) yd += hv[i] * xv[(k - i + 4) % 4];
        for (int m = 0; m < 5; m++) begin
          int um;
          um = 0;
          for (int j = 0; j < 4; j++) um += A[m][j] * xv[j];
          yt += B[k][m] * int'(d4[m]) * um;
        end
        checks++;
        if (yt != 4 * yd) begin
          failures++;
          $display("factorisation k=%0d %0d vs %0d", k, yt, 4 * yd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
