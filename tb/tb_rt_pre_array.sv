// tb_rt_pre_array: checks the RT pre-addition mesh cycle by cycle.
//
// A new random vector x(t) enters every cycle (extreme values included). In
// cycle t, column m of the output must hold row m of A applied to the vector
// that entered in cycle t - 4 - m (the mesh depth plus the column skew). A is
// written out here independently of the design's tables.
module tb_rt_pre_array;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic signed [7:0] x [4];
  logic signed [9:0] u [5];
  int hist [$][4];
  int A [5][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{1,1,-1,-1}, '{1,0,-1,0}, '{0,1,0,-1}};

  rt_pre_array #(.W(8), .UW(10)) dut (.clk(clk), .x(x), .u(u));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t >= 10) begin
        for (int m = 0; m < 5; m++) begin
          int e;
          e = 0;
          for (int j = 0; j < 4; j++) e += A[m][j] * hist[t - 4 - m][j];
          checks++;
          if (int'(u[m]) != e) begin
            failures++;
            $display("t=%0d u[%0d]=%0d exp %0d", t, m, u[m], e);
          end
        end
      end
      for (int j = 0; j < 4; j++) begin
        case ($urandom_range(0, 5))
          0:       v[j] = -128;
          1:       v[j] = 127;
          default: v[j] = $signed(8'($urandom));
        endcase
        x[j] = 8'(v[j]);
      end
      hist.push_back(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
