// tb_rt_post_array: checks the RT post-addition mesh cycle by cycle.
//
// Every cycle a new random vector V(t) of 5 products is launched, skewed the
// way the multiplier row delivers it: in cycle t, input p[m] carries
// V(t - m)[m]. In cycle t, output row k must hold row k of B applied to
// V(t - 5 - k). B is written out here independently of the design's tables.
module tb_rt_post_array;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic signed [21:0] p [5];
  logic signed [23:0] s [4];
  int hist [$][5];
  int B [4][5] = '{'{1,1,1,0,-1}, '{1,-1,1,1,0}, '{1,1,-1,0,1}, '{1,-1,-1,-1,0}};

  rt_post_array #(.PW(22), .SW(24)) dut (.clk(clk), .p(p), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [5];
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t >= 12) begin
        for (int k = 0; k < 4; k++) begin
          int e;
          e = 0;
          for (int m = 0; m < 5; m++) e += B[k][m] * hist[t - 5 - k][m];
          checks++;
          if (int'(s[k]) != e) begin
            failures++;
            $display("t=%0d s[%0d]=%0d exp %0d", t, k, s[k], e);
          end
        end
      end
      for (int m = 0; m < 5; m++) v[m] = $urandom_range(0, 2097151) - 1048576;
      hist.push_back(v);
      for (int m = 0; m < 5; m++) p[m] = (t >= m) ? 22'(hist[t - m][m]) : '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
