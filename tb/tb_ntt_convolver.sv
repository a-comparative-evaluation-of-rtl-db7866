// tb_ntt_convolver: end-to-end check of the Mersenne NTT convolvers.
//
// Two instances run side by side on modulus 31: the radix-2 transform of
// length 5 and the radix -2 transform of length 10. Random kernels and inputs
// (residues mod 31, all-ones codes included) are streamed with random gaps in
// in_valid. The spectral coefficients are computed here (g = L^-1 * T h mod
// 31, with L^-1 = 25 for L = 5 and 28 for L = 10). Each result must equal the
// cyclic convolution sum_i h(i) x((k-i) mod L) mod 31 and appear exactly 3
// cycles after its input; back-to-back inputs check the one-per-clock rate.
module tb_ntt_convolver;
  localparam int LAT = 3;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int b2b = 0;

  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  logic [4:0] x5 [5];
  logic [4:0] g5 [5];
  logic out_valid5;
  logic [4:0] y5 [5];
  logic [4:0] x10 [10];
  logic [4:0] g10 [10];
  logic out_valid10;
  logic [4:0] y10 [10];
  int h [2][10];

  typedef struct { int stamp; int yv[10]; } exp_t;
  exp_t q[2][$];

  ntt_convolver #(.P(5)) dut5 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x5), .g(g5),
    .out_valid(out_valid5), .y(y5)
  );
  ntt_convolver #(.P(5), .NEG(1'b1)) dut10 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x10), .g(g10),
    .out_valid(out_valid10), .y(y10)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int len(int l);
    return (l == 0) ? 5 : 10;
  endfunction

  // r^e mod 31 for radix 2 (l = 0) or -2 (l = 1)
  function automatic int rpow(int l, int e);
    int w;
    w = (1 << (e % 5)) % 31;
    if (l == 1 && e % 2 == 1) w = 31 - w;
    return w;
  endfunction

  task automatic new_kernel();
    for (int l = 0; l < 2; l++) begin
      for (int j = 0; j < len(l); j++) h[l][j] = $urandom_range(0, 31);
      for (int k = 0; k < len(l); k++) begin
        int acc;
        acc = 0;
        for (int j = 0; j < len(l); j++) acc = (acc + (h[l][j] % 31) * rpow(l, (j * k) % len(l))) % 31;
        acc = (acc * ((l == 0) ? 25 : 28)) % 31;
        if (l == 0) g5[k] = 5'(acc);
        else        g10[k] = 5'(acc);
      end
    end
  endtask

  function automatic int xin(int l, int j);
    return (l == 0) ? int'(x5[j]) : int'(x10[j]);
  endfunction

  function automatic int yout(int l, int k);
    return (l == 0) ? int'(y5[k]) : int'(y10[k]);
  endfunction

  // compare the outputs of lane l with the oldest expected entry
  task automatic check_out(int l, bit ov, bit timed);
    exp_t e;
    if (!ov) return;
    if (q[l].size() == 0) begin
      failures++;
      $display("lane %0d: unexpected out_valid", l);
      return;
    end
    e = q[l].pop_front();
    if (timed) begin
      checks++;
      if (cycle - e.stamp != LAT) begin
        failures++;
        $display("lane %0d: latency %0d", l, cycle - e.stamp);
      end
    end
    for (int k = 0; k < len(l); k++) begin
      checks++;
      if (yout(l, k) != e.yv[k]) begin
        failures++;
        $display("lane %0d: y[%0d]=%0d exp %0d", l, k, yout(l, k), e.yv[k]);
      end
    end
  endtask

  initial begin
    bit prev;
    prev = 0;
    for (int j = 0; j < 5; j++) x5[j] = '0;
    for (int j = 0; j < 10; j++) x10[j] = '0;
    new_kernel();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      cycle++;
      check_out(0, out_valid5, 1'b1);
      check_out(1, out_valid10, 1'b1);
      // kernel changes only when the pipeline is empty
      if (t % 300 == 299) begin
        in_valid = 0;
        repeat (LAT + 1) begin
          @(negedge clk);
          cycle++;
          check_out(0, out_valid5, 1'b0);
          check_out(1, out_valid10, 1'b0);
        end
        new_kernel();
        continue;
      end
      // drive
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 5; j++) x5[j] = 5'($urandom);
      for (int j = 0; j < 10; j++) x10[j] = 5'($urandom);
      if (in_valid) begin
        for (int l = 0; l < 2; l++) begin
          exp_t e;
          e.stamp = cycle;
          for (int k = 0; k < len(l); k++) begin
            int acc;
            acc = 0;
            for (int i = 0; i < len(l); i++)
              acc = (acc + h[l][i] % 31 * (xin(l, (k - i + len(l)) % len(l)) % 31)) % 31;
            e.yv[k] = acc;
          end
          q[l].push_back(e);
        end
        if (prev) b2b++;
      end
      prev = in_valid;
    end
    checks++;
    if (b2b == 0 || q[0].size() > LAT || q[1].size() > LAT) begin
      failures++;
      $display("b2b=%0d pending=%0d/%0d", b2b, q[0].size(), q[1].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
