// tb_direct_parallel: end-to-end check of the direct parallel cyclic convolver.
//
// Random kernels and inputs, extremes included, are streamed with random
// gaps in in_valid. Each result must equal the order-4 cyclic convolution
// sum_i h(i) x((k-i) mod 4), computed here, and appear exactly 4 cycles after
// its input. Back-to-back inputs check the one-per-clock rate.
module tb_direct_parallel;
  localparam int LAT = 4;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int b2b = 0;
  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  logic signed [7:0]  x  [4];
  logic signed [7:0]  h  [4];
  logic out_valid;
  logic signed [17:0] y [4];
  int hv [4];

  typedef struct { int stamp; int yv[4]; } exp_t;
  exp_t q[$];

  direct_parallel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd8();
    case ($urandom_range(0, 5))
      0:       return -128;
      1:       return 127;
      default: return $signed(8'($urandom));
    endcase
  endfunction

  task automatic new_kernel();
    for (int j = 0; j < 4; j++) hv[j] = rnd8();
    for (int j = 0; j < 4; j++) h[j] = 8'(hv[j]);
  endtask

  task automatic check_out();
    exp_t e;
    if (!out_valid) return;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected out_valid");
      return;
    end
    e = q.pop_front();
    checks++;
    if (cycle - e.stamp != LAT) begin
      failures++;
      $display("latency %0d", cycle - e.stamp);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(y[k]) != e.yv[k]) begin
        failures++;
        $display("y[%0d]=%0d exp %0d", k, y[k], e.yv[k]);
      end
    end
  endtask

  initial begin
    bit prev;
    prev = 0;
    for (int j = 0; j < 4; j++) x[j] = '0;
    new_kernel();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cycle++;
      check_out();
      if (t % 500 == 499) begin
        // drain, then change the kernel
        in_valid = 0;
        repeat (LAT + 1) begin
          @(negedge clk);
          cycle++;
          check_out();
        end
        new_kernel();
        prev = 0;
        continue;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      begin
        int xv [4];
        for (int j = 0; j < 4; j++) begin
          xv[j] = rnd8();
          x[j]  = 8'(xv[j]);
        end
        if (in_valid) begin
          exp_t e;
          e.stamp = cycle;
          for (int k = 0; k < 4; k++) begin
            e.yv[k] = 0;
            for (int i = 0; i < 4; i++) e.yv[k] += hv[i] * xv[(k - i + 4) % 4];
          end
          q.push_back(e);
          if (prev) b2b++;
        end
      end
      prev = in_valid;
    end
    checks++;
    if (b2b == 0 || q.size() > LAT) begin
      failures++;
      $display("b2b=%0d pending=%0d", b2b, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
