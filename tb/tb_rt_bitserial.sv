// tb_rt_bitserial: end-to-end check of the bit-serial RT convolver.
//
// Random kernels (d4 = 4*G h computed here with G written out) and random
// inputs, extremes included, are offered with random gaps; an input is taken
// when in_ready is high. Each result must equal the order-4 cyclic
// convolution of h and x and appear exactly NB + 15 cycles after its input
// was accepted. Back-to-back acceptances must be exactly NB cycles apart
// (the bit-serial period) and must occur.
module tb_rt_bitserial;
  localparam int NB  = 20;
  localparam int LAT = NB + 15;
  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int b2b = 0;
  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  logic in_ready;
  logic signed [7:0]  x  [4];
  logic signed [11:0] d4 [5];
  logic out_valid;
  logic signed [17:0] y [4];
  int hv [4];
  int G4 [5][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{2,0,-2,0}, '{-2,2,2,-2}, '{2,2,-2,-2}};

  typedef struct { int stamp; int yv[4]; } exp_t;
  exp_t q[$];

  rt_bitserial dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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
    for (int m = 0; m < 5; m++) begin
      int e;
      e = 0;
      for (int j = 0; j < 4; j++) e += G4[m][j] * hv[j];
      d4[m] = 12'(e);
    end
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
    int last_acc;
    int xv [4];
    last_acc = -1000;
    for (int j = 0; j < 4; j++) x[j] = '0;
    new_kernel();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12000; t++) begin
      @(negedge clk);
      cycle++;
      // the vector offered in the previous cycle was taken if in_ready was high then
      check_out();
      if (t % 3000 == 2999) begin
        in_valid = 0;
        repeat (LAT + NB + 2) begin
          @(negedge clk);
          cycle++;
          check_out();
        end
        new_kernel();
        continue;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 4; j++) begin
        xv[j] = rnd8();
        x[j]  = 8'(xv[j]);
      end
      #1;
      if (in_valid && in_ready) begin
        exp_t e;
        e.stamp = cycle;
        for (int k = 0; k < 4; k++) begin
          e.yv[k] = 0;
          for (int i = 0; i < 4; i++) e.yv[k] += hv[i] * xv[(k - i + 4) % 4];
        end
        q.push_back(e);
        checks++;
        if (cycle - last_acc < NB) begin
          failures++;
          $display("accepted %0d cycles after the previous one", cycle - last_acc);
        end
        if (cycle - last_acc == NB) b2b++;
        last_acc = cycle;
      end
    end
    checks++;
    if (b2b == 0 || q.size() > 2) begin
      failures++;
      $display("b2b=%0d pending=%0d", b2b, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
