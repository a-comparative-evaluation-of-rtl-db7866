// tb_rt_multiplexed: checks the single-multiplier RT convolver.
//
// Each run pulses start with random x (extremes included) and d4 = 4*G h
// computed here. busy must stay high for exactly 5 cycles (one iteration per
// spectral index), done must pulse in the cycle after, and y must equal the
// order-4 cyclic convolution of h and x. A start pulse while busy must be
// ignored, and y must hold its value until the next done.
module tb_rt_multiplexed;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst = 1;
  logic start = 0;
  logic signed [7:0]  x  [4];
  logic signed [11:0] d4 [5];
  logic busy;
  logic done;
  logic signed [17:0] y [4];
  int G4 [5][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{2,0,-2,0}, '{-2,2,2,-2}, '{2,2,-2,-2}};

  rt_multiplexed dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int hv [4];
    int xv [4];
    int ev [4];
    int busy_cycles;
    for (int j = 0; j < 4; j++) x[j] = '0;
    for (int m = 0; m < 5; m++) d4[m] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 500; run++) begin
      for (int j = 0; j < 4; j++) begin
        hv[j] = rnd8();
        xv[j] = rnd8();
        x[j]  = 8'(xv[j]);
      end
      for (int m = 0; m < 5; m++) begin
        int e;
        e = 0;
        for (int j = 0; j < 4; j++) e += G4[m][j] * hv[j];
        d4[m] = 12'(e);
      end
      for (int k = 0; k < 4; k++) begin
        ev[k] = 0;
        for (int i = 0; i < 4; i++) ev[k] += hv[i] * xv[(k - i + 4) % 4];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      // scramble the inputs: the design must have latched them
      for (int j = 0; j < 4; j++) x[j] = 8'($urandom);
      busy_cycles = 0;
      while (busy) begin
        if (busy_cycles == 2) start = 1;   // ignored while busy
        @(negedge clk);
        start = 0;
        busy_cycles++;
        if (busy_cycles > 20) break;
      end
      checks++;
      if (busy_cycles != 5) begin
        failures++;
        $display("busy for %0d cycles", busy_cycles);
      end
      checks++;
      if (!done) begin
        failures++;
        $display("no done after busy");
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(y[k]) != ev[k]) begin
          failures++;
          $display("run %0d y[%0d]=%0d exp %0d", run, k, y[k], ev[k]);
        end
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (done || busy) failures++;
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(y[k]) != ev[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
